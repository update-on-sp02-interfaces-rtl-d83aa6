// ddu_formatter: L1A processing and event formatting for the DDU readout
// link, and the WOF (warning overflow) signal.
//
// Every L1A is queued with its event number, its bunch crossing number and
// the pipeline address of its data (wr_ptr - LATENCY at the time the L1A
// arrives). For each queued event the formatter copies WINDOW consecutive
// pipeline entries (the L1A's bunch crossing first) into an event buffer,
// then sends the event as 16-bit words in the DMB-DDU convention: bit 15
// is the control flag (1 for the start- and end-of-frame words), bits 14:0
// carry data. The frame is
//   SOF (2) | Header (8) | Output block (8) | Input block 1 | Input block 2 | EOF (2)
// and the readout mode (latched, with the FM state and evt_ovf, when the
// event is taken from the queue) selects what is sent:
//   DDU_FULL    all sections; each input block has 2 words per LCT for
//               LPB links x WINDOW crossings (40 words at the defaults)
//   DDU_ZS      input blocks zero suppressed: 4 words of VP and SE masks
//               and then 2 words per LCT with VP=1
//   DDU_HDR     SOF, header, EOF (12 words)
//   DDU_FMONLY  SOF and EOF only (4 words), the FM state in SOF word 1
// Input block 1 holds links 0..LPB-1, block 2 links LPB..2*LPB-1.
// Word layouts (x = 15 data bits):
//   SOF0 {1,100,l1a[11:0]}       SOF1 {1,101,000000,mode,fm}
//   HDR0 {0,l1a[14:0]}           HDR1 {0,000000,l1a[23:15]}
//   HDR2 {0,000,bxn}             HDR3 {0,000000,ga,mode,lost,evt_ovf}
//   HDR4 {0,0..0,fm}             HDR5/6 {0,words in input block 1/2}
//   HDR7 {0,0000000,LPB[3:0],WINDOW[3:0]}
//   OUT0..5 muon m: {0,mu[14:0]}, {0,0..0,mu[19:15]}
//   OUT6 {0,0..0,bx0,bc0,se,spare}  OUT7 zero
//   LCT  {0,quality,clct_pat,wg} then {0,vp,csc_id,se,lr,hs}
//        (BC0 and BX0 are left out; the header carries the BXN)
//   ZS   {0,vpmask[14:0]} {0,vpmask[29:15]} then the same for SE
//   EOF0 {1,110,words before EOF0[11:0]}  EOF1 {1,111,XOR of bits 11:0
//        of all earlier words of the frame}
// `lost` is set when the event waited so long that its pipeline entries
// may have been overwritten.
// Flow control: a word is transferred when ddu_valid and ddu_ready are
// both high. Skipped (VP=0) LCTs in ZS mode cost one clock each.
// WOF is high while the number of L1As accepted less the number of events
// sent reaches WOF_THRESH. An L1A that finds the queue full is dropped and
// sets the sticky evt_ovf.
//
// Lint reports some bits as unused, and they are left so on purpose:
//   - the BC0/BX0 bits of the LCTs, which the frame leaves out;
//   - the pipeline address and arrival time in the latched copy of the
//     event being sent, since both are read from the queue head;
//   - the upper bits of the crossing index inside get_lct.
//
// The frame sections, their sizes in the four modes, the 1+15 bit word
// convention and the WOF rule follow the document. The word contents, the
// readout window, the links per block and the queue sizes are this
// design's own.
module ddu_formatter
  import sp02_pkg::*;
#(
  parameter int unsigned LPB        = 4,    // links per input block
  parameter int unsigned WINDOW     = 5,    // crossings read out per L1A
  parameter int unsigned DEPTH      = 1024, // pipeline depth
  parameter int unsigned LATENCY    = 128,  // L1A latency in crossings
  parameter int unsigned EVT_DEPTH  = 8,    // queued L1As
  parameter int unsigned WOF_THRESH = 6,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned W  = 2*LPB*32 + 64
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             l1a,
  input  logic [23:0]      l1a_num,
  input  logic [BXN_W-1:0] bxn,
  input  ddu_mode_e        mode,
  input  fm_t              fm,
  input  logic [4:0]       ga,
  // pipeline read port
  input  logic [AW-1:0]    wr_ptr,
  output logic [AW-1:0]    rd_addr,
  input  logic [W-1:0]     rd_data,
  // DDU link
  output logic [15:0]      ddu_data,
  output logic             ddu_valid,
  input  logic             ddu_ready,
  output logic             ddu_sof,     // first word of a frame
  output logic             ddu_eof,     // last word of a frame
  // status
  output logic             wof,
  output logic             evt_ovf,
  output logic [15:0]      evt_sent
);

  localparam int unsigned NS  = LPB * WINDOW;   // LCTs per input block
  localparam int unsigned EAW = $clog2(EVT_DEPTH);

  typedef struct packed {
    logic [23:0]      num;
    logic [BXN_W-1:0] bxn;
    logic [AW-1:0]    base;
    logic [15:0]      ts;
  } evt_t;

  typedef enum logic [2:0] {SEC_SOF, SEC_HDR, SEC_OUT, SEC_IN1, SEC_IN2, SEC_EOF} sec_e;
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_EMIT} state_e;

  // ---------------- L1A queue and WOF ----------------
  evt_t           q_mem [EVT_DEPTH];
  logic [EAW-1:0] q_wp, q_rp;
  logic [EAW:0]   q_cnt;
  logic [15:0]    tcount, l1a_acc;
  logic           q_push, q_pop, q_full;

  assign q_full = (q_cnt == (EAW+1)'(EVT_DEPTH));
  assign q_push = l1a && !q_full;

  always_ff @(posedge clk) begin
    if (q_push) q_mem[q_wp] <= '{num: l1a_num, bxn: bxn,
                                 base: wr_ptr - AW'(LATENCY), ts: tcount};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q_wp <= '0; q_rp <= '0; q_cnt <= '0; tcount <= '0;
      l1a_acc <= '0; evt_ovf <= 1'b0;
    end else begin
      tcount <= tcount + 1'b1;
      if (q_push) begin
        q_wp    <= (32'(q_wp) == EVT_DEPTH-1) ? '0 : q_wp + 1'b1;
        l1a_acc <= l1a_acc + 1'b1;
      end
      if (q_pop) q_rp <= (32'(q_rp) == EVT_DEPTH-1) ? '0 : q_rp + 1'b1;
      q_cnt <= q_cnt + (EAW+1)'(q_push) - (EAW+1)'(q_pop);
      if (l1a && q_full) evt_ovf <= 1'b1;
    end
  end

  assign wof = (16'(l1a_acc - evt_sent) >= 16'(WOF_THRESH));

  // ---------------- event buffer ----------------
  state_e           state;
  sec_e             sec;
  evt_t             cur;
  ddu_mode_e        mode_q;
  fm_t              fm_q;
  logic             ovf_q;
  logic [W-1:0]     evt_buf [WINDOW];
  logic [$clog2(WINDOW+1)-1:0] ld_cnt;
  logic             lost;
  logic [3:0]       idx;
  logic             scan, half;
  logic [$clog2(NS)-1:0] j;
  logic [11:0]      wcnt, xsum;

  assign q_pop = (state == S_IDLE) && (q_cnt != '0);

  // ---------------- word generation ----------------
  lct_t        lct_j;
  logic [29:0] vmask, smask;
  logic [15:0] len_blk [2];
  logic [15:0] word;
  logic        skip, last_word_of_sec, fire, adv;
  logic [63:0] msw;
  logic [19:0] mu;

  function automatic lct_t get_lct(input logic blk, input int jj);
    int e, l;
    e = jj / LPB;
    l = int'(blk) * LPB + jj % LPB;
    return lct_t'(evt_buf[e][32*l +: 32]);
  endfunction

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      int nv;
      nv = 0;
      for (int jj = 0; jj < NS; jj++) nv += int'(get_lct(b[0], jj).vp);
      unique case (mode_q)
        DDU_FULL: len_blk[b] = 16'(2*NS);
        DDU_ZS:   len_blk[b] = 16'(4 + 2*nv);
        default:  len_blk[b] = '0;
      endcase
    end
  end

  always_comb begin
    logic blk;
    blk   = (sec == SEC_IN2);
    lct_j = get_lct(blk, int'(j));
    vmask = '0;
    smask = '0;
    for (int jj = 0; jj < NS; jj++) begin
      vmask[jj] = get_lct(blk, jj).vp;
      smask[jj] = get_lct(blk, jj).se;
    end
    msw = evt_buf[0][W-1 -: 64];
    mu  = '0;
    if (idx < 4'd6) mu = msw[63 - 20*(int'(idx)/2) -: 20];
    skip = (sec == SEC_IN1 || sec == SEC_IN2) && scan && mode_q == DDU_ZS && !lct_j.vp;

    word = '0;
    unique case (sec)
      SEC_SOF: word = idx[0] ? {1'b1, 3'b101, 6'd0, mode_q, fm_q}
                             : {1'b1, 3'b100, cur.num[11:0]};
      SEC_HDR: unique case (idx[2:0])
        3'd0: word = {1'b0, cur.num[14:0]};
        3'd1: word = {1'b0, 6'd0, cur.num[23:15]};
        3'd2: word = {1'b0, 3'd0, cur.bxn};
        3'd3: word = {1'b0, 6'd0, ga, mode_q, lost, ovf_q};
        3'd4: word = {1'b0, 11'd0, fm_q};
        3'd5: word = {1'b0, len_blk[0][14:0]};
        3'd6: word = {1'b0, len_blk[1][14:0]};
        default: word = {1'b0, 7'd0, 4'(LPB), 4'(WINDOW)};
      endcase
      SEC_OUT: begin
        if (idx < 4'd6) word = idx[0] ? {1'b0, 10'd0, mu[19:15]} : {1'b0, mu[14:0]};
        else if (idx == 4'd6) word = {1'b0, 11'd0, msw[3:0]};
        else word = '0;
      end
      SEC_IN1, SEC_IN2: begin
        if (!scan) unique case (idx[1:0])
          2'd0: word = {1'b0, vmask[14:0]};
          2'd1: word = {1'b0, vmask[29:15]};
          2'd2: word = {1'b0, smask[14:0]};
          default: word = {1'b0, smask[29:15]};
        endcase
        else if (!half) word = {1'b0, lct_j.quality, lct_j.clct_pat, lct_j.wg};
        else            word = {1'b0, lct_j.vp, lct_j.csc_id, lct_j.se, lct_j.lr, lct_j.hs};
      end
      SEC_EOF: word = idx[0] ? {1'b1, 3'b111, xsum} : {1'b1, 3'b110, wcnt};
      default: word = '0;
    endcase
  end

  assign ddu_valid = (state == S_EMIT) && !skip;
  assign ddu_data  = word;
  assign ddu_sof   = ddu_valid && sec == SEC_SOF && idx == 4'd0;
  assign ddu_eof   = ddu_valid && sec == SEC_EOF && idx == 4'd1;
  assign fire      = ddu_valid && ddu_ready;
  assign adv       = fire || ((state == S_EMIT) && skip);

  // ---------------- sequencing ----------------
  always_comb begin
    last_word_of_sec = 1'b0;
    unique case (sec)
      SEC_SOF, SEC_EOF: last_word_of_sec = (idx == 4'd1);
      SEC_HDR, SEC_OUT: last_word_of_sec = (idx == 4'd7);
      default:          last_word_of_sec = scan && (half || skip) && 32'(j) == NS-1;
    endcase
  end

  function automatic sec_e next_sec(input sec_e s, input ddu_mode_e m);
    unique case (s)
      SEC_SOF: return (m == DDU_FMONLY) ? SEC_EOF : SEC_HDR;
      SEC_HDR: return (m == DDU_HDR) ? SEC_EOF : SEC_OUT;
      SEC_OUT: return SEC_IN1;
      SEC_IN1: return SEC_IN2;
      default: return SEC_EOF;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; sec <= SEC_SOF; cur <= '0; mode_q <= DDU_FULL; fm_q <= '0; ovf_q <= 1'b0;
      ld_cnt <= '0; lost <= 1'b0; idx <= '0; scan <= 1'b0; half <= 1'b0;
      j <= '0; wcnt <= '0; xsum <= '0; evt_sent <= '0; rd_addr <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (q_pop) begin
          cur     <= q_mem[q_rp];
          mode_q  <= mode;
          fm_q    <= fm;
          ovf_q   <= evt_ovf;
          lost    <= (32'(16'(tcount - q_mem[q_rp].ts)) + LATENCY + WINDOW >= DEPTH);
          rd_addr <= q_mem[q_rp].base;
          ld_cnt  <= '0;
          state   <= S_LOAD;
        end
        S_LOAD: begin
          // rd_addr issued in cycle k returns data in cycle k+1
          rd_addr <= rd_addr + 1'b1;
          ld_cnt  <= ld_cnt + 1'b1;
          if (ld_cnt != '0) evt_buf[ld_cnt - 1'b1] <= rd_data;
          if (32'(ld_cnt) == WINDOW) begin
            state <= S_EMIT;
            sec   <= SEC_SOF;
            idx   <= '0;
            wcnt  <= '0;
            xsum  <= '0;
          end
        end
        S_EMIT: if (adv) begin
          if (fire) begin
            wcnt <= wcnt + 1'b1;
            xsum <= xsum ^ word[11:0];
          end
          if (last_word_of_sec) begin
            idx  <= '0;
            half <= 1'b0;
            j    <= '0;
            scan <= (mode_q != DDU_ZS);
            sec  <= next_sec(sec, mode_q);
            if (sec == SEC_EOF) begin
              evt_sent <= evt_sent + 1'b1;
              state    <= S_IDLE;
            end
          end else if ((sec == SEC_IN1 || sec == SEC_IN2) && scan) begin
            if (half || skip) begin
              half <= 1'b0;
              j    <= j + 1'b1;
            end else begin
              half <= 1'b1;
            end
          end else if ((sec == SEC_IN1 || sec == SEC_IN2) && idx == 4'd3) begin
            scan <= 1'b1;
            idx  <= '0;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (NS <= 30 && LPB < 16 && WINDOW < 16 && WINDOW < DEPTH - LATENCY)
      else $error("ddu_formatter: unsupported LPB/WINDOW");
  end

  // a frame is never cut: data hold while the DDU is not ready
  a_hold: assert property (@(posedge clk) disable iff (rst)
                           ddu_valid && !ddu_ready |=> ddu_valid && $stable(ddu_data));

endmodule
