// tb_ddu_formatter: self-checking test of the DDU event formatter.
//
// The testbench models the pipeline (a memory written with random data
// every clock, read with one clock latency) and sends L1As in each of the
// four readout modes. For every accepted L1A it builds the expected frame
// from a snapshot of the pipeline entries, following the word layout in
// the module header, and compares it word by word with what the DDU link
// receives. The DDU side applies random back-pressure. It checks the frame
// sizes (100 words full, 12 header only, 4 FM only, 28 zero-suppressed
// with no valid LCT), that a full frame is sent in 100 clocks without
// back-pressure, and that a burst of L1As while the DDU is stalled raises
// WOF, drops what the queue cannot hold and sets evt_ovf.
module tb_ddu_formatter;
  import sp02_pkg::*;

  localparam int LPB = 4, WINDOW = 5, DEPTH = 1024, LATENCY = 20;
  localparam int EVT_DEPTH = 8, WOF_THRESH = 5;
  localparam int NS = LPB * WINDOW, AW = 10, W = 2*LPB*32 + 64;

  logic clk = 1'b0;
  always #12.5 clk = ~clk;

  logic             rst, l1a, ddu_valid, ddu_ready, ddu_sof, ddu_eof, wof, evt_ovf;
  logic [23:0]      l1a_num;
  logic [BXN_W-1:0] bxn;
  ddu_mode_e        mode;
  fm_t              fm;
  logic [4:0]       ga;
  logic [AW-1:0]    wr_ptr, rd_addr;
  logic [W-1:0]     rd_data;
  logic [15:0]      ddu_data, evt_sent;

  ddu_formatter #(.LPB(LPB), .WINDOW(WINDOW), .DEPTH(DEPTH), .LATENCY(LATENCY),
                  .EVT_DEPTH(EVT_DEPTH), .WOF_THRESH(WOF_THRESH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- pipeline model ----------------
  logic [W-1:0] pmem [DEPTH];
  int vp_pct = 30;
  always @(posedge clk) begin
    logic [W-1:0] e;
    for (int k = 0; k < W / 32; k++) e[32*k +: 32] = $urandom();
    for (int l = 0; l < 2*LPB; l++) e[32*l + 31] = ($urandom_range(0, 99) < vp_pct);
    pmem[wr_ptr] <= e;
    rd_data      <= pmem[rd_addr];
    wr_ptr       <= rst ? '0 : wr_ptr + 1'b1;
  end

  // ---------------- expected frames ----------------
  logic [15:0] exp_q[$];
  int          frame_len[$];

  function automatic lct_t lct_of(input logic [W-1:0] ent[WINDOW], input int b, input int jj);
    return lct_t'(ent[jj / LPB][32*(b*LPB + jj % LPB) +: 32]);
  endfunction

  task automatic expect_frame(input ddu_mode_e m, input logic [23:0] num,
                              input logic [11:0] bx, input logic ovf);
    logic [W-1:0] ent[WINDOW];
    logic [15:0]  f[$];
    logic [11:0]  x;
    logic [63:0]  ms;
    int           nv[2], len[2];
    for (int k = 0; k < WINDOW; k++) ent[k] = pmem[AW'(wr_ptr - AW'(LATENCY) + AW'(k))];
    for (int b = 0; b < 2; b++) begin
      nv[b] = 0;
      for (int jj = 0; jj < NS; jj++) nv[b] += lct_of(ent, b, jj).vp;
      len[b] = (m == DDU_FULL) ? 2*NS : (m == DDU_ZS) ? 4 + 2*nv[b] : 0;
    end
    f.push_back({1'b1, 3'b100, num[11:0]});
    f.push_back({1'b1, 3'b101, 6'd0, m, fm});
    if (m != DDU_FMONLY) begin
      f.push_back({1'b0, num[14:0]});
      f.push_back({1'b0, 6'd0, num[23:15]});
      f.push_back({1'b0, 3'd0, bx});
      f.push_back({1'b0, 6'd0, ga, m, 1'b0, ovf});
      f.push_back({1'b0, 11'd0, fm});
      f.push_back({1'b0, 15'(len[0])});
      f.push_back({1'b0, 15'(len[1])});
      f.push_back({1'b0, 7'd0, 4'(LPB), 4'(WINDOW)});
    end
    if (m == DDU_FULL || m == DDU_ZS) begin
      ms = ent[0][W-1 -: 64];
      for (int mu = 0; mu < 3; mu++) begin
        logic [19:0] v;
        v = ms[63 - 20*mu -: 20];
        f.push_back({1'b0, v[14:0]});
        f.push_back({1'b0, 10'd0, v[19:15]});
      end
      f.push_back({1'b0, 11'd0, ms[3:0]});
      f.push_back(16'd0);
      for (int b = 0; b < 2; b++) begin
        if (m == DDU_ZS) begin
          logic [29:0] vm, sm;
          vm = '0; sm = '0;
          for (int jj = 0; jj < NS; jj++) begin
            vm[jj] = lct_of(ent, b, jj).vp;
            sm[jj] = lct_of(ent, b, jj).se;
          end
          f.push_back({1'b0, vm[14:0]});
          f.push_back({1'b0, vm[29:15]});
          f.push_back({1'b0, sm[14:0]});
          f.push_back({1'b0, sm[29:15]});
        end
        for (int jj = 0; jj < NS; jj++) begin
          lct_t c;
          c = lct_of(ent, b, jj);
          if (m == DDU_FULL || c.vp) begin
            f.push_back({1'b0, c.quality, c.clct_pat, c.wg});
            f.push_back({1'b0, c.vp, c.csc_id, c.se, c.lr, c.hs});
          end
        end
      end
    end
    f.push_back({1'b1, 3'b110, 12'(f.size())});
    x = '0;
    foreach (f[i]) x ^= f[i][11:0];
    f.push_back({1'b1, 3'b111, x});
    foreach (f[i]) exp_q.push_back(f[i]);
    frame_len.push_back(f.size());
  endtask

  // ---------------- DDU side ----------------
  int ready_pct = 100, n_words = 0, n_frames = 0, cur_len = 0, sof_time = 0;
  int n_full100 = 0, n_hdr12 = 0, n_fm4 = 0, n_zs28 = 0, n_fast100 = 0, wof_seen = 0;
  int cyc_count = 0;
  always @(negedge clk) ddu_ready <= ($urandom_range(0, 99) < ready_pct);

  // words are taken at the clock edge, with the values before it
  always @(posedge clk) begin
    cyc_count++;
    if (wof) wof_seen++;
    if (!rst && ddu_valid && ddu_ready) begin
      n_words++;
      check(exp_q.size() > 0 && ddu_data == exp_q[0], "DDU word");
      if (exp_q.size() > 0 && ddu_data != exp_q[0] && failures < 6) $display("  pos %0d got %h exp %h", cur_len, ddu_data, exp_q[0]);
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      if (ddu_sof) begin
        check(cur_len == 0, "SOF at frame start");
        sof_time = cyc_count;
      end
      cur_len++;
      if (ddu_eof) begin
        check(frame_len.size() > 0 && cur_len == frame_len[0], "frame length");
        if (cur_len == 100) begin
          n_full100++;
          if (cyc_count - sof_time == 99) n_fast100++;
        end
        if (cur_len == 12) n_hdr12++;
        if (cur_len == 4)  n_fm4++;
        if (cur_len == 28) n_zs28++;
        if (frame_len.size() > 0) void'(frame_len.pop_front());
        cur_len = 0;
        n_frames++;
      end
    end
  end

  // ---------------- L1A source ----------------
  int n_exp = 0;
  logic ovf_exp = 1'b0;
  task automatic send_l1a(input logic accepted);
    @(negedge clk);
    l1a = 1'b1;
    if (accepted) begin
      expect_frame(mode, l1a_num, bxn, ovf_exp);
      n_exp++;
    end
    @(negedge clk);
    l1a = 1'b0;
    l1a_num++;
    bxn = bxn + 12'd37;
  endtask

  task automatic drain();
    int guard = 0;
    while ((exp_q.size() > 0 || dut.state != 0) && guard < 5000) begin
      @(negedge clk);
      guard++;
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; l1a = 1'b0; l1a_num = 24'd100; bxn = 12'd5; mode = DDU_FULL;
    fm = '{rdy: 1'b1, bsy: 1'b0, wof: 1'b1, osy: 1'b0}; ga = 5'd9; ddu_ready = 1'b1;
    repeat (LATENCY + 10) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    repeat (LATENCY + 10) @(negedge clk);
    // full events, no back-pressure, then with back-pressure
    for (int k = 0; k < 3; k++) begin send_l1a(1'b1); repeat (150) @(negedge clk); end
    ready_pct = 70;
    for (int k = 0; k < 4; k++) begin send_l1a(1'b1); repeat ($urandom_range(5, 60)) @(negedge clk); end
    drain();
    // zero suppression: no valid LCT, then a few
    mode = DDU_ZS; vp_pct = 0;
    repeat (LATENCY + 10) @(negedge clk);
    for (int k = 0; k < 3; k++) begin send_l1a(1'b1); repeat (40) @(negedge clk); end
    vp_pct = 10;
    repeat (LATENCY + 10) @(negedge clk);
    for (int k = 0; k < 5; k++) begin send_l1a(1'b1); repeat ($urandom_range(5, 60)) @(negedge clk); end
    drain();
    // burst while the DDU is stalled: 9 accepted, 3 dropped
    ready_pct = 0;
    repeat (5) @(negedge clk);
    for (int k = 0; k < 12; k++) begin
      @(negedge clk);
      if (k > 0) begin
        l1a_num++;
        bxn = bxn + 12'd1;
      end
      l1a = 1'b1;
      if (k < 9) begin expect_frame(mode, l1a_num, bxn, k > 0); n_exp++; end
    end
    @(negedge clk);
    l1a = 1'b0;
    l1a_num++;
    ovf_exp = 1'b1;
    repeat (20) @(negedge clk);
    check(wof && evt_ovf, "WOF and overflow during the burst");
    ready_pct = 80;
    drain();
    check(!wof, "WOF clears when the queue drains");
    // header only and FM only
    mode = DDU_HDR;
    for (int k = 0; k < 4; k++) begin send_l1a(1'b1); repeat ($urandom_range(1, 20)) @(negedge clk); end
    drain();
    mode = DDU_FMONLY;
    for (int k = 0; k < 4; k++) begin send_l1a(1'b1); repeat ($urandom_range(1, 8)) @(negedge clk); end
    drain();

    check(n_frames == n_exp && exp_q.size() == 0, "every accepted event sent");
    check(int'(evt_sent) == n_exp, "event counter");
    check(n_full100 == 7 && n_fast100 >= 3, "full frame 100 words, 100 clocks");
    check(n_zs28 >= 3, "zero-suppressed empty frame 28 words");
    check(n_hdr12 == 4 && n_fm4 == 4, "header-only 12 and FM-only 4 words");
    check(wof_seen > 0, "WOF raised");
    $display("frames %0d words %0d", n_frames, n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
