// tb_ddu_rate: DDU readout at the nominal 100 kHz L1A rate, in all four
// readout modes, with the board at its default parameters.
//
// After the usual start-up (BCNTRES, L1 reset, VME setup,
// Alignment_FIFO_Read, links on, RDY), the testbench sends 60 L1As in each
// mode. The gaps between L1As are drawn uniformly from 1..799 clocks, so
// the mean rate is one per 400 clocks of 25 ns, i.e. 100 kHz.
//
// For zero suppression, the links carry sparse data. In a random 1 of 30
// crossings, two links of each input block send VP=1 and all others send
// VP=0. A 5-crossing window then holds such a crossing in about 1 event
// out of 6. That event's blocks are 8 words each instead of 4, for an
// average frame of about 29 words.
//
// Checks:
//   - each frame's length from its mode and the recorded VP bits
//     (100, 28 + 2 x valid LCTs, 12, 4);
//   - the event number;
//   - no lost events and no queue overflow in the header;
//   - WOF never raised, RDY held throughout;
//   - the formatter never idles while an event waits: each frame ends at
//     most its length + 12 clocks after the later of its L1A and the
//     previous frame's end (in ZS mode also one clock per suppressed LCT);
//   - the payload rate in words per second, compared with 10e6, 2.9e6,
//     1.2e6 and 0.4e6 words/s to within 20 %.
// The DDU is always ready.
module tb_ddu_rate;
  import sp02_pkg::*;

  localparam int NLINK = 8, LATENCY = 128, ORBIT = 3564, NEVT = 60;

  logic clk80 = 1'b0, clk = 1'b0;
  always #6.25 clk80 = ~clk80;
  always @(posedge clk80) clk <= ~clk;

  logic        rst_n;
  logic [4:0]  ga;
  logic [23:1] vme_a;
  logic [5:0]  vme_am;
  logic        vme_as_n, vme_write_n, vme_d_oe, vme_dtack_n;
  logic [1:0]  vme_ds_n;
  logic [15:0] vme_d_in, vme_d_out;
  logic [9:0]  ext_addr;
  logic [15:0] ext_wdata;
  logic        ext_wr_n;
  logic [7:0]  ext_ce_n;
  logic [7:1][15:0] ext_rdata;
  logic [5:0]  ccb_cmd;
  logic        ccb_cmd_strobe, ccb_evcntres, ccb_bcntres, ccb_bc0, ccb_l1accept;
  logic [7:0]  ccb_data, fpga_done;
  logic        ccb_data_strobe, sp_hard_reset, sp_cfg_done;
  logic [3:0]  sp_reserved;
  logic [NLINK-1:0] link_sd, link_valid, main_valid;
  lct_t [NLINK-1:0] link_lct, main_lct;
  muon_t [NMUON-1:0] trk_mu;
  logic        trk_valid, osy_main;
  lct_t [1:0]  dt_lct;
  logic [15:0] ddu_data;
  logic        ddu_valid, ddu_ready, ddu_sof, ddu_eof;
  fm_t         fm;
  logic [31:0] ms_frame;
  logic        ms_first;

  sp02_top dut (.*);

  assign ext_rdata = '0;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int   c0 = -1;
  logic rec_vp [8192][NLINK];
  logic links_on = 1'b0;
  logic sparse = 1'b0;

  function automatic int bx_of(input int n);
    return ((n - c0) % ORBIT + ORBIT) % ORBIT;
  endfunction

  // links: correctly stamped LCTs; dense (VP random) or sparse
  always @(negedge clk) begin
    int n;
    logic hit;
    n = cyc + 1;
    ccb_bc0 = (c0 >= 0) && (n >= c0) && (bx_of(n) == 0);
    hit = ($urandom_range(0, 29) == 0);
    if (links_on) begin
      for (int i = 0; i < NLINK; i++) begin
        lct_t l;
        l = lct_t'($urandom());
        l.vp  = sparse ? (hit && (i % 4) < 2) : l.vp;
        l.bc0 = (bx_of(n) == 0);
        l.bx0 = bx_of(n) % 2 == 1;
        l.se  = 1'b0;
        link_lct[i] = l;
        rec_vp[n % 8192][i] = l.vp;
      end
    end
    link_valid = {NLINK{links_on}};
  end

  task automatic vme_write(input logic [9:0] r, input logic [15:0] wd);
    vme_a = {5'd7, 8'h01, r};
    vme_am = 6'h39;
    vme_write_n = 1'b0;
    vme_d_in = wd;
    #3 vme_as_n = 1'b0;
    #3 vme_ds_n = 2'b00;
    for (int k = 0; k < 40 && vme_dtack_n; k++) @(posedge clk);
    #1;
    check(!vme_dtack_n, "VME DTACK");
    vme_ds_n = 2'b11;
    vme_as_n = 1'b1;
    repeat (4) @(posedge clk);
    @(negedge clk);
  endtask

  task automatic ccb_command(input logic [5:0] c);
    @(negedge clk);
    ccb_cmd = c;
    ccb_cmd_strobe = 1'b1;
    @(negedge clk);
    ccb_cmd_strobe = 1'b0;
  endtask

  // ---------------- L1As and the DDU receiver ----------------
  int        l1a_cyc[$];
  int        n_l1a = 0;
  ddu_mode_e cur_mode = DDU_FULL;
  logic [15:0] fw[$];
  int n_frames = 0, words = 0, bad_len = 0, max_wait = 0, prev_eof = 0;

  always @(posedge clk) begin
    if (rst_n && ddu_valid && ddu_ready) begin
      fw.push_back(ddu_data);
      if (ddu_eof) begin
        int a, nv, len, start;
        check(l1a_cyc.size() > 0, "frame for an L1A");
        if (l1a_cyc.size() > 0) begin
          a = l1a_cyc.pop_front();
          nv = 0;
          for (int e = 0; e < 5; e++)
            for (int l = 0; l < NLINK; l++) nv += rec_vp[(a - LATENCY - 1 + e) % 8192][l];
          len = (cur_mode == DDU_FULL) ? 100 : (cur_mode == DDU_ZS) ? 28 + 2*nv :
                (cur_mode == DDU_HDR) ? 12 : 4;
          check(fw.size() == len, "frame length");
          if (fw.size() != len) bad_len++;
          check(fw[0][11:0] == 12'(n_frames), "event number in SOF");
          if (cur_mode == DDU_FULL || cur_mode == DDU_HDR)
            check(fw[5][1:0] == 2'b00, "no lost event, no queue overflow");
          // the formatter starts as soon as it is free: at most the frame
          // length plus 12 clocks (plus one per suppressed LCT in ZS mode)
          // after the later of its L1A and the last EOF
          start = (a > prev_eof) ? a : prev_eof;
          if (cur_mode == DDU_ZS) len += 2*4*5 - nv;
          if (cyc - start - len > max_wait) max_wait = cyc - start - len;
          check(cyc - start <= len + 12, "formatter never idles while an event waits");
        end
        n_frames++;
        prev_eof = cyc;
        words += fw.size();
        fw.delete();
      end
    end
  end

  int n_wof = 0, n_notrdy = 0;
  logic measuring = 1'b0;
  always @(posedge clk) if (measuring) begin
    if (fm.wof) n_wof++;
    if (!fm.rdy || fm.bsy) n_notrdy++;
  end

  task automatic run_mode(input ddu_mode_e m, input real doc_rate, input string name);
    int t0, w0, f0, t1;
    real rate;
    vme_write(10'h000, {12'd0, 2'(m), 2'b11});
    cur_mode = m;
    sparse = (m == DDU_ZS);
    repeat (LATENCY + 10) @(negedge clk);
    t0 = cyc; w0 = words; f0 = n_frames;
    measuring = 1'b1;
    for (int k = 0; k < NEVT; k++) begin
      repeat ($urandom_range(1, 799) - 1) @(negedge clk);
      ccb_l1accept = 1'b1;
      l1a_cyc.push_back(cyc + 1);
      n_l1a++;
      @(negedge clk);
      ccb_l1accept = 1'b0;
    end
    while (l1a_cyc.size() > 0 && cyc - t0 < 60000) @(negedge clk);
    t1 = cyc;
    measuring = 1'b0;
    check(n_frames - f0 == NEVT, "one frame per L1A");
    // words per second: t1 - t0 clocks of 25 ns
    rate = real'(words - w0) / (real'(t1 - t0) * 25.0e-9);
    $display("%s: %0d frames, %0d words, %0d clocks, %0.3g words/s (document %0.3g), most overhead clocks %0d",
             name, n_frames - f0, words - w0, t1 - t0, rate, doc_rate, max_wait);
    check(rate > 0.8 * doc_rate && rate < 1.2 * doc_rate, "payload rate near the nominal one");
  endtask

  initial begin
    rst_n = 1'b0; ga = 5'd7; vme_a = '0; vme_am = '0; vme_as_n = 1'b1; vme_ds_n = 2'b11;
    vme_write_n = 1'b1; vme_d_in = '0;
    ccb_cmd = '0; ccb_cmd_strobe = 0; ccb_evcntres = 0; ccb_bcntres = 0; ccb_l1accept = 0;
    ccb_data = '0; ccb_data_strobe = 0; sp_hard_reset = 0; fpga_done = 8'hFF;
    link_sd = '1; link_lct = '0; trk_mu = '0; trk_valid = 0; osy_main = 0;
    ddu_ready = 1'b1;
    repeat (5) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    c0 = cyc + 1;
    ccb_bcntres = 1'b1;
    @(negedge clk);
    ccb_bcntres = 1'b0;
    repeat (3) @(negedge clk);
    ccb_command(6'h03);                    // L1 reset
    vme_write(10'h000, 16'b0011);          // VP clearing, READY trigger, full mode
    ccb_command(6'h04);                    // Alignment_FIFO_Read
    repeat (3) @(negedge clk);
    links_on = 1'b1;
    while (!fm.rdy && cyc < 1000) @(negedge clk);
    check(fm.rdy && !fm.bsy, "RDY before the run");

    run_mode(DDU_FULL,   10.0e6, "full event");
    run_mode(DDU_ZS,      2.9e6, "zero suppressed");
    run_mode(DDU_HDR,     1.2e6, "header only");
    run_mode(DDU_FMONLY,  0.4e6, "FM only");

    $display("frames %0d, wrong lengths %0d, WOF clocks %0d, not-ready clocks %0d",
             n_frames, bad_len, n_wof, n_notrdy);
    check(n_frames == 4 * NEVT, "all frames received");
    check(n_wof == 0, "no WOF at 100 kHz");
    check(n_notrdy == 0, "RDY held at 100 kHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
