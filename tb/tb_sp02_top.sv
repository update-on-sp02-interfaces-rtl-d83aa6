// tb_sp02_top: end-to-end test of the SP02 interface logic at its default
// parameters.
//
// The testbench plays the VME master, the CCB, eight MPC links, the Main
// FPGA's track outputs and the DDU, and runs the board through one
// complete operation:
//   1. power-on reset, BCNTRES/BC0 from the CCB, register setup over VME
//      (including a chip-wide broadcast write to chips 1..7),
//      Alignment_FIFO_Read from the CCB, then the links start sending LCTs
//      stamped with the correct BC0/BX0; RDY must rise only once the
//      pipeline has filled;
//   2. L1As in full mode: every frame is 100 words, its header carries the
//      right BXN and its input blocks carry exactly the LCTs that entered
//      the board LATENCY+1 clocks before the L1A;
//   3. zero-suppressed, header-only and FM-only frames (28 + 2 x valid
//      LCTs, 12 and 4 words), switched over VME;
//   4. an L1A burst while the DDU is stalled: WOF;
//   5. local-mode SP triggers and Muon Sorter frames;
//   6. BX0 errors on an ME1 link (SE set, VP cleared, Q=0 towards DT, the
//      synch error counter read over VME, OSY), a BC0 error on another
//      link (sticky SE), a lost signal detect (ERR = RDY and BSY);
//   7. an L1 reset from the CCB (RDY drops, counters clear) and a hard
//      reset (READY trigger cleared).
// Each mechanism is counted, and one that never happened is a failure.
module tb_sp02_top;
  import sp02_pkg::*;

  localparam int NLINK = 8, LATENCY = 128, ORBIT = 3564;

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

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- cycle counter and records ----------------
  int cyc = 0;                   // rising edges of clk so far
  always @(posedge clk) cyc <= cyc + 1;

  int   c0 = -1;                 // cycle of the BCNTRES input
  lct_t rec [8192][NLINK];       // LCTs sent, by input cycle
  logic links_on = 1'b0;
  int   inj_bx0 = 0;             // BX0 errors still to inject on link 0
  logic inj_bc0 = 1'b0;          // one BC0 error on link 3
  int   vp_pct = 50;

  function automatic int bx_of(input int n);
    return ((n - c0) % ORBIT + ORBIT) % ORBIT;
  endfunction

  // links and the CCB BC0, driven between rising edges
  always @(negedge clk) begin
    int n;
    n = cyc + 1;                 // index of the cycle being driven
    ccb_bc0 = (c0 >= 0) && (n >= c0) && (bx_of(n) == 0);
    if (links_on) begin
      for (int i = 0; i < NLINK; i++) begin
        lct_t l;
        l = lct_t'($urandom());
        l.vp  = ($urandom_range(0, 99) < vp_pct);
        l.bc0 = (bx_of(n) == 0);
        l.bx0 = bx_of(n) % 2 == 1;
        l.se  = 1'b0;
        if (i == 0 && inj_bx0 > 0) begin
          l.bx0 = ~l.bx0;
          inj_bx0--;
        end
        if (i == 3 && inj_bc0) begin
          l.bc0 = ~l.bc0;
          inj_bc0 = 1'b0;
        end
        link_lct[i] = l;
        rec[n % 8192][i] = l;
      end
    end
    link_valid = {NLINK{links_on}};
  end

  // ---------------- chips 1..7 on the register bus ----------------
  int n_bcast = 0;
  always @(posedge clk) begin
    if (!ext_wr_n && ext_ce_n == 8'h01 && ext_wdata == 16'hBEEF) n_bcast++;
  end
  always_comb for (int c = 1; c < 8; c++) ext_rdata[c] = 16'hC000 + 16'(c);

  // ---------------- VME master ----------------
  task automatic vme(input logic [7:0] chips, input logic [9:0] r, input logic wr,
                     input logic [15:0] wd, output logic [15:0] rd, input logic [4:0] g = 5'd7);
    logic acked;
    vme_a = {g, chips, r};
    vme_am = 6'h39;
    vme_write_n = !wr;
    vme_d_in = wd;
    #3 vme_as_n = 1'b0;
    #3 vme_ds_n = 2'b00;
    acked = 1'b0;
    rd = '0;
    for (int k = 0; k < 40 && !acked; k++) begin
      @(posedge clk);
      #1;
      if (!vme_dtack_n) begin acked = 1'b1; rd = vme_d_out; end
    end
    check(acked, "VME DTACK");
    vme_ds_n = 2'b11;
    vme_as_n = 1'b1;
    repeat (4) @(posedge clk);
    @(negedge clk);
  endtask

  // ---------------- CCB ----------------
  task automatic ccb_command(input logic [5:0] c);
    @(negedge clk);
    ccb_cmd = c;
    ccb_cmd_strobe = 1'b1;
    @(negedge clk);
    ccb_cmd_strobe = 1'b0;
  endtask

  // expected frames: input cycle of the L1A and the mode
  int        l1a_cyc[$], l1a_no[$];
  ddu_mode_e l1a_mode[$];
  int        n_l1a = 0, n_l1a_dropped_ok = 0;
  task automatic send_l1a(input ddu_mode_e m);
    @(negedge clk);
    ccb_l1accept = 1'b1;
    l1a_cyc.push_back(cyc + 1);
    l1a_mode.push_back(m);
    l1a_no.push_back(n_l1a);
    n_l1a++;
    @(negedge clk);
    ccb_l1accept = 1'b0;
  endtask

  // ---------------- DDU receiver ----------------
  logic [15:0] fw[$];
  int n_frames = 0, n_full = 0, n_zs = 0, n_hdr = 0, n_fmo = 0, n_content = 0;
  always @(posedge clk) begin
    if (rst_n && ddu_valid && ddu_ready) begin
      fw.push_back(ddu_data);
      if (ddu_eof) begin
        int a, nv, len, no;
        ddu_mode_e m;
        n_frames++;
        check(l1a_cyc.size() > 0, "frame for an L1A");
        if (l1a_cyc.size() > 0) begin
          a = l1a_cyc.pop_front();
          m = l1a_mode.pop_front();
          no = l1a_no.pop_front();
          nv = 0;
          for (int e = 0; e < 5; e++)
            for (int l = 0; l < NLINK; l++) nv += rec[(a - LATENCY - 1 + e) % 8192][l].vp;
          len = (m == DDU_FULL) ? 100 : (m == DDU_ZS) ? 28 + 2*nv : (m == DDU_HDR) ? 12 : 4;
          check(fw.size() == len, "frame length");
          if (fw.size() != len) $display("  len %0d exp %0d mode %0d", fw.size(), len, m);
          check(fw[0][11:0] == 12'(no), "event number in SOF");
          if (m == DDU_FULL) n_full++;
          if (m == DDU_ZS)   n_zs++;
          if (m == DDU_HDR)  n_hdr++;
          if (m == DDU_FMONLY) n_fmo++;
          if (m == DDU_FULL || m == DDU_HDR)
            check(fw[4][11:0] == 12'(bx_of(a)), "BXN in header");
          if (m == DDU_FULL && fw.size() == 100) begin
            logic ok;
            ok = 1'b1;
            for (int b = 0; b < 2; b++)
              for (int j = 0; j < 20; j++) begin
                lct_t s;
                s = rec[(a - LATENCY - 1 + j / 4) % 8192][b*4 + j % 4];
                if (fw[18 + 40*b + 2*j]     != {1'b0, s.quality, s.clct_pat, s.wg} ||
                    fw[18 + 40*b + 2*j + 1] != {1'b0, s.vp, s.csc_id, s.se, s.lr, s.hs})
                  ok = 1'b0;
              end
            check(ok, "input block contents");
            if (!ok) for (int d = -3; d <= 3; d++) begin
              lct_t s;
              s = rec[(a - LATENCY - 1 + d) % 8192][0];
              if (fw[18] == {1'b0, s.quality, s.clct_pat, s.wg}) $display("  offset %0d", d);
            end
            n_content++;
          end
        end
        fw.delete();
      end
    end
  end

  // ---------------- monitors ----------------
  int n_trig = 0, n_ms1 = 0, n_ms_ok = 0, n_kill = 0, n_dtq0 = 0, n_se_main = 0;
  int n_wof = 0, n_osy = 0, n_err = 0, n_rdy = 0, n_ms_se = 0;
  always @(posedge clk) begin
    if (rst_n && sp_reserved[0]) n_trig++;
    if (fm.wof) n_wof++;
    if (fm.osy) n_osy++;
    if (fm.rdy && fm.bsy) n_err++;
    if (fm.rdy && !fm.bsy) n_rdy++;
    if (main_valid[0] && main_lct[0].se) begin
      n_se_main++;
      if (!main_lct[0].vp) n_kill++;
      if (dt_lct[0].quality == 4'd0) n_dtq0++;
    end
  end
  always @(posedge clk80) begin
    if (ms_first) begin
      n_ms1++;
      if (ms_frame[31:17] == {trk_mu[0].phi, trk_mu[1].phi, trk_mu[2].phi}) n_ms_ok++;
      if (ms_frame[0] == 1'b1) ; // BC0 bit
    end else if (rst_n && ms_frame[1]) n_ms_se++;
  end

  task automatic wait_frames();
    int guard = 0;
    while (l1a_cyc.size() > 0 && guard < 3000) begin
      @(negedge clk);
      guard++;
    end
    check(l1a_cyc.size() == 0, "all frames received");
  endtask

  logic [15:0] rd;
  int t_rdy;
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
    // 1. bunch counter reset and BC0
    repeat (10) @(negedge clk);
    c0 = cyc + 1;
    ccb_bcntres = 1'b1;
    @(negedge clk);
    ccb_bcntres = 1'b0;
    // the free-running counter before BCNTRES left BC0 errors: resynchronise
    repeat (3) @(negedge clk);
    ccb_command(6'h03);
    // registers: VP clearing on, READY trigger on, full mode; OSY threshold 10
    vme(8'h01, 10'h001, 1'b1, 16'd10, rd);
    vme(8'h01, 10'h000, 1'b1, 16'b0011, rd);
    vme(8'h01, 10'h000, 1'b0, 16'h0, rd);
    check(rd == 16'b0011, "CTRL read back");
    vme(8'hFE, 10'h005, 1'b1, 16'hBEEF, rd);
    check(n_bcast == 1, "broadcast write to chips 1..7");
    vme(8'h04, 10'h005, 1'b0, 16'h0, rd);
    check(rd == 16'hC002, "read from chip 2");
    check(sp_cfg_done, "CFG_DONE");
    ccb_command(6'h04);          // Alignment_FIFO_Read
    repeat (3) @(negedge clk);
    check(fm.bsy && !fm.rdy, "busy before data flow");
    links_on = 1'b1;
    t_rdy = cyc;
    while (!fm.rdy && cyc - t_rdy < 400) @(negedge clk);
    check(fm.rdy && !fm.bsy, "RDY after synchronisation");
    check(cyc - t_rdy >= LATENCY, "RDY waits for the pipeline");
    vme(8'h01, 10'h003, 1'b0, 16'h0, rd);
    check(rd[6:4] == 3'b111 && rd[3:0] == 4'b1000, "STATUS");
    // 2. full events
    repeat (20) @(negedge clk);
    for (int k = 0; k < 5; k++) begin send_l1a(DDU_FULL); repeat ($urandom_range(20, 150)) @(negedge clk); end
    wait_frames();
    // 3. other modes
    vme(8'h01, 10'h000, 1'b1, 16'b0111, rd);   // ZS
    vp_pct = 5;
    repeat (LATENCY + 10) @(negedge clk);
    for (int k = 0; k < 4; k++) begin send_l1a(DDU_ZS); repeat ($urandom_range(10, 60)) @(negedge clk); end
    wait_frames();
    vp_pct = 50;
    vme(8'h01, 10'h000, 1'b1, 16'b1011, rd);   // header only
    for (int k = 0; k < 3; k++) begin send_l1a(DDU_HDR); repeat (20) @(negedge clk); end
    wait_frames();
    vme(8'h01, 10'h000, 1'b1, 16'b1111, rd);   // FM only
    for (int k = 0; k < 3; k++) begin send_l1a(DDU_FMONLY); repeat (8) @(negedge clk); end
    wait_frames();
    // 4. stalled DDU and an L1A burst (12 fit in queue and formatter)
    vme(8'h01, 10'h000, 1'b1, 16'b0011, rd);   // full
    @(negedge clk);
    ddu_ready = 1'b0;
    for (int k = 0; k < 10; k++) send_l1a(DDU_FULL);
    // one in the formatter and EVT_DEPTH = 8 queued: the tenth is dropped
    void'(l1a_cyc.pop_back());
    void'(l1a_mode.pop_back());
    void'(l1a_no.pop_back());
    repeat (10) @(negedge clk);
    check(fm.wof, "WOF with a stalled DDU");
    vme(8'h01, 10'h003, 1'b0, 16'h0, rd);
    check(rd[7], "queue overflow flagged");
    ddu_ready = 1'b1;
    wait_frames();
    repeat (5) @(negedge clk);
    check(!fm.wof, "WOF released");
    // 5. local trigger and Muon Sorter frames
    for (int k = 0; k < 6; k++) begin
      @(negedge clk);
      trk_mu = {20'($urandom()), 20'($urandom()), 20'($urandom())};
      trk_valid = (k % 2 == 0);
      @(negedge clk);
      trk_valid = 1'b0;
      repeat (3) @(negedge clk);
    end
    trk_valid = 1'b0;
    // 6. BX0 errors on link 0 (ME1), OSY, counters over VME
    inj_bx0 = 12;
    repeat (20) @(negedge clk);
    vme(8'h01, 10'h010, 1'b0, 16'h0, rd);
    check(rd == 16'd12, "synch error counter over VME");
    vme(8'h01, 10'h011, 1'b0, 16'h0, rd);
    check(rd == 16'd0, "clean link has no synch errors");
    check(fm.osy, "OSY above threshold");
    // BC0 error on link 3: all later frames of that link are SE
    inj_bc0 = 1'b1;
    repeat (10) @(negedge clk);
    check(main_lct[3].se && !main_lct[3].vp, "sticky SE after BC0 error");
    // lost signal detect: ERR
    link_sd[5] = 1'b0;
    repeat (4) @(negedge clk);
    check(fm.rdy && fm.bsy, "ERR as RDY=BSY=1");
    link_sd[5] = 1'b1;
    repeat (4) @(negedge clk);
    // run past the end of the orbit: BC0 checks keep passing on good links
    while (cyc < c0 + ORBIT + 50) @(negedge clk);
    check(main_lct[1].se == 1'b0, "no synch error across the orbit boundary");
    // 7. L1 reset from the CCB; the links pause while the board resynchronises
    links_on = 1'b0;
    ccb_command(6'h03);
    repeat (4) @(negedge clk);
    check(!fm.rdy && fm.bsy, "RDY drops on L1 reset");
    vme(8'h01, 10'h010, 1'b0, 16'h0, rd);
    check(rd == 16'd0, "counters cleared by L1 reset");
    check(!fm.osy, "OSY cleared");
    ccb_command(6'h04);
    repeat (3) @(negedge clk);
    links_on = 1'b1;
    t_rdy = cyc;
    while (!fm.rdy && cyc - t_rdy < 400) @(negedge clk);
    check(fm.rdy && !fm.bsy && cyc - t_rdy >= LATENCY, "RDY again after resynchronisation");
    send_l1a(DDU_FULL);
    wait_frames();
    // hard reset
    @(negedge clk);
    sp_hard_reset = 1'b1;
    repeat (12) @(negedge clk);
    sp_hard_reset = 1'b0;
    repeat (3) @(negedge clk);
    check(!fm.rdy, "not ready after hard reset");
    vme(8'h01, 10'h000, 1'b0, 16'h0, rd);
    check(rd[1] == 1'b0, "READY trigger cleared by hard reset");

    $display("frames %0d (full %0d, zs %0d, hdr %0d, fm %0d), contents %0d", n_frames,
             n_full, n_zs, n_hdr, n_fmo, n_content);
    $display("triggers %0d, MS frames %0d ok %0d, SE frames %0d killed %0d dtQ0 %0d",
             n_trig, n_ms1, n_ms_ok, n_se_main, n_kill, n_dtq0);
    $display("wof %0d osy %0d err %0d rdy %0d ms_se %0d bcast %0d", n_wof, n_osy, n_err,
             n_rdy, n_ms_se, n_bcast);
    check(n_full == 15 && n_zs == 4 && n_hdr == 3 && n_fmo == 3, "frames per mode");
    check(n_content == 15, "full frames checked");
    check(n_trig == 3, "local trigger: one 25 ns pulse per track");
    check(n_ms_ok > 0 && n_ms1 > 1000, "Muon Sorter frames");
    check(n_se_main == 12 && n_kill > 0 && n_dtq0 == 12, "SE marking, VP clearing, DT Q=0");
    check(n_wof > 0 && n_osy > 0 && n_err > 0 && n_rdy > 0, "FM states");
    check(n_ms_se > 0, "SE towards the Muon Sorter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
