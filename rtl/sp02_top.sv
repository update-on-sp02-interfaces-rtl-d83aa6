// sp02_top: interface logic of the SP02 Sector Processor board.
//
// Data path: each of the NLINK MPC input links passes an alignment FIFO
// (align_fifo) and the Front FPGA data validation (mpc_sync_check). The
// validated LCTs go to the Main FPGA (main_lct, a port: the track finder
// is not part of this design), to the DT track finder for the ME1 links
// (dt_lct) and, together with the Muon Sorter word built from the Main
// FPGA's tracks, into the L1A pipeline (l1a_pipeline). On each L1A from
// the CCB the DDU formatter reads the event from the pipeline and sends it
// to the DDU. The Main FPGA's three muons leave through ms_tx as two
// 32-bit frames per crossing at 80 MHz.
// Control: the CCB receiver (ccb_rx) provides the bunch crossing counter,
// L1A numbers, BC0, commands and the local-mode SP trigger; the VME slave
// (vme_slave) reaches the board's eight chips over the internal register
// bus. Chip 0 is this logic's register file (sp_regs); chips 1..7 (the
// Main FPGA and the other FPGAs, with their LUTs) are brought out as
// ports. fm_status drives the four Fast Monitoring lines.
// Resets: rst_n is the power-on reset; SP_HARD_RESET acts like it; an L1
// reset (CCB command or VME) re-runs the synchronisation: it clears the
// alignment FIFOs, the synch error counters, the pipeline fill state and
// the readout queue, so RDY drops until Alignment_FIFO_Read is issued again
// and the pipeline has filled.
// Clocks: clk is the 40 MHz LHC clock, clk80 the 80 MHz clock for the
// Muon Sorter link, edge-aligned with clk.
//
// Outputs of the blocks that this top leaves unconnected, and lint reports
// as unused:
//   - the CCB's raw command and data words (only the L1 reset and
//     Alignment_FIFO_Read commands act on this logic);
//   - the alignment FIFOs' overflow and underflow flags (diagnostics with
//     no register assigned yet);
//   - the event-sent count (the WOF decision is made inside the
//     formatter);
//   - the separate ERR flag (ERR already reaches the FM lines as
//     RDY=BSY=1);
//   - the DT copies of the non-ME1 links.
//
// Everything carried by the document is wired as it describes; the link
// count, the ME1 link positions and the chip number of the register file
// are this design's own.
module sp02_top
  import sp02_pkg::*;
#(
  parameter int unsigned LPB        = 4,    // links per DDU input block
  parameter int unsigned ME1_LINKS  = 2,    // links 0..ME1_LINKS-1 are ME1
  parameter int unsigned WINDOW     = 5,
  parameter int unsigned DEPTH      = 1024,
  parameter int unsigned LATENCY    = 128,
  parameter int unsigned ALIGN_DEPTH = 16,
  parameter int unsigned EVT_DEPTH  = 8,
  parameter int unsigned WOF_THRESH = 6,
  localparam int unsigned NLINK = 2 * LPB,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              clk80,
  input  logic              rst_n,
  // VME (P1/J1)
  input  logic [4:0]        ga,
  input  logic [23:1]       vme_a,
  input  logic [5:0]        vme_am,
  input  logic              vme_as_n,
  input  logic [1:0]        vme_ds_n,
  input  logic              vme_write_n,
  input  logic [15:0]       vme_d_in,
  output logic [15:0]       vme_d_out,
  output logic              vme_d_oe,
  output logic              vme_dtack_n,
  // internal register bus towards chips 1..7
  output logic [9:0]        ext_addr,
  output logic [15:0]       ext_wdata,
  output logic              ext_wr_n,
  output logic [7:0]        ext_ce_n,
  input  logic [7:1][15:0]  ext_rdata,
  // CCB
  input  logic [5:0]        ccb_cmd,
  input  logic              ccb_cmd_strobe,
  input  logic              ccb_evcntres,
  input  logic              ccb_bcntres,
  input  logic              ccb_bc0,
  input  logic              ccb_l1accept,
  input  logic [7:0]        ccb_data,
  input  logic              ccb_data_strobe,
  input  logic              sp_hard_reset,
  input  logic [7:0]        fpga_done,
  output logic              sp_cfg_done,
  output logic [3:0]        sp_reserved,
  // MPC optical links
  input  logic [NLINK-1:0]  link_sd,
  input  logic [NLINK-1:0]  link_valid,
  input  lct_t [NLINK-1:0]  link_lct,
  // Main FPGA (track finder)
  output logic [NLINK-1:0]  main_valid,
  output lct_t [NLINK-1:0]  main_lct,
  input  muon_t [NMUON-1:0] trk_mu,
  input  logic              trk_valid,
  input  logic              osy_main,
  // DT track finder (ME1 links)
  output lct_t [ME1_LINKS-1:0] dt_lct,
  // DDU readout
  output logic [15:0]       ddu_data,
  output logic              ddu_valid,
  input  logic              ddu_ready,
  output logic              ddu_sof,
  output logic              ddu_eof,
  // Fast Monitoring (RJ45)
  output fm_t               fm,
  // Muon Sorter
  output logic [31:0]       ms_frame,
  output logic              ms_first
);

  // ---------------- resets ----------------
  logic hard_r, sys_rst, l1_rst;
  logic ccb_l1_reset, vme_l1_reset, ccb_align, vme_align;
  always_ff @(posedge clk) begin
    if (!rst_n) hard_r <= 1'b0;
    else        hard_r <= sp_hard_reset;
  end
  assign sys_rst = !rst_n || hard_r;
  assign l1_rst  = sys_rst || ccb_l1_reset || vme_l1_reset;

  // ---------------- VME and registers ----------------
  logic [15:0] bus_rdata, regs_rdata;
  logic        se_kill_en, ready_trig;
  ddu_mode_e   ddu_mode;
  logic [15:0] osy_thresh;
  logic [NLINK-1:0][15:0] se_cnt;
  logic        sync_done, pipe_filled, evt_ovf;

  vme_slave u_vme (
    .clk, .rst_n, .ga,
    .vme_a, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n,
    .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack_n,
    .bus_addr(ext_addr), .bus_wdata(ext_wdata), .bus_wr_n(ext_wr_n),
    .bus_ce_n(ext_ce_n), .bus_rdata(bus_rdata)
  );

  always_comb begin
    bus_rdata = regs_rdata;
    for (int c = 1; c < 8; c++)
      if (!ext_ce_n[c]) bus_rdata = ext_rdata[c];
  end

  sp_regs #(.NLINK(NLINK)) u_regs (
    .clk, .rst(sys_rst),
    .ce_n(ext_ce_n[0]), .wr_n(ext_wr_n), .addr(ext_addr), .wdata(ext_wdata),
    .rdata(regs_rdata),
    .se_kill_en, .ready_trig, .ddu_mode, .osy_thresh,
    .cmd_l1_reset(vme_l1_reset), .cmd_align_read(vme_align),
    .fm, .cfg_done(sp_cfg_done), .sync_done, .pipe_filled, .evt_ovf, .se_cnt
  );

  // ---------------- CCB ----------------
  logic [BXN_W-1:0] bxn;
  logic             bc0_al, l1a;
  logic [23:0]      l1a_num;
  logic [5:0]       cmd;
  logic             cmd_valid, data_valid;
  logic [7:0]       data;

  ccb_rx #(.NFPGA(8)) u_ccb (
    .clk, .rst(sys_rst),
    .ccb_cmd, .ccb_cmd_strobe, .ccb_evcntres, .ccb_bcntres,
    .ccb_bc0_in(ccb_bc0), .ccb_l1accept, .ccb_data, .ccb_data_strobe,
    .fpga_done, .sp_cfg_done,
    .valid_track(trk_valid), .sp_reserved,
    .bxn, .ccb_bc0(bc0_al), .l1a, .l1a_num,
    .cmd, .cmd_valid, .data, .data_valid,
    .l1_reset(ccb_l1_reset), .align_read(ccb_align)
  );

  // ---------------- input links ----------------
  logic [NLINK-1:0] al_valid, flowing, osy_link, bc0_err;
  lct_t [NLINK-1:0] al_lct, dt_all;

  for (genvar i = 0; i < NLINK; i++) begin : g_link
    logic ovf, unf;
    align_fifo #(.DEPTH(ALIGN_DEPTH)) u_align (
      .clk, .rst(l1_rst), .sd(link_sd[i]), .in_valid(link_valid[i]),
      .in_lct(link_lct[i]), .align_read(ccb_align || vme_align),
      .out_valid(al_valid[i]), .out_lct(al_lct[i]), .flowing(flowing[i]),
      .ovf, .unf
    );
    mpc_sync_check #(.IS_ME1(i < ME1_LINKS)) u_sync (
      .clk, .clr(l1_rst), .bxn, .ccb_bc0(bc0_al), .se_kill_en, .osy_thresh,
      .in_valid(al_valid[i]), .in_lct(al_lct[i]),
      .out_valid(main_valid[i]), .out_lct(main_lct[i]), .dt_lct(dt_all[i]),
      .bc0_err(bc0_err[i]), .se_cnt(se_cnt[i]), .osy(osy_link[i])
    );
  end

  assign dt_lct    = dt_all[ME1_LINKS-1:0];
  assign sync_done = &flowing;

  // ---------------- Muon Sorter ----------------
  logic ms_bx0, ms_bc0, ms_se;
  assign ms_bx0 = bxn[0];
  assign ms_bc0 = (bxn == '0);
  assign ms_se  = |bc0_err;

  ms_tx u_ms (
    .clk, .clk80, .rst(sys_rst), .mu(trk_mu),
    .bx0(ms_bx0), .bc0(ms_bc0), .se(ms_se), .ms_frame, .ms_first
  );

  // ---------------- L1A pipeline and DDU ----------------
  localparam int unsigned PW = NLINK*32 + 64;
  logic [PW-1:0] pipe_wr, pipe_rd;
  logic [AW-1:0] wr_ptr, rd_addr;
  logic          wof;
  logic [15:0]   evt_sent;

  assign pipe_wr = {trk_mu[0], trk_mu[1], trk_mu[2], ms_bx0, ms_bc0, ms_se, 1'b0,
                    main_lct};

  l1a_pipeline #(.W(PW), .DEPTH(DEPTH), .LATENCY(LATENCY)) u_pipe (
    .clk, .rst(l1_rst), .wr_valid(|main_valid), .wr_data(pipe_wr), .wr_ptr, .rd_addr,
    .rd_data(pipe_rd), .filled(pipe_filled)
  );

  ddu_formatter #(.LPB(LPB), .WINDOW(WINDOW), .DEPTH(DEPTH), .LATENCY(LATENCY),
                  .EVT_DEPTH(EVT_DEPTH), .WOF_THRESH(WOF_THRESH)) u_ddu (
    .clk, .rst(l1_rst), .l1a, .l1a_num, .bxn, .mode(ddu_mode), .fm, .ga,
    .wr_ptr, .rd_addr, .rd_data(pipe_rd),
    .ddu_data, .ddu_valid, .ddu_ready, .ddu_sof, .ddu_eof,
    .wof, .evt_ovf, .evt_sent
  );

  // ---------------- Fast Monitoring ----------------
  logic fm_err;
  fm_status #(.NLINK(NLINK)) u_fm (
    .clk, .rst(sys_rst), .cfg_done(sp_cfg_done), .ready_trig,
    .sync_done, .pipe_filled, .sd(link_sd), .wof_in(wof),
    .osy_link, .osy_main, .fm, .err(fm_err)
  );

endmodule
