// mpc_sync_check: Front FPGA data validation of one MPC input link.
//
// Every bunch crossing the incoming LCT frame pair is checked against the
// board's bunch crossing counter bxn:
//   - BC0: the BC0 flag in the data and the BC0 from the CCB must both be
//     set exactly when bxn = 0. A mismatch of either sets a sticky flag,
//     and from then on every frame is marked SE=1 (the frame with the
//     mismatch included) until clr.
//   - BX0: the BX0 bit must equal bxn[0]; a mismatch sets SE=1 for that
//     frame.
//   - SE: a frame that arrives with SE=1 keeps it. When se_kill_en (a VME
//     control bit) is set, a frame with SE=1 gets VP=0.
// The modified frame goes to the Main FPGA and to the readout pipeline
// (out_lct). For ME1 links (IS_ME1) the copy sent to the DT track finder
// (dt_lct) also gets quality Q=0 when SE=1, which tells DT that the
// pattern is invalid.
// Every received frame with SE=1 increments a saturating 16-bit counter,
// readable over VME. OSY is raised while the count exceeds osy_thresh.
// Outputs are registered: one clock of latency. clr (power-on, hard or L1
// reset) clears the counter and the sticky BC0 error.
//
// All the checks, the VP and Q handling, the counter and the OSY rule
// follow the document. Counting every SE frame (not only those with
// VP=1), clearing the Q on DT independently of se_kill_en and the counter
// width are this design's own choices.
module mpc_sync_check
  import sp02_pkg::*;
#(
  parameter bit IS_ME1 = 1'b0
) (
  input  logic             clk,
  input  logic             clr,
  input  logic [BXN_W-1:0] bxn,
  input  logic             ccb_bc0,
  input  logic             se_kill_en,
  input  logic [15:0]      osy_thresh,
  input  logic             in_valid,
  input  lct_t             in_lct,
  output logic             out_valid,
  output lct_t             out_lct,
  output lct_t             dt_lct,
  output logic             bc0_err,     // sticky BC0 mismatch
  output logic [15:0]      se_cnt,
  output logic             osy
);

  logic bx_is0, bc0_bad, bx0_bad, se_now;
  lct_t mod_lct, dt_next;

  always_comb begin
    bx_is0  = (bxn == '0);
    bc0_bad = (in_valid && (in_lct.bc0 != bx_is0)) || (ccb_bc0 != bx_is0);
    bx0_bad = in_valid && (in_lct.bx0 != bxn[0]);
    se_now  = in_valid && (in_lct.se || bx0_bad || bc0_bad || bc0_err);
    mod_lct = in_lct;
    mod_lct.se = in_lct.se || se_now;
    if (se_now && se_kill_en) mod_lct.vp = 1'b0;
    dt_next = mod_lct;
    if (IS_ME1 && se_now) dt_next.quality = '0;
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      bc0_err   <= 1'b0;
      se_cnt    <= '0;
      out_valid <= 1'b0;
      out_lct   <= '0;
      dt_lct    <= '0;
    end else begin
      if (bc0_bad) bc0_err <= 1'b1;
      if (se_now && se_cnt != '1) se_cnt <= se_cnt + 1'b1;
      out_valid <= in_valid;
      out_lct   <= in_valid ? mod_lct : '0;
      dt_lct    <= in_valid ? dt_next : '0;
    end
  end

  assign osy = (se_cnt > osy_thresh);

endmodule
