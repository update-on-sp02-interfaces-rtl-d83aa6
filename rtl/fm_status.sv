// fm_status: the SP's Fast Monitoring (FM) signals.
//
// Four lines are sent (RDY, BSY, WOF, OSY); ERR has no line of its own and
// is sent as RDY = BSY = 1.
//   RDY  AND of the readiness conditions: all FPGAs configured (cfg_done),
//        VME READY trigger set (ready_trig, which is only possible once
//        registers and LUTs are loaded), MPC-SP synchronisation done
//        (sync_done: Alignment_FIFO_Read issued and data flowing) and
//        input data at the output of the L1 pipeline (pipe_filled).
//        Which of them a power-on, hard or L1 reset clears is decided
//        where they are generated.
//   BSY  NOT RDY.
//   WOF  from the DDU readout logic.
//   OSY  OR of the OSY signals of all input links and of osy_main.
//   ERR  an input link lost its optical signal detect (sd).
// Outputs are registered (one clock).
//
// All rules follow the document; registering the outputs is this design's
// own choice.
module fm_status
  import sp02_pkg::*;
#(
  parameter int unsigned NLINK = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cfg_done,
  input  logic             ready_trig,
  input  logic             sync_done,
  input  logic             pipe_filled,
  input  logic [NLINK-1:0] sd,
  input  logic             wof_in,
  input  logic [NLINK-1:0] osy_link,
  input  logic             osy_main,
  output fm_t              fm,
  output logic             err
);

  logic rdy, err_now;
  assign rdy     = cfg_done && ready_trig && sync_done && pipe_filled;
  assign err_now = !(&sd);

  always_ff @(posedge clk) begin
    if (rst) begin
      fm  <= '{rdy: 1'b0, bsy: 1'b1, wof: 1'b0, osy: 1'b0};
      err <= 1'b0;
    end else begin
      fm.rdy <= rdy || err_now;
      fm.bsy <= !rdy || err_now;
      fm.wof <= wof_in;
      fm.osy <= (|osy_link) || osy_main;
      err    <= err_now;
    end
  end

endmodule
