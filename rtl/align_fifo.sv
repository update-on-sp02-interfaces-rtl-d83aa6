// align_fifo: alignment FIFO of one MPC input link.
//
// Each link arrives with its own latency. While the optical receiver
// reports signal detect (sd) and the link delivers words (in_valid), the
// words are written into a small FIFO. Reading starts for all links at the
// same time, on the common Alignment_FIFO_Read pulse, and then proceeds one
// word per bunch crossing, so that all links leave their FIFOs in step.
// After that pulse `flowing` is high as long as words are delivered.
// A FIFO that is written while full drops the word and sets the sticky
// `ovf`; a read from an empty FIFO while running sets the sticky `unf`.
// Both, and the running state, are cleared by rst (power-on, hard reset or
// L1 reset), after which the FIFO waits for the next Alignment_FIFO_Read.
// out_lct is registered and reads as all zero (VP=0) while no word is
// delivered.
//
// The document names the Alignment_FIFO_Read signal and says that data
// start flowing from the Front FPGAs after it. The FIFO structure and its
// depth are this design's own.
module align_fifo
  import sp02_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic sd,          // optical receiver signal detect
  input  logic in_valid,
  input  lct_t in_lct,
  input  logic align_read,  // common Alignment_FIFO_Read pulse
  output logic out_valid,
  output lct_t out_lct,
  output logic flowing,
  output logic ovf,
  output logic unf
);

  localparam int unsigned AW = $clog2(DEPTH);

  lct_t          mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;
  logic          running, do_wr, do_rd, empty, full;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = sd && in_valid && !full;
  assign do_rd = running && !empty;
  assign flowing = out_valid;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= in_lct;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0; running <= 1'b0;
      ovf <= 1'b0; unf <= 1'b0;
      out_valid <= 1'b0; out_lct <= '0;
    end else begin
      if (do_wr) wp <= (32'(wp) == DEPTH-1) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (32'(rp) == DEPTH-1) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (align_read) running <= 1'b1;
      if (sd && in_valid && full) ovf <= 1'b1;
      if (running && empty)        unf <= 1'b1;
      out_valid <= do_rd;
      out_lct   <= do_rd ? mem[rp] : '0;
    end
  end

endmodule
