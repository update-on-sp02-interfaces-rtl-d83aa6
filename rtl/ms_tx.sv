// ms_tx: output to the Muon Sorter, two 32-bit frames at 80 MHz per bunch
// crossing.
//
// Per crossing the SP sends three muons (phi 5, eta 5, rank 7, valid
// charge, halo, charge: 20 bits each) and four per-SP bits (BX0, BC0, SE,
// spare), 64 bits in all. The rank, and the valid-charge bit that comes
// with it from the same LUT, are produced later than the rest, so the
// frames are split as
//   frame 1: {phi0, phi1, phi2, eta0, eta1, eta2, bx0, bc0}
//   frame 2: {rank0, rank1, rank2, vc0, vc1, vc2, halo0, halo1, halo2,
//             ch0, ch1, ch2, se, spare}
// Inputs are in the 40 MHz domain and held for a whole crossing. clk80 is
// the 80 MHz clock with its rising edges on those of clk (both from the
// same PLL). A toggle flop in the clk domain marks each new crossing; at
// the clk80 edge half a crossing later frame 1 is sent, at the next edge
// (the start of the following crossing, still sampling the held inputs)
// frame 2. ms_first is high while frame 1 is on the wires.
//
// The field list and the two 32-bit frames at 80 MHz follow the document.
// The assignment of bits to frames was left open there; the one above is
// this design's own, with rank in the second frame.
module ms_tx
  import sp02_pkg::*;
(
  input  logic              clk,
  input  logic              clk80,
  input  logic              rst,
  input  muon_t [NMUON-1:0] mu,
  input  logic              bx0,
  input  logic              bc0,
  input  logic              se,
  output logic [31:0]       ms_frame,
  output logic              ms_first
);

  logic tgl, tgl_d;

  always_ff @(posedge clk) begin
    if (rst) tgl <= 1'b0;
    else     tgl <= ~tgl;
  end

  logic [31:0] f1, f2;
  assign f1 = {mu[0].phi, mu[1].phi, mu[2].phi,
               mu[0].eta, mu[1].eta, mu[2].eta, bx0, bc0};
  assign f2 = {mu[0].rank, mu[1].rank, mu[2].rank,
               mu[0].vc, mu[1].vc, mu[2].vc,
               mu[0].halo, mu[1].halo, mu[2].halo,
               mu[0].charge, mu[1].charge, mu[2].charge, se, 1'b0};

  always_ff @(posedge clk80) begin
    if (rst) begin
      tgl_d    <= 1'b0;
      ms_frame <= '0;
      ms_first <= 1'b0;
    end else begin
      tgl_d    <= tgl;
      ms_first <= (tgl != tgl_d);
      ms_frame <= (tgl != tgl_d) ? f1 : f2;
    end
  end

endmodule
