// l1a_pipeline: pipeline delay buffer that keeps the modified input data
// (and the Muon Sorter output word) of every bunch crossing for readout
// upon L1A.
//
// It is a circular buffer of DEPTH entries written once per bunch crossing
// at wr_ptr, which advances by one every clock. The data of the bunch
// crossing an L1A refers to are found LATENCY entries behind wr_ptr at the
// time the L1A arrives; the readout logic reads them, and the entries that
// follow, through the synchronous read port (rd_data is valid one clock
// after rd_addr). DEPTH - LATENCY entries are the time the readout has to
// fetch an event before it is overwritten.
// `filled` goes high once LATENCY entries holding input data (wr_valid)
// have been written since rst (power-on, hard or L1 reset): input data
// have then reached the output of the L1 pipeline, one of the conditions
// of the RDY signal.
//
// The document says that the modified data are stored in a pipeline delay
// for readout upon L1A and that RDY waits for data at its output. The
// circular-buffer form, DEPTH and LATENCY are this design's own.
module l1a_pipeline #(
  parameter int unsigned W       = 320,
  parameter int unsigned DEPTH   = 1024,
  parameter int unsigned LATENCY = 128
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_valid,
  input  logic [W-1:0]             wr_data,
  output logic [$clog2(DEPTH)-1:0] wr_ptr,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [W-1:0]             rd_data,
  output logic                     filled
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [$clog2(LATENCY+1)-1:0] fill_cnt;

  always_ff @(posedge clk) begin
    mem[wr_ptr] <= wr_data;
    rd_data     <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr   <= '0;
      fill_cnt <= '0;
      filled   <= 1'b0;
    end else begin
      wr_ptr <= wr_ptr + 1'b1;
      if (wr_valid && 32'(fill_cnt) < LATENCY) fill_cnt <= fill_cnt + 1'b1;
      if (wr_valid && 32'(fill_cnt) >= LATENCY - 1) filled <= 1'b1;
    end
  end

  initial begin
    assert (LATENCY < DEPTH && (1 << AW) == DEPTH)
      else $error("l1a_pipeline: DEPTH must be a power of two above LATENCY");
  end

endmodule
