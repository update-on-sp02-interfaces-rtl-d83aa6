// ccb_rx: receiver for the Clock and Control Board (CCB) backplane signals.
//
// All CCB inputs are registered once in the 40 MHz domain (the backplane
// receivers deliver them active high). From them the block keeps
//   - the bunch crossing counter bxn, 0..3563, cleared by CCB_BCNTRES,
//   - the L1A event counter l1a_num, cleared by CCB_EVCNTRES, and a
//     one-clock l1a pulse carrying the number of that L1A,
//   - ccb_bc0, the CCB's BC0 aligned with the cycle in which bxn should
//     read 0, for the BC0 checks of the input links,
//   - cmd / data words captured on CCB_CMD_STROBE / CCB_DATA_STROBE, with
//     two decoded commands, L1 reset and Alignment_FIFO_Read,
//   - SP_CFG_DONE as the AND of the FPGA DONE signals,
//   - the local-mode SP trigger: one 25 ns (one clock) pulse on
//     SP_RESERVED[0] for each bunch crossing in which the track finder
//     reports a valid track (wire-ORed with the other SPs on the bus).
// Timing: a strobe registered in cycle n gives its outputs in cycle n+1.
// bcntres seen in cycle n makes bxn = 0 in cycle n+1; ccb_bc0 is delayed so
// that a BC0 sent in the same clock as BCNTRES lines up with bxn = 0.
//
// The signal list, the 25 ns strobes and the local trigger follow the
// document. The command codes, the active-high polarity, the CFG_DONE
// AND and the use of CCB_CLOCK40_ENABLE (not used here) are this design's
// own choices.
module ccb_rx
  import sp02_pkg::*;
#(
  parameter int unsigned NFPGA          = 8,
  parameter logic [5:0]  CMD_L1RESET    = 6'h03,
  parameter logic [5:0]  CMD_ALIGN_READ = 6'h04
) (
  input  logic             clk,
  input  logic             rst,
  // CCB fast control bus
  input  logic [5:0]       ccb_cmd,
  input  logic             ccb_cmd_strobe,
  input  logic             ccb_evcntres,
  input  logic             ccb_bcntres,
  input  logic             ccb_bc0_in,
  input  logic             ccb_l1accept,
  input  logic [7:0]       ccb_data,
  input  logic             ccb_data_strobe,
  // reload bus
  input  logic [NFPGA-1:0] fpga_done,
  output logic             sp_cfg_done,
  // local mode
  input  logic             valid_track,
  output logic [3:0]       sp_reserved,
  // decoded outputs
  output logic [BXN_W-1:0] bxn,
  output logic             ccb_bc0,
  output logic             l1a,
  output logic [23:0]      l1a_num,
  output logic [5:0]       cmd,
  output logic             cmd_valid,
  output logic [7:0]       data,
  output logic             data_valid,
  output logic             l1_reset,
  output logic             align_read
);

  logic [5:0] cmd_r;
  logic       cmd_stb_r, evres_r, bcres_r, bc0_r, l1a_r, data_stb_r;
  logic [7:0] data_r;
  logic [23:0] evcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd_r <= '0; cmd_stb_r <= 1'b0; evres_r <= 1'b0; bcres_r <= 1'b0;
      bc0_r <= 1'b0; l1a_r <= 1'b0; data_r <= '0; data_stb_r <= 1'b0;
    end else begin
      cmd_r      <= ccb_cmd;
      cmd_stb_r  <= ccb_cmd_strobe;
      evres_r    <= ccb_evcntres;
      bcres_r    <= ccb_bcntres;
      bc0_r      <= ccb_bc0_in;
      l1a_r      <= ccb_l1accept;
      data_r     <= ccb_data;
      data_stb_r <= ccb_data_strobe;
    end
  end

  // bunch crossing counter
  always_ff @(posedge clk) begin
    if (rst || bcres_r)                      bxn <= '0;
    else if (bxn == BXN_W'(BX_PER_ORBIT-1))  bxn <= '0;
    else                                     bxn <= bxn + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) ccb_bc0 <= 1'b0;
    else     ccb_bc0 <= bc0_r;
  end

  // L1A counter: l1a_num is the number of the L1A being reported
  always_ff @(posedge clk) begin
    if (rst) begin
      evcnt   <= '0;
      l1a     <= 1'b0;
      l1a_num <= '0;
    end else begin
      l1a <= l1a_r;
      if (l1a_r) l1a_num <= evres_r ? 24'd0 : evcnt;
      if (evres_r)   evcnt <= l1a_r ? 24'd1 : 24'd0;
      else if (l1a_r) evcnt <= evcnt + 1'b1;
    end
  end

  // command and data strobes
  always_ff @(posedge clk) begin
    if (rst) begin
      cmd <= '0; cmd_valid <= 1'b0; data <= '0; data_valid <= 1'b0;
      l1_reset <= 1'b0; align_read <= 1'b0;
    end else begin
      cmd_valid  <= cmd_stb_r;
      data_valid <= data_stb_r;
      if (cmd_stb_r)  cmd  <= cmd_r;
      if (data_stb_r) data <= data_r;
      l1_reset   <= cmd_stb_r && cmd_r == CMD_L1RESET;
      align_read <= cmd_stb_r && cmd_r == CMD_ALIGN_READ;
    end
  end

  // reload bus and local trigger
  always_ff @(posedge clk) begin
    if (rst) begin
      sp_cfg_done <= 1'b0;
      sp_reserved <= '0;
    end else begin
      sp_cfg_done <= &fpga_done;
      sp_reserved <= {3'b000, valid_track};
    end
  end

endmodule
