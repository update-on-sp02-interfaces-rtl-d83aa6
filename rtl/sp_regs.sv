// sp_regs: VME-accessible control and status registers of the SP02
// interface logic, one chip on the internal register bus.
//
// The chip answers when its chip enable (ce_n) is low. A write takes
// effect in the clock where ce_n and wr_n are both low; read data are
// registered, so bus_rdata is valid one clock after ce_n goes low and stays
// valid while it is held.
//
// Register map (register number = VME A[10:1]):
//   0x000 CTRL        rw  [0] se_kill_en: SE=1 forces VP=0
//                         [1] ready_trig: VME-controlled READY trigger
//                         [3:2] ddu_mode (sp02_pkg::ddu_mode_e)
//   0x001 OSY_THRESH  rw  synch error count above which a link raises OSY
//   0x002 CMD         w   [0] L1 reset, [1] Alignment_FIFO_Read
//                         (one-clock pulses, nothing is stored)
//   0x003 STATUS      r   [3:0] FM lines {rdy,bsy,wof,osy}, [4] cfg_done,
//                         [5] sync_done, [6] pipe_filled,
//                         [7] DDU event queue overflow (sticky)
//   0x010+i SE_CNT[i] r   synch error counter of input link i
// Unmapped registers read as zero. A hard reset clears CTRL and
// OSY_THRESH, so the READY trigger must be set again afterwards.
//
// The document says that a VME control bit enables the VP clearing, that
// READY needs a VME-controlled trigger and that the synch error counters
// are readable over VME. The addresses and bit positions are this
// design's own.
module sp_regs
  import sp02_pkg::*;
#(
  parameter int unsigned NLINK = 8
) (
  input  logic              clk,
  input  logic              rst,        // power-on or hard reset
  input  logic              ce_n,
  input  logic              wr_n,
  input  logic [9:0]        addr,
  input  logic [15:0]       wdata,
  output logic [15:0]       rdata,
  // control outputs
  output logic              se_kill_en,
  output logic              ready_trig,
  output ddu_mode_e         ddu_mode,
  output logic [15:0]       osy_thresh,
  output logic              cmd_l1_reset,
  output logic              cmd_align_read,
  // status inputs
  input  fm_t               fm,
  input  logic              cfg_done,
  input  logic              sync_done,
  input  logic              pipe_filled,
  input  logic              evt_ovf,
  input  logic [NLINK-1:0][15:0] se_cnt
);

  localparam logic [9:0] A_CTRL = 10'h000, A_OSY = 10'h001,
                         A_CMD = 10'h002, A_STATUS = 10'h003,
                         A_SECNT = 10'h010;

  logic wr;
  assign wr = !ce_n && !wr_n;

  always_ff @(posedge clk) begin
    if (rst) begin
      se_kill_en <= 1'b1;
      ready_trig <= 1'b0;
      ddu_mode   <= DDU_FULL;
      osy_thresh <= 16'd255;
    end else if (wr && addr == A_CTRL) begin
      se_kill_en <= wdata[0];
      ready_trig <= wdata[1];
      ddu_mode   <= ddu_mode_e'(wdata[3:2]);
    end else if (wr && addr == A_OSY) begin
      osy_thresh <= wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd_l1_reset   <= 1'b0;
      cmd_align_read <= 1'b0;
    end else begin
      cmd_l1_reset   <= wr && addr == A_CMD && wdata[0];
      cmd_align_read <= wr && addr == A_CMD && wdata[1];
    end
  end

  logic [15:0] rd_next;
  always_comb begin
    rd_next = '0;
    if (addr == A_CTRL)        rd_next = {12'd0, ddu_mode, ready_trig, se_kill_en};
    else if (addr == A_OSY)    rd_next = osy_thresh;
    else if (addr == A_STATUS) rd_next = {8'd0, evt_ovf, pipe_filled, sync_done, cfg_done, fm};
    else begin
      for (int i = 0; i < NLINK; i++)
        if (addr == A_SECNT + 10'(i)) rd_next = se_cnt[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst)        rdata <= '0;
    else if (!ce_n) rdata <= rd_next;
  end

endmodule
