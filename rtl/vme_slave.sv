// vme_slave: A24D16 VME slave that turns VME cycles into cycles on the
// board's internal register bus.
//
// VME address decoding:
//   A[23:19]  geographic address of the board (compared with GA[4:0])
//   A[18:11]  chip code, one bit per chip (8 chips)
//   A[10:1]   register number inside the chip
// Address modifiers 0x39, 0x3A, 0x3B, 0x3D, 0x3E and 0x3F are accepted.
// Because the chip code has one bit per chip, a write whose chip code has
// several bits set goes to all of those chips at once (chip-wide
// broadcast). A write with the address field A[23:19] equal to BCAST_GA is
// taken by every board in the crate (board-wide broadcast). Broadcasts
// are write-only: a read is only answered for this board's own GA and a
// chip code with exactly one bit set. Cycles that do not decode are not
// answered (no DTACK).
//
// The VME strobes are asynchronous; they are brought into the 40 MHz clock
// domain with two flip-flops. Address, data and WRITE* are stable while
// DS* is asserted, so they are sampled directly once the synchronised
// strobes show a data strobe. Only D16 (both DS0* and DS1* low) transfers
// are served.
//
// Internal bus (active low chip enables, as on the board): for a write,
// bus_ce_n has the selected chips low and bus_wr_n low for one clock with
// bus_addr and bus_wdata valid. For a read, bus_ce_n has one chip low and
// bus_wr_n high for RD_WAIT clocks; bus_rdata is sampled at the end of the
// last one. DTACK* is then held low until the master releases DS*.
// The VME data bus is split into vme_d_in, vme_d_out and vme_d_oe; the
// pad makes it bidirectional.
//
// The document gives the address map, the AM list, the bus widths and that
// broadcasts exist. The broadcast encoding (chip mask, BCAST_GA), the D16-
// only restriction and the bus timing are this design's own choices.
module vme_slave
  import sp02_pkg::*;
#(
  parameter logic [4:0] BCAST_GA = 5'd0,  // no VME64x slot has GA 0
  parameter int unsigned RD_WAIT = 2      // clocks a read keeps CE* low
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ga,          // this board's geographic address
  // VME side
  input  logic [23:1] vme_a,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  // internal register bus
  output logic [9:0]  bus_addr,
  output logic [15:0] bus_wdata,
  output logic        bus_wr_n,
  output logic [7:0]  bus_ce_n,
  input  logic [15:0] bus_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_READ, S_ACK} state_e;
  state_e state;

  // strobe synchronisers
  logic [1:0] as_sync, ds0_sync, ds1_sync;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      as_sync  <= '0;
      ds0_sync <= '0;
      ds1_sync <= '0;
    end else begin
      as_sync  <= {as_sync[0],  ~vme_as_n};
      ds0_sync <= {ds0_sync[0], ~vme_ds_n[0]};
      ds1_sync <= {ds1_sync[0], ~vme_ds_n[1]};
    end
  end

  logic as_on, ds_both, ds_any;
  assign as_on   = as_sync[1];
  assign ds_both = ds0_sync[1] & ds1_sync[1];
  assign ds_any  = ds0_sync[1] | ds1_sync[1];

  // address decode
  logic [4:0] a_ga;
  logic [7:0] a_chip;
  logic       is_write, own_board, bcast_board, am_ok, chip_one, hit;
  assign a_ga        = vme_a[23:19];
  assign a_chip      = vme_a[18:11];
  assign is_write    = ~vme_write_n;
  assign am_ok       = am_is_a24(vme_am);
  assign own_board   = (a_ga == ga);
  assign bcast_board = (a_ga == BCAST_GA) && is_write;
  assign chip_one    = (a_chip != 8'd0) && ((a_chip & (a_chip - 8'd1)) == 8'd0);
  assign hit = as_on && ds_both && am_ok && (a_chip != '0) &&
               (is_write ? (own_board || bcast_board) : (own_board && chip_one));

  logic [$clog2(RD_WAIT+1)-1:0] wait_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      bus_ce_n    <= '1;
      bus_wr_n    <= 1'b1;
      bus_addr    <= '0;
      bus_wdata   <= '0;
      vme_d_out   <= '0;
      vme_d_oe    <= 1'b0;
      vme_dtack_n <= 1'b1;
      wait_cnt    <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (hit) begin
            bus_addr <= vme_a[10:1];
            bus_ce_n <= ~a_chip;
            if (is_write) begin
              bus_wdata <= vme_d_in;
              bus_wr_n  <= 1'b0;
              state     <= S_WRITE;
            end else begin
              bus_wr_n  <= 1'b1;
              wait_cnt  <= '0;
              state     <= S_READ;
            end
          end
        end
        S_WRITE: begin
          bus_ce_n    <= '1;
          bus_wr_n    <= 1'b1;
          vme_dtack_n <= 1'b0;
          state       <= S_ACK;
        end
        S_READ: begin
          if (32'(wait_cnt) == RD_WAIT - 1) begin
            vme_d_out   <= bus_rdata;
            vme_d_oe    <= 1'b1;
            bus_ce_n    <= '1;
            vme_dtack_n <= 1'b0;
            state       <= S_ACK;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        S_ACK: begin
          if (!ds_any) begin
            vme_dtack_n <= 1'b1;
            vme_d_oe    <= 1'b0;
            state       <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a write strobe lasts exactly one clock
  a_wr_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                               !bus_wr_n |=> bus_wr_n);
  // reads select exactly one chip
  a_rd_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                                (bus_wr_n && bus_ce_n != '1) |-> $onehot(~bus_ce_n));

endmodule
