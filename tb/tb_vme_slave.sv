// tb_vme_slave: self-checking test of the A24D16 VME slave.
//
// The testbench plays the VME master and eight chips on the internal bus
// (each a small register array). It checks single-chip writes and read
// back, chip-wide (several chip bits) and board-wide (GA = 0) broadcast
// writes, and that the slave ignores a foreign GA, a wrong address
// modifier and broadcast reads. Write strobes must last one clock and a
// read answer must come within a bounded number of clocks.
module tb_vme_slave;
  import sp02_pkg::*;

  logic clk = 1'b0;
  always #12.5 clk = ~clk;

  logic        rst_n;
  logic [4:0]  ga;
  logic [23:1] vme_a;
  logic [5:0]  vme_am;
  logic        vme_as_n, vme_write_n, vme_d_oe, vme_dtack_n, bus_wr_n;
  logic [1:0]  vme_ds_n;
  logic [15:0] vme_d_in, vme_d_out, bus_wdata, bus_rdata;
  logic [9:0]  bus_addr;
  logic [7:0]  bus_ce_n;

  vme_slave dut (.*);

  // eight chips with 16 registers each
  logic [15:0] chip_reg [8][16];
  int wr_strobes = 0;
  always_ff @(posedge clk) begin
    if (!bus_wr_n) begin
      wr_strobes <= wr_strobes + 1;
      for (int c = 0; c < 8; c++)
        if (!bus_ce_n[c]) chip_reg[c][bus_addr[3:0]] <= bus_wdata;
    end
  end
  always_comb begin
    bus_rdata = 16'hDEAD;
    for (int c = 0; c < 8; c++)
      if (!bus_ce_n[c]) bus_rdata = chip_reg[c][bus_addr[3:0]];
  end

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one VME cycle; acked = 0 when no DTACK came within 40 clocks
  task automatic vme_cycle(input logic [4:0] g, input logic [7:0] chips,
                           input logic [9:0] r, input logic wr, input logic [5:0] am,
                           input logic [15:0] wd, output logic [15:0] rd,
                           output logic acked, output int lat);
    vme_a       = {g, chips, r};
    vme_am      = am;
    vme_write_n = !wr;
    vme_d_in    = wd;
    #5 vme_as_n = 1'b0;
    #5 vme_ds_n = 2'b00;
    acked = 1'b0;
    rd    = '0;
    lat   = 0;
    for (int k = 0; k < 40; k++) begin
      @(posedge clk);
      #1;
      lat++;
      if (!vme_dtack_n) begin
        acked = 1'b1;
        rd    = vme_d_out;
        if (!wr) check(vme_d_oe, "data driven on read");
        break;
      end
    end
    vme_ds_n = 2'b11;
    vme_as_n = 1'b1;
    repeat (6) @(posedge clk);
    check(vme_dtack_n && !vme_d_oe, "DTACK released");
  endtask

  logic [15:0] rd;
  logic        ack;
  int          lat;

  initial begin
    rst_n = 1'b0; ga = 5'd7; vme_a = '0; vme_am = 6'h39; vme_as_n = 1'b1;
    vme_ds_n = 2'b11; vme_write_n = 1'b1; vme_d_in = '0;
    for (int c = 0; c < 8; c++) for (int r = 0; r < 16; r++) chip_reg[c][r] = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // plain write and read back, all accepted AMs
    vme_cycle(5'd7, 8'b0000_1000, 10'd5, 1'b1, 6'h3D, 16'h1234, rd, ack, lat);
    check(ack, "write acked");
    check(chip_reg[3][5] == 16'h1234, "write landed in chip 3");
    check(chip_reg[2][5] == 16'h0 && chip_reg[4][5] == 16'h0, "other chips untouched");
    vme_cycle(5'd7, 8'b0000_1000, 10'd5, 1'b0, 6'h39, 16'h0, rd, ack, lat);
    check(ack && rd == 16'h1234, "read back");
    check(lat <= 8, "read latency");
    foreach (chip_reg[c]) begin
      logic [5:0] ams [6] = '{6'h39, 6'h3A, 6'h3B, 6'h3D, 6'h3E, 6'h3F};
      logic [15:0] v;
      v = 16'(c * 257 + 1);
      vme_cycle(5'd7, 8'(1 << c), 10'd9, 1'b1, ams[c % 6], v, rd, ack, lat);
      vme_cycle(5'd7, 8'(1 << c), 10'd9, 1'b0, ams[(c + 1) % 6], 16'h0, rd, ack, lat);
      check(ack && rd == v, "per-chip read back");
    end

    // chip-wide broadcast: chips 0, 2 and 7
    vme_cycle(5'd7, 8'b1000_0101, 10'd1, 1'b1, 6'h39, 16'hA5A5, rd, ack, lat);
    check(ack, "chip broadcast acked");
    check(chip_reg[0][1] == 16'hA5A5 && chip_reg[2][1] == 16'hA5A5 &&
          chip_reg[7][1] == 16'hA5A5 && chip_reg[1][1] == 16'h0, "chip broadcast");
    // board-wide broadcast to all chips
    vme_cycle(5'd0, 8'hFF, 10'd2, 1'b1, 6'h39, 16'h5A5A, rd, ack, lat);
    check(ack, "board broadcast acked");
    for (int c = 0; c < 8; c++) check(chip_reg[c][2] == 16'h5A5A, "board broadcast");

    // cycles that must be ignored
    vme_cycle(5'd6, 8'b0000_0001, 10'd3, 1'b1, 6'h39, 16'hFFFF, rd, ack, lat);
    check(!ack && chip_reg[0][3] == 16'h0, "foreign GA ignored");
    vme_cycle(5'd7, 8'b0000_0001, 10'd3, 1'b1, 6'h09, 16'hFFFF, rd, ack, lat);
    check(!ack && chip_reg[0][3] == 16'h0, "A32 AM ignored");
    vme_cycle(5'd0, 8'b0000_0001, 10'd1, 1'b0, 6'h39, 16'h0, rd, ack, lat);
    check(!ack, "broadcast read ignored");
    vme_cycle(5'd7, 8'b0000_0011, 10'd1, 1'b0, 6'h39, 16'h0, rd, ack, lat);
    check(!ack, "multi-chip read ignored");

    check(wr_strobes == 11, "one write strobe per write cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
