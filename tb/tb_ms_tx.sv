// tb_ms_tx: self-checking test of the Muon Sorter output.
//
// clk80 runs at 80 MHz and clk is derived from it, so their rising edges
// coincide. New random muons and BX0/BC0/SE are applied shortly after
// every rising edge of clk. After each clk80 edge the output must carry
// frame 1 (phi, eta, BX0, BC0) or frame 2 (rank, valid charge, halo,
// charge, SE, spare) of the crossing's inputs, alternating, two frames per
// crossing.
module tb_ms_tx;
  import sp02_pkg::*;

  logic clk80 = 1'b0, clk = 1'b0;
  always #6.25 clk80 = ~clk80;
  always @(posedge clk80) clk <= ~clk;

  logic rst, bx0, bc0, se, ms_first;
  muon_t [NMUON-1:0] mu;
  logic [31:0] ms_frame;

  ms_tx dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] e1, e2;
  always_comb begin
    e1 = {mu[0].phi, mu[1].phi, mu[2].phi, mu[0].eta, mu[1].eta, mu[2].eta, bx0, bc0};
    e2 = {mu[0].rank, mu[1].rank, mu[2].rank, mu[0].vc, mu[1].vc, mu[2].vc,
          mu[0].halo, mu[1].halo, mu[2].halo, mu[0].charge, mu[1].charge,
          mu[2].charge, se, 1'b0};
  end

  int n1 = 0, n2 = 0;
  logic prev_first = 1'b0, running = 1'b0;
  always @(posedge clk80) begin
    #1;
    if (running) begin
      if (n1 + n2 > 0) check(ms_first != prev_first, "frames alternate");
      if (ms_first) begin n1++; check(ms_frame == e1, "frame 1"); end
      else          begin n2++; check(ms_frame == e2, "frame 2"); end
      prev_first = ms_first;
    end
  end

  initial begin
    rst = 1'b1; mu = '0; bx0 = 0; bc0 = 0; se = 0;
    repeat (3) @(posedge clk);
    #2 rst = 1'b0;
    @(posedge clk);
    #3;
    mu = {3{20'hFFFFF}};
    bx0 = 1'b1; bc0 = 1'b1; se = 1'b1;
    @(posedge clk80);
    #3 running = 1'b1;
    for (int k = 0; k < 400; k++) begin
      @(posedge clk);
      #3;
      if (k > 0) begin
        mu  = {NMUON{20'h0}} | {20'($urandom()), 20'($urandom()), 20'($urandom())};
        bx0 = 1'($urandom()); bc0 = 1'($urandom()); se = 1'($urandom());
      end
    end
    check(n1 >= 399 && n2 >= 399, "two frames per crossing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
