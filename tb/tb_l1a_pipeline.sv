// tb_l1a_pipeline: self-checking test of the L1A pipeline delay buffer.
//
// Every clock a word derived from a clock counter is written. The test
// reads back, at random times, the entry LATENCY behind the write pointer
// and entries further back (still inside DEPTH), and checks they hold the
// word written that many clocks before. `filled` must rise exactly LATENCY
// clocks after reset and fall again on reset.
module tb_l1a_pipeline;
  localparam int W = 48, DEPTH = 64, LATENCY = 40, AW = 6;

  logic clk = 1'b0;
  always #12.5 clk = ~clk;

  logic          rst, filled, wr_valid;
  logic [W-1:0]  wr_data, rd_data;
  logic [AW-1:0] wr_ptr, rd_addr;

  l1a_pipeline #(.W(W), .DEPTH(DEPTH), .LATENCY(LATENCY)) dut (.*);

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

  function automatic logic [W-1:0] pattern(input int t);
    return {16'(t), 32'(t * 32'h9E3779B1)};
  endfunction

  int t, fill_at, age;
  initial begin
    rst = 1'b1; wr_valid = 1'b0; wr_data = '0; rd_addr = '0; t = 0; fill_at = -1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    // entries without input data do not count towards `filled`
    repeat (LATENCY + 5) @(negedge clk);
    check(!filled, "no fill without input data");
    wr_valid = 1'b1;
    for (int cyc = 0; cyc < 600; cyc++) begin
      // write the word of clock t, ask for an older one
      wr_data = pattern(t);
      age     = (t > DEPTH) ? $urandom_range(LATENCY, DEPTH - 2) : 0;
      rd_addr = wr_ptr - AW'(age);
      @(negedge clk);
      if (age > 0) check(rd_data == pattern(t - age), "delayed data");
      if (filled && fill_at < 0) fill_at = cyc;
      check(int'(wr_ptr) == (t + LATENCY + 6) % DEPTH, "write pointer");
      t++;
    end
    check(fill_at == LATENCY - 1, "filled after LATENCY writes");
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check(!filled, "reset clears filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
