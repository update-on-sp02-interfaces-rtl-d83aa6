// tb_align_fifo: self-checking test of the link alignment FIFO.
//
// Words written before Alignment_FIFO_Read must wait; after it they must
// come out in order, one per clock, with `flowing` high. When the link
// stops the FIFO runs empty (unf). After a reset, writing past the depth
// sets ovf, and nothing is written while signal detect is low. A scoreboard
// queue holds the words written and is compared with every word read.
module tb_align_fifo;
  import sp02_pkg::*;

  localparam int DEPTH = 16;
  logic clk = 1'b0;
  always #12.5 clk = ~clk;

  logic rst, sd, in_valid, align_read, out_valid, flowing, ovf, unf;
  lct_t in_lct, out_lct;

  align_fifo #(.DEPTH(DEPTH)) dut (.*);

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

  lct_t sb[$];
  int   n_out = 0;
  logic sb_on = 1'b1;

  // scoreboard
  always @(negedge clk) begin
    if (!rst && sb_on) begin
      if (out_valid) begin
        n_out++;
        check(sb.size() > 0 && out_lct == sb[0], "word order");
        if (sb.size() > 0) void'(sb.pop_front());
      end else begin
        check(out_lct == '0, "idle output is zero");
      end
      check(flowing == out_valid, "flowing");
    end
  end

  task automatic send(input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_lct   = lct_t'($urandom());
      if (sd) sb.push_back(in_lct);
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    rst = 1'b1; sd = 1'b1; in_valid = 1'b0; in_lct = '0; align_read = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    send(6);
    repeat (5) @(negedge clk);
    check(n_out == 0, "held until Alignment_FIFO_Read");
    fork
      send(40);
      begin
        @(negedge clk);
        align_read = 1'b1;
        @(negedge clk);
        align_read = 1'b0;
      end
    join
    repeat (15) @(negedge clk);
    check(n_out == 46 && sb.size() == 0, "all words delivered");
    check(unf && !ovf, "underflow after the link stopped");
    // overflow and signal detect
    sb_on = 1'b0;
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    sd  = 1'b0;
    send(30);
    check(!ovf, "nothing written without signal detect");
    sd = 1'b1;
    send(DEPTH + 2);
    check(ovf, "overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
