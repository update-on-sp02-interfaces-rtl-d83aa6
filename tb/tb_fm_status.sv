// tb_fm_status: self-checking test of the Fast Monitoring signals.
//
// Runs through all combinations of the four readiness conditions, WOF,
// the per-link and Main FPGA OSY flags and signal-detect losses, and
// checks RDY = AND of the conditions, BSY = NOT RDY, WOF and OSY
// pass-through/OR, and ERR sent as RDY = BSY = 1, one clock later.
module tb_fm_status;
  import sp02_pkg::*;

  localparam int NLINK = 4;
  logic clk = 1'b0;
  always #12.5 clk = ~clk;

  logic rst, cfg_done, ready_trig, sync_done, pipe_filled, wof_in, osy_main, err;
  logic [NLINK-1:0] sd, osy_link;
  fm_t fm;

  fm_status #(.NLINK(NLINK)) dut (.*);

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

  int n_rdy = 0, n_err = 0;
  initial begin
    logic e_rdy, e_err;
    rst = 1'b1;
    {cfg_done, ready_trig, sync_done, pipe_filled, wof_in, osy_main} = '0;
    sd = '1; osy_link = '0;
    @(negedge clk);
    check(fm.bsy && !fm.rdy, "busy in reset");
    rst = 1'b0;
    for (int v = 0; v < 1024; v++) begin
      {cfg_done, ready_trig, sync_done, pipe_filled} = v[3:0];
      wof_in   = v[4];
      osy_main = v[5];
      osy_link = (v[6]) ? 4'(1 << (v % 4)) : '0;
      sd       = (v[9:7] == 3'd7) ? ~4'(1 << (v % 4)) : '1;
      @(negedge clk);
      e_rdy = (v[3:0] == 4'hF);
      e_err = (v[9:7] == 3'd7);
      if (e_rdy && !e_err) n_rdy++;
      if (e_err) n_err++;
      check(fm.rdy == (e_rdy || e_err), "RDY");
      check(fm.bsy == (!e_rdy || e_err), "BSY");
      check(fm.wof == v[4], "WOF");
      check(fm.osy == (v[5] || v[6]), "OSY");
      check(err == e_err, "ERR");
    end
    check(n_rdy > 0 && n_err > 0, "ready and error both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
