// tb_mpc_sync_check: self-checking test of the Front FPGA link validation.
//
// A bunch crossing counter in the testbench runs across an orbit boundary.
// Random LCT frames are sent with correct BC0/BX0 most of the time; some
// frames get a wrong BX0 or arrive with SE=1, and near the end one wrong
// BC0 makes every later frame SE=1. A reference model computes the
// expected Main FPGA and DT frames, the synch error count and OSY, which
// are compared with the outputs one clock later. The VP clearing is
// switched off for one stretch to check its enable. The test also checks
// that clr empties the counter and the sticky error.
module tb_mpc_sync_check;
  import sp02_pkg::*;

  logic clk = 1'b0;
  always #12.5 clk = ~clk;

  logic             clr, ccb_bc0, se_kill_en, in_valid;
  logic [BXN_W-1:0] bxn;
  logic [15:0]      osy_thresh;
  lct_t             in_lct, out_lct, dt_lct;
  logic             out_valid, bc0_err, osy;
  logic [15:0]      se_cnt;

  mpc_sync_check #(.IS_ME1(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  int n_bx0 = 0, n_se_in = 0, n_kill = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference state
  logic        m_sticky;
  int          m_cnt;
  lct_t        e_out, e_dt;
  logic        e_valid;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic bc0bad, se;
    clr = 1'b1; ccb_bc0 = 1'b0; se_kill_en = 1'b1; in_valid = 1'b0;
    in_lct = '0; osy_thresh = 16'd20; bxn = 12'd3550;
    m_sticky = 1'b0; m_cnt = 0; e_valid = 1'b0; e_out = '0; e_dt = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    clr = 1'b0;
    for (int cyc = 0; cyc < 600; cyc++) begin
      // drive the frame of this crossing
      in_valid = ($urandom_range(0, 9) != 0);
      in_lct   = lct_t'($urandom());
      in_lct.bc0 = (bxn == 0);
      in_lct.bx0 = bxn[0];
      in_lct.se  = 1'b0;
      if ($urandom_range(0, 15) == 0) begin in_lct.bx0 = ~bxn[0]; n_bx0++; end
      if ($urandom_range(0, 15) == 0) begin in_lct.se = 1'b1; n_se_in++; end
      if (cyc == 500) in_lct.bc0 = ~in_lct.bc0;     // one BC0 mismatch
      ccb_bc0    = (bxn == 0);
      se_kill_en = !(cyc >= 200 && cyc < 260);
      // reference model
      bc0bad = (in_valid && (in_lct.bc0 != (bxn == 0))) || (ccb_bc0 != (bxn == 0));
      se     = in_valid && (in_lct.se || (in_lct.bx0 != bxn[0]) || bc0bad || m_sticky);
      e_valid = in_valid;
      e_out   = in_valid ? in_lct : '0;
      if (in_valid) begin
        e_out.se = in_lct.se | se;
        if (se && se_kill_en) begin
          if (in_lct.vp) n_kill++;
          e_out.vp = 1'b0;
        end
      end
      e_dt = e_out;
      if (se) e_dt.quality = 4'd0;
      if (bc0bad) m_sticky = 1'b1;
      if (se && m_cnt < 65535) m_cnt++;
      @(negedge clk);
      check(out_valid == e_valid, "out_valid");
      check(out_lct == e_out, "main lct");
      check(dt_lct == e_dt, "dt lct");
      check(int'(se_cnt) == m_cnt, "se counter");
      check(osy == (m_cnt > 20), "osy");
      check(bc0_err == m_sticky, "sticky bc0");
      bxn = (bxn == 12'(BX_PER_ORBIT - 1)) ? '0 : bxn + 1'b1;
    end
    // after the BC0 mismatch every frame is marked
    check(m_sticky && bc0_err, "bc0 error seen");
    check(n_bx0 > 0 && n_se_in > 0 && n_kill > 0, "all error kinds exercised");
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(se_cnt == 0 && !bc0_err && !osy, "clear");
    $display("bx0 errors %0d, SE inputs %0d, VP cleared %0d", n_bx0, n_se_in, n_kill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
