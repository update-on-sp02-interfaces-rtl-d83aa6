// tb_ccb_rx: self-checking test of the CCB receiver.
//
// Random CCB traffic (L1As, commands, data strobes, counter resets, BC0,
// track flags and FPGA DONE levels) is applied for more than one orbit. A
// cycle-level reference model, written from the timing stated in the
// module header (inputs registered once, outputs one clock later), gives
// the expected bunch crossing counter, BC0, L1A number, command decode,
// CFG_DONE and local trigger, compared every clock. The counter must wrap
// from 3563 to 0.
module tb_ccb_rx;
  import sp02_pkg::*;

  logic clk = 1'b0;
  always #12.5 clk = ~clk;

  logic       rst, ccb_cmd_strobe, ccb_evcntres, ccb_bcntres, ccb_bc0_in, ccb_l1accept;
  logic       ccb_data_strobe, sp_cfg_done, valid_track;
  logic [5:0] ccb_cmd, cmd;
  logic [7:0] ccb_data, data, fpga_done;
  logic [3:0] sp_reserved;
  logic [BXN_W-1:0] bxn;
  logic       ccb_bc0, l1a, cmd_valid, data_valid, l1_reset, align_read;
  logic [23:0] l1a_num;

  ccb_rx dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed {
    logic [5:0] cmd; logic cstb; logic evres; logic bcres; logic bc0; logic l1a;
    logic [7:0] data; logic dstb; logic trk; logic done;
  } in_t;

  in_t pin, r;                    // inputs of the last clock, registered copy
  int  m_bxn, m_ev, m_num, n_wrap = 0, n_l1 = 0, n_al = 0;
  logic m_bc0, m_l1a, m_cv, m_dv, m_l1r, m_alr, m_trk, m_done;
  logic [5:0] m_cmd;
  logic [7:0] m_data;

  initial begin
    rst = 1'b1;
    {ccb_cmd, ccb_cmd_strobe, ccb_evcntres, ccb_bcntres, ccb_bc0_in, ccb_l1accept,
     ccb_data, ccb_data_strobe, valid_track} = '0;
    fpga_done = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    pin = '0; r = '0; m_bxn = 0; m_ev = 0; m_num = 0;
    {m_bc0, m_l1a, m_cv, m_dv, m_l1r, m_alr, m_trk, m_done} = '0;
    m_cmd = '0; m_data = '0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // new inputs
      ccb_l1accept    = ($urandom_range(0, 9) == 0);
      ccb_bcntres     = (cyc == 10);
      ccb_bc0_in      = (cyc == 10) || (m_bxn == 3562);
      ccb_evcntres    = (cyc == 700) || (cyc == 1500 && ccb_l1accept);
      ccb_cmd_strobe  = ($urandom_range(0, 19) == 0);
      ccb_cmd         = 6'($urandom_range(0, 7));
      ccb_data_strobe = ($urandom_range(0, 19) == 0);
      ccb_data        = 8'($urandom());
      valid_track     = ($urandom_range(0, 4) == 0);
      fpga_done       = ($urandom_range(0, 3) == 0) ? 8'($urandom()) : 8'hFF;
      pin = '{cmd: ccb_cmd, cstb: ccb_cmd_strobe, evres: ccb_evcntres, bcres: ccb_bcntres,
              bc0: ccb_bc0_in, l1a: ccb_l1accept, data: ccb_data, dstb: ccb_data_strobe,
              trk: valid_track, done: &fpga_done};
      @(negedge clk);
      // model of the clock edge just passed
      m_bxn = r.bcres ? 0 : (m_bxn == 3563 ? 0 : m_bxn + 1);
      if (m_bxn == 0 && !r.bcres) n_wrap++;
      m_bc0 = r.bc0;
      m_l1a = r.l1a;
      if (r.l1a) m_num = r.evres ? 0 : m_ev;
      if (r.evres) m_ev = r.l1a ? 1 : 0;
      else if (r.l1a) m_ev++;
      m_cv = r.cstb; m_dv = r.dstb;
      if (r.cstb) m_cmd = r.cmd;
      if (r.dstb) m_data = r.data;
      m_l1r = r.cstb && r.cmd == 6'h03;
      m_alr = r.cstb && r.cmd == 6'h04;
      m_trk = pin.trk; m_done = pin.done;
      r = pin;
      if (m_l1r) n_l1++;
      if (m_alr) n_al++;
      check(int'(bxn) == m_bxn, "bxn");
      check(ccb_bc0 == m_bc0, "bc0");
      check(ccb_bc0 == (bxn == 0) || cyc < 12, "BC0 lines up with bxn 0");
      check(l1a == m_l1a, "l1a");
      if (l1a) check(int'(l1a_num) == m_num, "l1a number");
      check(cmd_valid == m_cv && data_valid == m_dv, "strobes");
      check(cmd == m_cmd && data == m_data, "cmd/data");
      check(l1_reset == m_l1r && align_read == m_alr, "command decode");
      check(sp_reserved == {3'b000, m_trk}, "local trigger");
      check(sp_cfg_done == m_done, "cfg done");
    end
    check(n_wrap >= 1, "counter wrapped");
    check(n_l1 > 0 && n_al > 0, "commands decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
