// tb_sp_regs: self-checking test of the control/status register file.
//
// Drives the internal bus the way the VME slave does (one-clock write
// strobes, reads with chip enable held for two clocks) and checks each
// register: CTRL fields and their outputs, OSY_THRESH, the command pulses,
// STATUS and the synch error counters, reset values and that a write with
// the chip enable high is ignored. It then runs 300 random reads and writes
// against a model of the writable registers. Meanwhile the status inputs
// and counters change at random. The command pulses must be one clock
// each, and writes to read-only registers must have no effect.
module tb_sp_regs;
  import sp02_pkg::*;

  localparam int NLINK = 8;
  logic clk = 1'b0;
  always #12.5 clk = ~clk;

  logic        rst, ce_n, wr_n, se_kill_en, ready_trig, cmd_l1_reset, cmd_align_read;
  logic [9:0]  addr;
  logic [15:0] wdata, rdata, osy_thresh;
  ddu_mode_e   ddu_mode;
  fm_t         fm;
  logic        cfg_done, sync_done, pipe_filled, evt_ovf;
  logic [NLINK-1:0][15:0] se_cnt;

  sp_regs #(.NLINK(NLINK)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_l1 = 0, n_al = 0;
  always @(negedge clk) begin
    if (cmd_l1_reset) n_l1++;
    if (cmd_align_read) n_al++;
  end

  task automatic bus_write(input logic [9:0] a, input logic [15:0] d, input logic sel = 1'b1);
    @(negedge clk);
    addr = a; wdata = d; ce_n = !sel; wr_n = 1'b0;
    @(negedge clk);
    ce_n = 1'b1; wr_n = 1'b1;
  endtask

  task automatic bus_read(input logic [9:0] a, output logic [15:0] d);
    @(negedge clk);
    addr = a; ce_n = 1'b0; wr_n = 1'b1;
    @(negedge clk);
    @(negedge clk);
    d = rdata;
    ce_n = 1'b1;
  endtask

  logic [15:0] d;
  initial begin
    rst = 1'b1; ce_n = 1'b1; wr_n = 1'b1; addr = '0; wdata = '0;
    fm = '{rdy: 1'b1, bsy: 1'b0, wof: 1'b1, osy: 1'b0};
    cfg_done = 1'b1; sync_done = 1'b0; pipe_filled = 1'b1; evt_ovf = 1'b1;
    for (int i = 0; i < NLINK; i++) se_cnt[i] = 16'(100 * i + 7);
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(se_kill_en && !ready_trig && ddu_mode == DDU_FULL && osy_thresh == 16'd255,
          "reset values");
    bus_write(10'h000, 16'b0110);          // kill off, trig on, mode ZS
    check(!se_kill_en && ready_trig && ddu_mode == DDU_ZS, "CTRL outputs");
    bus_read(10'h000, d);
    check(d == 16'b0110, "CTRL read back");
    bus_write(10'h001, 16'd1234);
    check(osy_thresh == 16'd1234, "OSY threshold");
    bus_read(10'h001, d);
    check(d == 16'd1234, "OSY read back");
    bus_write(10'h001, 16'd99, 1'b0);      // chip not selected
    check(osy_thresh == 16'd1234, "write needs chip enable");
    bus_write(10'h002, 16'b01);
    bus_write(10'h002, 16'b10);
    bus_write(10'h002, 16'b11);
    repeat (2) @(negedge clk);
    check(n_l1 == 2 && n_al == 2, "command pulses");
    bus_read(10'h003, d);
    check(d == 16'b1101_1010, "STATUS");
    for (int i = 0; i < NLINK; i++) begin
      bus_read(10'h010 + 10'(i), d);
      check(d == 16'(100 * i + 7), "synch error counter");
    end
    bus_read(10'h3FF, d);
    check(d == 16'h0, "unmapped reads zero");
    // random bus cycles against a model of the writable registers; the
    // status inputs and counters change between cycles
    begin
      logic [3:0]  m_ctrl;
      logic [15:0] m_thr;
      int l1_0, al_0, exp_l1, exp_al;
      m_ctrl = 4'b0110; m_thr = 16'd1234;
      l1_0 = n_l1; al_0 = n_al; exp_l1 = 0; exp_al = 0;
      for (int k = 0; k < 300; k++) begin
        logic [9:0]  a;
        logic [15:0] v;
        logic        sel;
        int r;
        r = $urandom_range(0, 5);
        a = (r == 5) ? 10'h010 + 10'($urandom_range(0, NLINK - 1)) : 10'(r % 4);
        v = 16'($urandom());
        sel = ($urandom_range(0, 7) != 0);
        fm = fm_t'($urandom());
        {cfg_done, sync_done, pipe_filled, evt_ovf} = 4'($urandom());
        for (int i = 0; i < NLINK; i++) se_cnt[i] = 16'($urandom());
        if ($urandom_range(0, 1)) begin
          bus_write(a, v, sel);
          if (sel && a == 10'h000) m_ctrl = v[3:0];
          if (sel && a == 10'h001) m_thr = v;
          if (sel && a == 10'h002) begin exp_l1 += v[0]; exp_al += v[1]; end
        end else begin
          bus_read(a, d);
          case (a)
            10'h000: check(d == {12'd0, m_ctrl}, "random CTRL read");
            10'h001: check(d == m_thr, "random OSY_THRESH read");
            10'h002: check(d == 16'd0, "CMD reads zero");
            10'h003: check(d == {8'd0, evt_ovf, pipe_filled, sync_done, cfg_done, fm},
                           "random STATUS read");
            default: check(d == se_cnt[a - 10'h010], "random counter read");
          endcase
        end
        check(se_kill_en == m_ctrl[0] && ready_trig == m_ctrl[1] &&
              ddu_mode == ddu_mode_e'(m_ctrl[3:2]) && osy_thresh == m_thr,
              "register outputs follow the model");
      end
      repeat (2) @(negedge clk);
      check(n_l1 - l1_0 == exp_l1 && n_al - al_0 == exp_al, "one pulse per command bit");
    end
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check(!ready_trig && se_kill_en, "hard reset clears READY trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
