// tb_clock_generator: on-chip clock generator with the measured setting of
// L = 1, M = 40, N = 8 and a 33 MHz reference (30.3 ns): the target is
// 33 * 40 / 8 = 165 MHz. Checks that it locks, that the output clock
// (oscillator #1 / L) is within the locked window, i.e. its period is within
// (160 +- 2)/160 of the target (4-period windows, lock threshold 1 count), that the tracking and output oscillators run at
// the same frequency once locked, and that L = 2 halves the output. A second
// run uses a 40 MHz reference with M = 24, N = 8 (120 MHz, near the 119 MHz
// point reported for that reference; the M and N of that point are not known).
module tb_clock_generator;
  timeunit 1ps;
  timeprecision 1ps;
  import crc_pkg::*;
  logic ref_clk = 1'b0, rst_n = 1'b0, osc_en = 1'b1;
  logic [CNW-1:0] n_div = 10'd8, m_div = 10'd40, l_div = 10'd1;
  logic clk_out, trk_clk, locked, ever_locked;
  trk_state_e state;
  osc_cmd_t out_cmd;
  int checks = 0, failures = 0;
  real TREF = 30303.0;

  clock_generator dut (.ref_clk, .rst_n, .osc_en, .n_div, .m_div, .l_div, .clk_out, .trk_clk,
                       .locked, .ever_locked, .state, .out_cmd);

  always #(TREF / 2.0) ref_clk = ~ref_clk;

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic measure(ref logic clk, output real per);
    realtime t0;
    @(posedge clk); t0 = $realtime;
    repeat (50) @(posedge clk);
    per = ($realtime - t0) / 50.0;
  endtask

  initial begin
    real p_out, p_trk, target;
    realtime t_lock;
    target = TREF * 8.0 / 40.0;
    #50000 rst_n = 1'b1;
    wait (locked);
    t_lock = $realtime;
    $display("locked after %0.2f us, command %0d/%0d", t_lock / 1.0e6, out_cmd.coarse, out_cmd.fine);
    check(t_lock < 60.0e6, "lock time under 60 us");
    repeat (3) @(posedge ref_clk);
    measure(clk_out, p_out);
    measure(trk_clk, p_trk);
    $display("target %0.1f ps, output %0.1f ps, tracking %0.1f ps", target, p_out, p_trk);
    check(p_out > target * 158.0 / 160.0 && p_out < target * 162.0 / 160.0, "output frequency");
    check(p_out > p_trk - 1.0 && p_out < p_trk + 1.0, "clock pair match");
    l_div = 10'd2;
    repeat (4) @(posedge clk_out);
    measure(clk_out, p_out);
    check(p_out > 2.0 * p_trk - 2.0 && p_out < 2.0 * p_trk + 2.0, "divide by L = 2");
    // second operating point: 40 MHz reference, M = 24, N = 8 -> 120 MHz
    l_div = 10'd1; m_div = 10'd24; TREF = 25000.0;
    rst_n = 1'b0;
    #50000 rst_n = 1'b1;
    @(posedge ref_clk);
    wait (locked);
    repeat (3) @(posedge ref_clk);
    measure(clk_out, p_out);
    target = TREF * 8.0 / 24.0;
    $display("40 MHz reference: target %0.1f ps, output %0.1f ps", target, p_out);
    check(p_out > target * 94.0 / 96.0 && p_out < target * 98.0 / 96.0, "120 MHz output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
