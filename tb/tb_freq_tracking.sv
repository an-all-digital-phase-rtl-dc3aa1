// tb_freq_tracking: closes the frequency-tracking loop around a linear
// oscillator model in the testbench (period = P0 + 25 ps per command LSB,
// command = {coarse, fine}) and a reference/N clock of 240 ns, so the target
// is WIN * M = 4 * 40 = 160 tracking cycles per active window. At every update it checks:
//   - the measured count matches the oscillator period (within 1 cycle);
//   - the decision follows |C - M| against LOCK_TH = 1 and SEARCH_TH = 8;
//   - coarse steps halve (8, 4, 2, 1, 1 ...) in the direction of the error,
//     fine steps move {coarse, fine} by one, locked keeps the commands;
// and that the loop locks, and locks again after the oscillator drifts
// (continuous search). Coarse, fine and locked decisions must all occur.
module tb_freq_tracking;
  timeunit 1ps;
  timeprecision 1ps;
  import crc_pkg::*;
  logic trk_clk = 1'b0, rst_n = 1'b0, ref_div = 1'b0;
  logic [CNW-1:0] m_target = 10'd40, count;
  osc_cmd_t cmd, prev_cmd;
  trk_state_e state;
  logic fast, apply;
  int checks = 0, failures = 0, n_c = 0, n_f = 0, n_l = 0, exp_step = 8;
  real p0 = 3000.0;

  freq_tracking dut (.trk_clk, .rst_n, .ref_div, .m_target, .cmd, .state, .fast, .apply, .count);

  function automatic real osc_period(osc_cmd_t c);
    return p0 + 25.0 * real'({c.coarse, c.fine});
  endfunction

  always begin
    #(osc_period(cmd) / 2.0);
    trk_clk = ~trk_clk;
  end
  always #120000 ref_div = ~ref_div;

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t %s", $time, what); end
  endtask

  real used_period;
  always @(posedge trk_clk) if (!apply) used_period <= osc_period(cmd);

  always @(posedge trk_clk) begin
    if (rst_n && apply) begin
      int e, mag, w_old, w_new;
      trk_state_e exp_s;
      e = int'(count) - 160;
      mag = e < 0 ? -e : e;
      exp_s = (mag <= 1) ? TRK_LOCKED : (mag <= 8) ? TRK_FINE : TRK_COARSE;
      check(state == exp_s, $sformatf("decision %0d for count %0d", state, count));
      check(real'(count) > 960000.0 / used_period - 1.5 && real'(count) < 960000.0 / used_period + 1.5,
            $sformatf("count %0d for period %0.0f", count, used_period));
      w_old = int'({prev_cmd.coarse, prev_cmd.fine});
      w_new = int'({cmd.coarse, cmd.fine});
      case (state)
        TRK_LOCKED: begin n_l++; check(cmd == prev_cmd, "locked keeps command"); end
        TRK_FINE: begin
          n_f++;
          check(w_new == w_old + (e > 0 ? 1 : -1), "fine step of one with carry");
        end
        default: begin
          int c_exp;
          n_c++;
          c_exp = int'(prev_cmd.coarse) + (e > 0 ? exp_step : -exp_step);
          if (c_exp > 31) c_exp = 31;
          if (c_exp < 0) c_exp = 0;
          check(int'(cmd.coarse) == c_exp && cmd.fine == prev_cmd.fine,
                $sformatf("coarse step: %0d -> %0d, step %0d", prev_cmd.coarse, cmd.coarse, exp_step));
          if (exp_step > 1) exp_step = exp_step / 2;
        end
      endcase
    end
    if (!apply) prev_cmd <= cmd;
  end

  initial begin
    #10000 rst_n = 1'b1;
    // first acquisition from Mid
    wait (n_l >= 3);
    check(state == TRK_LOCKED, "locked");
    check(osc_period(cmd) > 6000.0 * 158.0 / 160.0 && osc_period(cmd) < 6000.0 * 162.0 / 160.0,
          $sformatf("locked period %0.0f", osc_period(cmd)));
    // drift: the oscillator becomes 10% slower for the same command
    p0 = 3600.0;
    n_l = 0;
    @(posedge apply);
    wait (n_l >= 3);
    check(osc_period(cmd) > 6000.0 * 158.0 / 160.0 && osc_period(cmd) < 6000.0 * 162.0 / 160.0,
          $sformatf("relocked period %0.0f", osc_period(cmd)));
    check(n_c > 0 && n_f > 0, $sformatf("coarse %0d fine %0d decisions", n_c, n_f));
    $display("decisions: coarse=%0d fine=%0d locked=%0d", n_c, n_f, n_l);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
