// tb_ring_osc: measures the behavioural ring oscillator's period for
// several coarse/fine commands and compares it with
// 2*[(NMIN+coarse)*tau + tau + tau*fine/K] + C (tau = 200 ps, C = 1000 ps,
// NMIN = 4, K = 16); checks that a larger command never makes it faster and
// that the output stops when disabled.
module tb_ring_osc;
  timeunit 1ps;
  timeprecision 1ps;
  logic enable = 1'b0, clk_out;
  logic [4:0] coarse = '0;
  logic [3:0] fine = '0;
  int checks = 0, failures = 0;

  ring_osc dut (.enable, .coarse, .fine, .clk_out);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    realtime t0, t1, meas, expd, last;
    last = 0.0;
    #1000 enable = 1'b1;
    for (int c = 0; c < 32; c += 3) begin
      for (int f = 0; f < 16; f += 5) begin
        coarse = 5'(c); fine = 4'(f);
        repeat (3) @(posedge clk_out);
        t0 = $realtime;
        repeat (10) @(posedge clk_out);
        t1 = $realtime;
        meas = (t1 - t0) / 10.0;
        expd = 2.0 * ((4.0 + c) * 200.0 + 200.0 + 200.0 * f / 16.0) + 1000.0;
        check(meas > expd - 2.0 && meas < expd + 2.0,
              $sformatf("c=%0d f=%0d period %0.1f expected %0.1f", c, f, meas, expd));
        check(meas >= last, "monotonic");
        last = meas;
      end
    end
    enable = 1'b0;
    #20000;
    check(clk_out == 1'b0, "disabled output low");
    fork
      begin @(posedge clk_out); check(0, "edge while disabled"); end
      #50000;
    join_any
    disable fork;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
