// tb_mf_generator: for random recovered periods T and factors k it checks
// T_new = floor((T + floor(k/2) + 1)/k) (k = 0 read as 1, at least 1),
// computed here with integer arithmetic, and that with a sync edge every T
// cycles the synthesizer gives a pulse on every sync edge and then every
// T_new cycles, i.e. ceil(T/T_new) pulses per period.
module tb_mf_generator;
  localparam int W = 12;
  logic clk = 1'b0, rst_n = 1'b0, sync = 1'b0, stop = 1'b0;
  logic [W-1:0] period = 12'd40, t_new;
  logic [3:0] k = 4'd4;
  logic synth_pulse, synth_clk;
  int checks = 0, failures = 0;

  mf_generator dut (.clk, .rst_n, .period, .k, .sync, .stop, .t_new, .synth_pulse, .synth_clk);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      int tp, kk, exp_t, cnt, since;
      tp = (i < 10) ? 40 + i : $urandom_range(2, 300);
      kk = (i == 5) ? 0 : $urandom_range(0, 15);
      period = W'(tp); k = 4'(kk);
      #1;
      exp_t = (tp + ((kk == 0 ? 1 : kk) / 2) + 1) / (kk == 0 ? 1 : kk);
      if (exp_t < 1) exp_t = 1;
      check(int'(t_new) == exp_t, $sformatf("T=%0d k=%0d t_new=%0d exp=%0d", tp, kk, t_new, exp_t));
      // three synchronised periods
      for (int p = 0; p < 3; p++) begin
        cnt = 0; since = 0;
        for (int c = 0; c < tp; c++) begin
          @(negedge clk);
          sync = (c == 0);
          #1;
          if (synth_pulse) begin
            if (c > 0) check(since == exp_t, $sformatf("pulse spacing %0d exp %0d", since, exp_t));
            cnt++; since = 0;
          end
          since++;
          if (c == 0) check(synth_pulse, "pulse on sync");
        end
        check(cnt == (tp + exp_t - 1) / exp_t, $sformatf("pulses/period %0d T=%0d Tn=%0d", cnt, tp, exp_t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
