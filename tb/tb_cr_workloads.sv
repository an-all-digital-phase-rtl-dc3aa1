// tb_cr_workloads: the clock recovery at the operating points reported for
// the fabricated design, with the NRZ data asynchronous to the high-speed
// clock (bit time not a whole number of clock cycles):
//   1. 165 MHz high-speed clock, 41 Mbit/s NRZ (f_clock/4, about 4.02 cycles
//      per bit), synthesizer k = 4 giving T_new = 1, i.e. a 165 MHz output;
//   2. 125 MHz high-speed clock, 12.5 Mbit/s NRZ (10 cycles per bit);
//   3. 125 MHz high-speed clock, 9 Mbit/s NRZ (about 13.9 cycles per bit).
// Each starts from an initial DCO period 25-40% off. After acquisition it
// checks that every recovered edge lies near the bit grid: within
// +-(1.5 + 0.3 N) cycles of the bit boundary plus the 2.5-cycle input
// latency, which covers the drift of a whole-cycle period (within one cycle
// of N) over a run of up to 4 equal bits, that the recovered period is within one cycle of the bit time,
// and that the number of recovered edges equals the number of bits (within
// 1%: at 4.02 cycles per bit the whole-cycle period dithers between 4 and 5,
// and a run of equal bits at period 5 can lose one edge).
module tb_cr_workloads;
  timeunit 1ps;
  timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0, resync = 1'b0;
  logic [11:0] init_period = 12'd5;
  logic [3:0] ktime = 4'd4, delay_sel = 4'd0;
  logic rec_clk, rec_pulse, delay_out, synth_clk, synth_pulse, synced, up_evt, down_evt, reject;
  logic [11:0] period, t_new;
  int checks = 0, failures = 0;
  real tclk = 6060.6;
  bit checking = 0;
  realtime t_b0;
  real tbit, nexp;
  int n_edges = 0, n_synth = 0;

  clock_recovery dut (.*);

  always #(tclk / 2.0) clk = ~clk;

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (checking) begin
    if (synth_pulse) n_synth++;
    if (rec_pulse) begin
      real ph;
      n_edges++;
      // phase after the nominal 2.5-cycle input latency, folded to +-N/2
      ph = ($realtime - t_b0) / tclk - 2.5;
      ph = ph - nexp * $floor(ph / nexp);
      if (ph > nexp / 2.0) ph = ph - nexp;
      check(ph >= -1.5 - 0.3 * nexp && ph <= 1.5 + 0.3 * nexp,
            $sformatf("edge %0.2f cycles off the grid (N=%0.2f)", ph, nexp));
      check(real'(period) >= nexp - 1.0 && real'(period) <= nexp + 1.0,
            $sformatf("period %0d for N=%0.2f", period, nexp));
    end
  end

  task automatic run(input real tc, input real tb, input int t0, input int k, input int nbits);
    int n_bits_checked, run;
    run = 1;
    tclk = tc; tbit = tb; nexp = tb / tc;
    init_period = 12'(t0); ktime = 4'(k);
    rst_n = 1'b0; din = 1'b0; checking = 0;
    #(10.0 * tc);
    rst_n = 1'b1;
    #(10.3 * tc);
    t_b0 = $realtime;
    n_bits_checked = 0;
    for (int b = 0; b < nbits; b++) begin
      // alternating preamble, then random bits with runs of at most 4
      if (b < 6 || run >= 4 || $urandom_range(0, 1)) begin din = ~din; run = 1; end
      else run++;
      if (b == 8) begin
        checking = 1; n_edges = 0; n_synth = 0;
      end
      if (b >= 8) n_bits_checked++;
      #(tb);
    end
    checking = 0;
    check(n_edges >= n_bits_checked - 1 - n_bits_checked / 100 && n_edges <= n_bits_checked + 1,
          $sformatf("%0d recovered edges for %0d bits", n_edges, n_bits_checked));
    $display("f_clock %0.1f MHz, %0.2f Mbit/s: %0d bits, %0d edges, period %0d, T_new %0d, synth edges %0d",
             1.0e6 / tc, 1.0e6 / tb, n_bits_checked, n_edges, period, t_new, n_synth);
  endtask

  initial begin
    run(6060.6, 24390.2, 5, 4, 2000);     // 165 MHz, 41 Mbit/s, k = 4
    check(t_new == 1 && n_synth > 7000, "synthesizer at the full clock rate");
    run(8000.0, 80000.0, 13, 4, 1000);    // 125 MHz, 12.5 Mbit/s
    run(8000.0, 111111.1, 10, 2, 1000);   // 125 MHz, 9 Mbit/s
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
