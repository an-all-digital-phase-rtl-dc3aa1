// tb_clock_recovery: self-checking test of the NRZ clock recovery.
//
// For several bit periods N (in high-speed cycles) and initial DCO periods
// T0 within the pull-in range, it sends an NRZ stream that starts with an
// alternating preamble and continues with random bits, and checks against
// the known bit grid of the stimulus:
//   - acquisition within one data transition: from the later of the DCO's
//     first self-timed edge (T0) and the third bit boundary (2N) on, the
//     recovered clock edge (rec_pulse) occurs exactly on every bit boundary
//     (after the fixed 2-cycle input latency) and nowhere else;
//   - the recovered period equals N;
//   - the synthesizer period equals floor((N + k/2 + 1)/k) and it gives
//     ceil(N/T_new) pulses per recovered period;
//   - delay_out is rec_clk delayed by delay_sel cycles;
//   - a step of the bit rate from N to N+1 is followed after one transition.
// It counts up, down and rejected (Period/2) measurements and fails if one
// of these mechanisms never happened.
module tb_clock_recovery;
  localparam int W = 12;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0, resync = 1'b0;
  logic [W-1:0] init_period = 12'd16;
  logic [3:0] ktime = 4'd4, delay_sel = 4'd0;
  logic rec_clk, rec_pulse, delay_out, synth_clk, synth_pulse, synced;
  logic up_evt, down_evt, reject;
  logic [W-1:0] period, t_new;

  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_rej = 0;
  int cyc = 0;

  clock_recovery dut (
    .clk, .rst_n, .din, .resync, .init_period, .ktime, .delay_sel,
    .rec_clk, .rec_pulse, .delay_out, .synth_clk, .synth_pulse,
    .period, .t_new, .synced, .up_evt, .down_evt, .reject
  );

  always #5 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (up_evt)   n_up++;
    if (down_evt) n_down++;
    if (reject)   n_rej++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  // delay line reference for delay_out
  logic [31:0] rc_hist;
  always @(negedge clk) rc_hist <= {rc_hist[30:0], rec_clk};

  // one scenario; all sampling and driving at the falling edge
  task automatic run(input int n, input int t0, input int k, input int d,
                     input int nbits, input int n2);
    int b0, bit_i, next_b, per_now, boundary_phase, spp, last_rp, tn_exp;
    logic nextbit;
    rst_n = 1'b0; din = 1'b0;
    init_period = W'(t0); ktime = 4'(k); delay_sel = 4'(d);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    b0 = cyc + 1;
    bit_i = 0; next_b = b0; per_now = n;
    boundary_phase = b0; spp = 0; last_rp = -1;
    while (bit_i < nbits) begin
      @(negedge clk);
      // ---- drive ----
      if (cyc == next_b) begin
        if (bit_i < 4) nextbit = ~din;                // alternating preamble
        else           nextbit = 1'($urandom_range(0, 1));
        if (bit_i == nbits / 2) begin                // bit-rate step
          per_now = n2;
          nextbit = ~din;
        end
        if (bit_i == nbits / 2 + 1) nextbit = ~din;  // and a transition after it
        din = nextbit;
        boundary_phase = cyc;
        next_b = cyc + per_now;
        bit_i++;
      end
      // ---- check: from the 3rd boundary on, away from the rate step ----
      if (cyc - b0 > 2 + ((t0 > 2 * n) ? t0 : 2 * n) && !(bit_i > nbits / 2 && bit_i <= nbits / 2 + 2)) begin
        check(rec_pulse == ((cyc - boundary_phase) == 2),
              $sformatf("rec_pulse=%0d at offset %0d (N=%0d T0=%0d)",
                        rec_pulse, cyc - boundary_phase, per_now, t0));
        if (rec_pulse) check(period == W'(per_now),
                             $sformatf("period %0d expected %0d", period, per_now));
      end
      // ---- synthesizer ----
      if (bit_i >= 4 && bit_i < nbits / 2) begin
        if (rec_pulse) begin
          if (last_rp >= 0 && (cyc - last_rp) == per_now)
            check(spp == (per_now + int'(t_new) - 1) / int'(t_new),
                  $sformatf("synth pulses %0d per period, T_new=%0d", spp, t_new));
          spp = 0; last_rp = cyc;
        end
        tn_exp = (per_now + k / 2 + 1) / k;
        if (tn_exp < 1) tn_exp = 1;
        check(int'(t_new) == tn_exp, $sformatf("t_new %0d expected %0d", t_new, tn_exp));
        // delay_out must equal rec_clk d cycles ago (sampled at the same edges)
        if (d == 0) check(delay_out == rec_clk, "delay 0");
        else        check(delay_out == rc_hist[d-1], $sformatf("delay %0d", d));
      end
      if (synth_pulse) spp++;
    end
  endtask

  always @(negedge clk) cyc <= cyc + 1;

  initial begin
    // N, T0 (DCO slow and fast), k, delay, bits, rate after step
    run(16, 22, 4, 3, 200, 17);
    run(16, 12, 4, 0, 200, 15);
    run(13, 9,  2, 5, 200, 14);
    run(20, 29, 3, 1, 200, 19);
    run(9,  13, 5, 7, 200, 10);
    run(24, 17, 8, 2, 200, 23);
    run(40, 55, 4, 15, 100, 41);
    run(4, 5, 4, 1, 300, 5);
    run(4, 3, 2, 2, 300, 4);
    run(5, 4, 1, 0, 300, 6);
    run(10, 19, 4, 3, 200, 11);
    run(10, 7, 4, 3, 200, 9);
    run(12, 23, 4, 3, 200, 12);
    run(12, 8, 4, 3, 200, 12);
    check(n_up > 0,   "no up measurement happened");
    check(n_down > 0, "no down measurement happened");
    check(n_rej > 0,  "no Period/2 rejection happened");
    $display("events: up=%0d down=%0d reject=%0d", n_up, n_down, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
