// tb_adpll_crc_top: end-to-end run of the whole design at its default
// parameters. A 33 MHz reference with N = 8, M = 40, L = 1 makes the clock
// generator search and lock near 165 MHz; the clock recovery then comes out
// of reset and recovers the clock of an asynchronous NRZ stream of
// about 10.2 Mbit/s (97.6 ns per bit, about 16 high-speed cycles; the
// initial DCO period is 21 cycles, a 31% frequency error).
// Checks, in real time against the stimulus:
//   - the clock generator locks and its clock is within 1.3% of 165 MHz;
//   - after the second data transition every recovered edge lies between
//     -2 and +8 high-speed cycles of a bit boundary: 2-3 cycles of input
//     latency, plus the drift of an integer DCO period against a bit time
//     of about 16.2 cycles over a run of equal bits, which is only corrected
//     at the next transition;
//   - the recovered period stays within 1 cycle of bit time / hs period;
//   - the synthesizer (k = 4) period is floor((T + 3)/4) of the current T,
//     and synth edges occur;
//   - the delayed output equals the recovered clock 5 hs cycles earlier.
// Every mechanism must happen at least once: coarse, fine and locked
// decisions of the clock generator; up, down and rejected (Period/2)
// measurements of the clock recovery; synthesizer and delayed edges.
module tb_adpll_crc_top;
  timeunit 1ps;
  timeprecision 1ps;
  import crc_pkg::*;

  localparam real TREF = 30303.0;
  localparam real TBIT = 97600.0;

  logic ref_clk = 1'b0, rst_n = 1'b0, osc_en = 1'b1, din = 1'b0, resync = 1'b0;
  logic [CNW-1:0] n_div = 10'd8, m_div = 10'd40, l_div = 10'd1;
  logic [PW-1:0] init_period = 12'd21;
  logic [KW-1:0] ktime = 4'd4;
  logic [DW-1:0] delay_sel = 4'd5;
  logic hs_clk, gen_locked, cr_rst_n, rec_clk, rec_pulse, delay_out, synth_clk, synth_pulse;
  logic synced, up_evt, down_evt, reject;
  trk_state_e gen_state;
  osc_cmd_t gen_cmd;
  logic [PW-1:0] period, t_new;

  int checks = 0, failures = 0;
  int n_coarse = 0, n_fine = 0, n_locked = 0, n_up = 0, n_down = 0, n_rej = 0;
  int n_synth = 0, n_delay = 0, n_trans = 0;
  realtime t_b0 = -1.0, hs_per = 0.0;

  adpll_crc_top dut (.*);

  always #(TREF / 2.0) ref_clk = ~ref_clk;

  initial begin
    #1_500_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %0t: %s", $time, what); end
  endtask

  // clock generator decisions
  always @(posedge dut.u_gen.trk_clk) if (dut.u_gen.apply) begin
    case (dut.u_gen.state)
      TRK_COARSE: n_coarse++;
      TRK_FINE:   n_fine++;
      default:    n_locked++;
    endcase
  end

  // clock recovery events and recovered-edge alignment
  logic [15:0] rc_hist;
  always @(posedge hs_clk) begin
    rc_hist <= {rc_hist[14:0], rec_clk};
    if (cr_rst_n) begin
      if (up_evt) n_up++;
      if (down_evt) n_down++;
      if (reject) n_rej++;
      if (synth_pulse) n_synth++;
      if (delay_out && !rc_hist[0]) n_delay++;
      if (n_trans >= 3 && hs_per > 0.0) begin
        real ph, nexp;
        check(delay_out == rc_hist[4], "delay_out is rec_clk 5 cycles earlier");
        if (rec_pulse) begin
          // phase of this edge relative to the bit grid, in hs cycles
          ph = ($realtime - t_b0) / hs_per;
          ph = ph - (TBIT / hs_per) * $floor(($realtime - t_b0) / TBIT);
          if (ph > TBIT / hs_per / 2.0) ph = ph - TBIT / hs_per;
          check(ph >= -2.0 && ph <= 8.0, $sformatf("recovered edge %0.2f cycles off the bit grid", ph));
          nexp = TBIT / hs_per;
          check(real'(period) >= nexp - 1.5 && real'(period) <= nexp + 1.5,
                $sformatf("period %0d for %0.2f cycles per bit", period, nexp));
          check(int'(t_new) == (int'(period) + 3) / 4, "synthesizer period");
        end
      end
    end
  end

  initial begin
    realtime t0;
    #50000 rst_n = 1'b1;
    wait (gen_locked);
    @(posedge hs_clk); t0 = $realtime;
    repeat (100) @(posedge hs_clk);
    hs_per = ($realtime - t0) / 100.0;
    $display("clock generator locked at %0.2f us, hs period %0.1f ps", $realtime / 1.0e6, hs_per);
    check(hs_per > TREF * 8.0 / 40.0 * 0.987 && hs_per < TREF * 8.0 / 40.0 * 1.013, "hs clock frequency");
    wait (cr_rst_n);
    #(TBIT * 1.37);
    // NRZ: alternating preamble then random bits, 600 bits
    for (int b = 0; b < 600; b++) begin
      logic nb;
      nb = (b < 6) ? ~din : 1'($urandom_range(0, 1));
      if (b == 0) t_b0 = $realtime;
      if (nb != din) n_trans++;
      din = nb;
      #(TBIT);
    end
    check(n_coarse > 0 && n_fine > 0 && n_locked > 0,
          $sformatf("generator decisions coarse %0d fine %0d locked %0d", n_coarse, n_fine, n_locked));
    check(n_up > 0,   "no up measurement");
    check(n_down > 0, "no down measurement");
    check(n_rej > 0,  "no rejected measurement");
    check(n_synth > 600, "synthesizer edges");
    check(n_delay > 300, "delayed edges");
    $display("generator: coarse=%0d fine=%0d locked=%0d; recovery: up=%0d down=%0d reject=%0d; synth=%0d delayed=%0d",
             n_coarse, n_fine, n_locked, n_up, n_down, n_rej, n_synth, n_delay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
