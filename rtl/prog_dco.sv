// prog_dco: programmable digitally controlled oscillator on the high-speed
// clock, with jump-able phase and period.
//
// A phase counter runs 0 .. period-1 on the high-speed clock; the DCO edge
// `pulse` is the cycle in which the counter is 0, and `dco_clk` is high for
// the first half of each period (a square wave whose frequency is
// f_clock / period). The comparison of counter and period is the "DCO
// comparator".
//
//   start : the DCO edge happens in this cycle (pulse is asserted now), and
//           the DCO runs on with period `load_period`;
//   load  : "the DCO is at phase `load_phase` in this cycle": the counter
//           takes load_phase+1 at the next edge, with period `load_period`.
//           Phase and frequency both jump in one cycle;
//   realign: accompanies a load to phase 0 that an outside event (not the
//           DCO edge itself) triggered. If the counter is past half its
//           period, the DCO edge is also given in this cycle (it was due and
//           is not skipped). Keeping this a separate input, rather than
//           decoding it from load, leaves no combinational path from
//           `pulse` back to itself through the logic that drives `load`;
//   stop  : the DCO halts (no pulses) until the next start.
//
// The DCO is stopped after reset. Loads and starts are this design's
// interface; the phase/period jump is what the published DCO must support.
module prog_dco #(
  parameter int unsigned W = crc_pkg::PW,
  parameter logic [W-1:0] DEF_PERIOD = W'(16)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         load,
  input  logic         realign,
  input  logic         stop,
  input  logic [W-1:0] load_phase,
  input  logic [W-1:0] load_period,
  output logic         pulse,
  output logic         dco_clk,
  output logic         running,
  output logic [W-1:0] cnt,
  output logic [W-1:0] per
);
  logic [W:0] nxt_phase;

  assign nxt_phase = {1'b0, load_phase} + (W+1)'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      cnt     <= '0;
      per     <= DEF_PERIOD;
    end else if (stop) begin
      running <= 1'b0;
      cnt     <= '0;
    end else if (start) begin
      running <= 1'b1;
      per     <= load_period;
      cnt     <= (load_period <= W'(1)) ? '0 : W'(1);
    end else if (load) begin
      running <= 1'b1;
      per     <= load_period;
      cnt     <= (nxt_phase >= {1'b0, load_period}) ? W'(nxt_phase - {1'b0, load_period})
                                                    : nxt_phase[W-1:0];
    end else if (running) begin
      cnt     <= (cnt >= per - W'(1)) ? '0 : cnt + W'(1);
    end
  end

  // A realignment to phase 0 puts the DCO edge in this cycle. If the counter
  // is in the second half of its period that edge has not been given yet and
  // is given now; in the first half it was given less than half a period ago.
  logic late_edge;
  assign late_edge = realign & running & (cnt > (per >> 1));

  assign pulse   = start | late_edge | (running & (cnt == '0) & ~stop);
  assign dco_clk = running & (cnt < ((per + W'(1)) >> 1));
endmodule
