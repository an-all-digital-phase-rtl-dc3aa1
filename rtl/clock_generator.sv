// clock_generator: on-chip high-speed clock generator (cell-based, no analog
// loop filter).
//
// Reference clock -> 1/N divider -> frequency tracking, which compares it
// with ring oscillator #2 (the tracking clock, compared through the 1/M
// ratio) and searches coarse/fine commands; the clock controller applies the
// tracking commands to oscillator #2 and, once locked, the same commands to
// ring oscillator #1 of the clock pair, whose output divided by L is the
// target clock. The two oscillators are identical, so oscillator #1 runs at
// the frequency found with oscillator #2 without being disturbed by the
// search:  f_out = f_ref * M / (N * L).
//
// Contains the behavioural ring oscillators, so it is a simulation model as
// a whole; the dividers, tracker and controller are synthesizable.
// rst_n is asynchronous; the oscillators run while osc_en is high, also
// during reset, so the tracker sees clock edges while it is reset.
module clock_generator #(
  parameter int unsigned DIVW = crc_pkg::CNW
) (
  input  logic            ref_clk,
  input  logic            rst_n,
  input  logic            osc_en,  // oscillator enable
  input  logic [DIVW-1:0] n_div,   // reference divider N
  input  logic [DIVW-1:0] m_div,   // tracking-clock ratio M
  input  logic [DIVW-1:0] l_div,   // output divider L
  output logic            clk_out, // target clock
  output logic            trk_clk, // tracking clock (oscillator #2)
  output logic            locked,
  output logic            ever_locked,
  output crc_pkg::trk_state_e state,
  output crc_pkg::osc_cmd_t   out_cmd
);
  import crc_pkg::*;

  logic       ref_div, ref_tick, osc1, out_tick;
  osc_cmd_t   cmd, trk_cmd;
  logic       fast, apply;
  logic [CNW-1:0] count;

  clk_divider #(.W(DIVW)) u_div_n (
    .clk_in(ref_clk), .rst_n, .div(n_div), .clk_out(ref_div), .tick(ref_tick)
  );

  freq_tracking u_trk (
    .trk_clk, .rst_n, .ref_div, .m_target(CNW'(m_div)),
    .cmd, .state, .fast, .apply, .count
  );

  clock_controller u_ctl (
    .trk_clk, .rst_n, .apply, .cmd, .state, .trk_cmd, .out_cmd, .locked, .ever_locked
  );

  ring_osc u_osc_trk (
    .enable(osc_en), .coarse(trk_cmd.coarse), .fine(trk_cmd.fine), .clk_out(trk_clk)
  );

  ring_osc u_osc_out (
    .enable(osc_en), .coarse(out_cmd.coarse), .fine(out_cmd.fine), .clk_out(osc1)
  );

  clk_divider #(.W(DIVW)) u_div_l (
    .clk_in(osc1), .rst_n, .div(l_div), .clk_out(clk_out), .tick(out_tick)
  );
endmodule
