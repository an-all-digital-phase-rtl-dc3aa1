// clock_recovery: ADPLL-based NRZ clock recovery with frequency synthesizer.
//
// Everything runs on one high-speed clock `clk`; all periods are integers in
// cycles of it. The data path is:
//
//   din -> DFED -> diff pulse per data transition, first-edge pulse
//   PD #1 (Up):   set by an input edge, cleared by the DCO edge
//                 (only if no DCO edge is pending, i.e. Down is low)
//   PD #2 (Down): set by a DCO edge, cleared by an input edge
//                 (only if that DCO edge does not end an Up measurement)
//   filter counters #1/#2 turn the PD pulse widths into errors in1/in2
//   phase & frequency estimator -> new phase and period for the DCO
//   programmable DCO -> recovered clock (rec_clk) and its edge (rec_pulse)
//   output delay: rec_clk delayed by `delay_sel` high-speed cycles
//   multiple-frequency generator: k-times-frequency clock synchronous to
//   rec_clk
//
// Acquisition: the first input edge starts the DCO at phase 0 with
// `init_period`. At the next transition the phase error M between input and
// DCO gives the new period T-M (DCO slow) or T+M (DCO fast) and the new phase,
// so an input whose period is within (T/2, 3T/2) of the initial period is
// locked after one data transition. Runs of equal NRZ bits produce errors
// above Period/2; those only realign the phase and keep the period.
//
// `resync` stops the DCO and re-arms the first-edge detector (the
// resynchronise path of the algorithm). The first edge is treated as a DCO
// edge by both phase detectors, since input and DCO start in phase there.
module clock_recovery #(
  parameter int unsigned W    = crc_pkg::PW,
  parameter int unsigned KW   = crc_pkg::KW,
  parameter int unsigned DMAX = (1 << crc_pkg::DW) - 1
) (
  input  logic                      clk,         // high-speed clock
  input  logic                      rst_n,
  input  logic                      din,         // NRZ data
  input  logic                      resync,
  input  logic [W-1:0]              init_period, // initial DCO period
  input  logic [KW-1:0]             ktime,       // synthesizer factor k
  input  logic [$clog2(DMAX+1)-1:0] delay_sel,   // output delay D
  output logic                      rec_clk,     // recovered clock (DCO clk)
  output logic                      rec_pulse,   // recovered clock edge
  output logic                      delay_out,   // delayed recovered clock
  output logic                      synth_clk,   // synthesizer output
  output logic                      synth_pulse,
  output logic [W-1:0]              period,      // current DCO period
  output logic [W-1:0]              t_new,       // synthesizer period
  output logic                      synced,
  output logic                      up_evt,
  output logic                      down_evt,
  output logic                      reject
);
  logic          in_pulse, first_edge, dco_pulse, dco_ev;
  logic          up_q, up_qn, down_q, down_qn;
  logic [W-1:0]  in1, in2;
  logic          load, running;
  logic [W-1:0]  new_phase, new_period, dco_cnt, dco_per;

  dfed u_dfed (
    .clk, .rst_n, .din, .rearm(resync),
    .diff_pulse(in_pulse), .first_edge, .synced
  );

  // the first edge counts as a coincident DCO edge
  assign dco_ev = dco_pulse | first_edge;

  jk_pd u_pd_up (
    .clk, .rst_n, .s(in_pulse & ~down_q), .c(dco_ev), .q(up_q), .qn(up_qn)
  );
  jk_pd u_pd_down (
    .clk, .rst_n, .s(dco_ev & ~up_q), .c(in_pulse), .q(down_q), .qn(down_qn)
  );

  filter_counter #(.W(W)) u_fc1 (.clk, .rst_n, .active(up_q),   .err(in1));
  filter_counter #(.W(W)) u_fc2 (.clk, .rst_n, .active(down_q), .err(in2));

  pf_estimator #(.W(W)) u_est (
    .clk, .rst_n, .init_period, .first_edge, .in_pulse, .dco_pulse,
    .up_q, .down_q, .in1, .in2,
    .load, .new_phase, .new_period, .period, .up_evt, .down_evt, .reject
  );

  prog_dco #(.W(W)) u_dco (
    .clk, .rst_n,
    .start(first_edge), .load(load & ~first_edge),
    .realign(down_evt), .stop(resync),
    .load_phase(new_phase), .load_period(new_period),
    .pulse(dco_pulse), .dco_clk(rec_clk), .running, .cnt(dco_cnt), .per(dco_per)
  );

  assign rec_pulse = dco_pulse;

  output_delay #(.DMAX(DMAX)) u_delay (
    .clk, .rst_n, .din(rec_clk), .sel(delay_sel), .dout(delay_out)
  );

  mf_generator #(.W(W), .KW(KW)) u_mfg (
    .clk, .rst_n, .period, .k(ktime), .sync(dco_pulse), .stop(resync),
    .t_new, .synth_pulse, .synth_clk
  );
endmodule
