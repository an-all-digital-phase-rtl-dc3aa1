// adpll_crc_top: on-chip clock generator driving the ADPLL-based NRZ clock
// recovery with frequency synthesizer.
//
// The clock generator turns the reference clock into the high-speed clock
// hs_clk = f_ref * M / (N * L). The clock recovery, the DFED, the phase
// detectors, filter counters, estimator, DCO, output delay and
// multiple-frequency generator, runs entirely on hs_clk and recovers the bit
// clock of the NRZ input `din`. The clock recovery is held in reset until the
// clock generator has first locked (reset released through a two-flop
// synchroniser on hs_clk), so it never runs on a clock that is still being
// searched. All recovery periods are in hs_clk cycles.
//
// Because the ring oscillators are behavioural, this top is a simulation
// model; everything except ring_osc is synthesizable.
module adpll_crc_top #(
  parameter int unsigned W    = crc_pkg::PW,
  parameter int unsigned KW   = crc_pkg::KW,
  parameter int unsigned DMAX = (1 << crc_pkg::DW) - 1,
  parameter int unsigned DIVW = crc_pkg::CNW
) (
  input  logic                      ref_clk,
  input  logic                      rst_n,
  input  logic                      osc_en,
  input  logic [DIVW-1:0]           n_div,
  input  logic [DIVW-1:0]           m_div,
  input  logic [DIVW-1:0]           l_div,
  input  logic                      din,
  input  logic                      resync,
  input  logic [W-1:0]              init_period,
  input  logic [KW-1:0]             ktime,
  input  logic [$clog2(DMAX+1)-1:0] delay_sel,
  output logic                      hs_clk,
  output logic                      gen_locked,
  output crc_pkg::trk_state_e       gen_state,
  output crc_pkg::osc_cmd_t         gen_cmd,
  output logic                      cr_rst_n,
  output logic                      rec_clk,
  output logic                      rec_pulse,
  output logic                      delay_out,
  output logic                      synth_clk,
  output logic                      synth_pulse,
  output logic [W-1:0]              period,
  output logic [W-1:0]              t_new,
  output logic                      synced,
  output logic                      up_evt,
  output logic                      down_evt,
  output logic                      reject
);
  logic trk_clk, ever_locked, r1;

  clock_generator #(.DIVW(DIVW)) u_gen (
    .ref_clk, .rst_n, .osc_en, .n_div, .m_div, .l_div,
    .clk_out(hs_clk), .trk_clk, .locked(gen_locked), .ever_locked,
    .state(gen_state), .out_cmd(gen_cmd)
  );

  // release the clock recovery once the high-speed clock has locked
  always_ff @(posedge hs_clk or negedge rst_n) begin
    if (!rst_n) {cr_rst_n, r1} <= 2'b00;
    else        {cr_rst_n, r1} <= {r1, ever_locked};
  end

  clock_recovery #(.W(W), .KW(KW), .DMAX(DMAX)) u_cr (
    .clk(hs_clk), .rst_n(cr_rst_n), .din, .resync, .init_period, .ktime, .delay_sel,
    .rec_clk, .rec_pulse, .delay_out, .synth_clk, .synth_pulse,
    .period, .t_new, .synced, .up_evt, .down_evt, .reject
  );
endmodule
