// mf_generator: multiple-frequency generator (frequency synthesizer).
//
// From the period T recovered by the clock recovery (in high-speed clock
// cycles) and the multiplication factor k ("M-time setting"), it computes
//
//   T_new = floor( (T + floor(k/2) + 1) / k )
//
// with an adder (T + k/2 + 1, k/2 being a right shift) and a divider, and
// runs a second DCO with period T_new. No feedback divider is involved, so
// the synthesizer cannot destabilise the loop. The second DCO is restarted on
// every edge of the clock-recovery DCO (`sync`), which keeps the two outputs
// synchronous: about k synthesizer pulses per recovered-clock period.
//
// k = 0 is treated as k = 1. T_new is at least 1 (f_clock at most).
// Timing: T_new is combinational from T and k; the second DCO takes it at
// each sync pulse. The formula and the adder/divider structure follow the
// published design; the restart-on-sync is this design's reading of how the
// two DCOs are kept synchronous.
module mf_generator #(
  parameter int unsigned W  = crc_pkg::PW,
  parameter int unsigned KW = crc_pkg::KW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  period,  // recovered period T
  input  logic [KW-1:0] k,       // M-time setting
  input  logic          sync,    // edge of the main DCO
  input  logic          stop,
  output logic [W-1:0]  t_new,
  output logic          synth_pulse,
  output logic          synth_clk
);
  logic [KW-1:0] kk;
  logic [W+1:0]  y;
  logic [W+1:0]  z;

  assign kk = (k == '0) ? KW'(1) : k;
  assign y  = (W+2)'(period) + (W+2)'(kk >> 1) + (W+2)'(1);
  assign z  = y / (W+2)'(kk);

  always_comb begin
    if (z == '0)              t_new = W'(1);
    else if (z > (W+2)'({W{1'b1}})) t_new = '1;
    else                      t_new = z[W-1:0];
  end

  logic          unused_run;
  logic [W-1:0]  unused_cnt, unused_per;

  prog_dco #(.W(W)) u_dco2 (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (sync),
    .load       (1'b0),
    .realign    (1'b0),
    .stop       (stop),
    .load_phase ('0),
    .load_period(t_new),
    .pulse      (synth_pulse),
    .dco_clk    (synth_clk),
    .running    (unused_run),
    .cnt        (unused_cnt),
    .per        (unused_per)
  );
endmodule
