// ring_osc: behavioural model of the cell-based digitally controlled ring
// oscillator. Not synthesizable: a real implementation is a ring of standard
// cell inverters whose delay depends on process, voltage and temperature.
//
// The path selector (coarse command, n) chooses how many inverter pairs are
// in the ring; the delay matrix (fine command, m) chooses one of K parallel
// delay paths whose delays grow linearly with m. The output period is
//
//   tau_target = 2 * [ n*tau + (tau + tau*m/K) ] + C
//
// with tau the inverter delay, n = NMIN + coarse, K = 2**FW and C a constant
// of the ring. A larger command therefore gives a lower frequency. The model
// re-reads the commands at every half period, so a command change takes
// effect glitch-free at the next edge. With enable low the output is held
// low. TAU_PS, C_PS and NMIN are this model's own values: about 63-333 MHz
// over the coarse range and a fine step of 2*tau/K (25 ps with the defaults).
module ring_osc #(
  parameter int unsigned CW     = crc_pkg::CW,
  parameter int unsigned FW     = crc_pkg::FW,
  parameter int unsigned NMIN   = 4,
  parameter real         TAU_PS = 200.0,
  parameter real         C_PS   = 1000.0
) (
  input  logic          enable,
  input  logic [CW-1:0] coarse,
  input  logic [FW-1:0] fine,
  output logic          clk_out
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam real K = real'(1 << FW);

  function automatic real period_ps(input logic [CW-1:0] n_cmd, input logic [FW-1:0] m_cmd);
    real n, m;
    n = real'(NMIN) + real'(n_cmd);
    m = real'(m_cmd);
    return 2.0 * (n * TAU_PS + (TAU_PS + TAU_PS * m / K)) + C_PS;
  endfunction

  initial clk_out = 1'b0;

  always begin
    if (!enable) begin
      clk_out = 1'b0;
      @(posedge enable);
    end else begin
      #(period_ps(coarse, fine) / 2.0);
      clk_out = enable ? ~clk_out : 1'b0;
    end
  end
endmodule
