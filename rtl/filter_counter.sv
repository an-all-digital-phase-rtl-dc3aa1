// filter_counter: measures a phase error in high-speed clock cycles.
//
// While the phase-detector output `active` is high the counter advances by
// one per high-speed clock; while it is low the counter is preset to 1. In
// the cycle in which the clearing pulse of the phase detector arrives, `err`
// therefore equals the number of cycles since the setting pulse, which is the
// normalised phase error M. The counter saturates at its maximum.
//
// Interface: `err` is combinationally valid every cycle (it is the register
// value), so the estimator samples it in the same cycle as the clearing event.
module filter_counter #(
  parameter int unsigned W = crc_pkg::PW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         active,
  output logic [W-1:0] err
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              err <= W'(1);
    else if (!active)        err <= W'(1);
    else if (err != '1)      err <= err + W'(1);
  end
endmodule
