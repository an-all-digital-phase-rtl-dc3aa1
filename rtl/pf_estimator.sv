// pf_estimator: phase and frequency estimator of the NRZ clock recovery.
//
// It holds the current normalised DCO period T(i-1) and, once per valid data
// transition, computes the new DCO phase and period from the phase error
// measured by one of the two filter counters:
//
//   up event   (input edge before the DCO edge, DCO slow, T > N):
//              in1 = cycles from input edge to DCO edge,
//              new period T(i) = T(i-1) - in1, new phase = in1;
//   down event (DCO edge before the input edge, DCO fast, T < N):
//              in2 = cycles from DCO edge to input edge,
//              new period T(i) = T(i-1) + in2, new phase = 0.
//
// If the phase error used exceeds Period/2 the measurement is taken as
// uncertain (a run of equal NRZ bits, or an edge too far off): the period is
// kept (the "D" register path of the estimator) and the new phase is 0, i.e.
// the DCO is realigned to the event that ended the measurement. This keeps
// every new period within (T/2, 3T/2).
//
// The first detected input edge loads the initial period `init_period` and
// starts the DCO at phase 0.
//
// Timing: combinational from the event cycle to `load`/`new_phase`/
// `new_period`, which the programmable DCO registers at the next clock edge.
// This filter-counter-to-DCO path is the critical path of the loop. The
// period register T(i-1) updates on every load (at a DCO edge or at the end
// of a Down phase). The phase and period rules, the Period/2 checks and the
// two multiplexers follow the published estimator; the cycle-level timing is
// this design's own.
module pf_estimator #(
  parameter int unsigned W = crc_pkg::PW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] init_period, // initial normalised period
  input  logic         first_edge,  // from DFED
  input  logic         in_pulse,    // differentiated input
  input  logic         dco_pulse,   // DCO edge
  input  logic         up_q,        // phase detector #1
  input  logic         down_q,      // phase detector #2 (Down)
  input  logic [W-1:0] in1,         // filter counter #1
  input  logic [W-1:0] in2,         // filter counter #2
  output logic         load,
  output logic [W-1:0] new_phase,
  output logic [W-1:0] new_period,
  output logic [W-1:0] period,      // T(i-1)
  output logic         up_evt,      // an up measurement ended this cycle
  output logic         down_evt,    // a down measurement ended this cycle
  output logic         reject       // the measurement exceeded Period/2
);
  logic [W-1:0] half;
  logic         viol1, viol2;
  logic [W:0]   sum;

  assign half     = period >> 1;
  assign up_evt   = dco_pulse & up_q & ~first_edge;
  assign down_evt = in_pulse & down_q & ~first_edge;
  assign viol1    = up_evt   & (in1 > half);
  assign viol2    = down_evt & (in2 > half);
  assign reject   = viol1 | viol2;
  assign sum      = {1'b0, period} + {1'b0, in2};
  assign load     = first_edge | up_evt | down_evt;

  always_comb begin
    if (first_edge) begin
      new_period = init_period;
      new_phase  = '0;
    end else if (reject) begin
      new_period = period;
      new_phase  = '0;
    end else if (down_evt) begin
      new_period = sum[W] ? '1 : sum[W-1:0];
      new_phase  = '0;
    end else begin
      new_period = period - in1;
      new_phase  = in1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    period <= init_period;
    else if (load) period <= new_period;
  end

  // up and down measurements are mutually exclusive by construction
  assert property (@(posedge clk) disable iff (!rst_n) !(up_q && down_q));
endmodule
