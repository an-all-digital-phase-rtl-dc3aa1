// dfed: differentiator with first-edge detection.
//
// The data input is asynchronous to the high-speed clock, so it first passes
// a two-flop synchroniser. A further flip-flop (the "D" of the differentiator)
// holds the previous sample; the XOR of the two gives `diff_pulse`, one
// high-speed clock cycle long, for every transition (rising or falling) of
// the input. Differentiating an NRZ stream this way gives one pulse per data
// transition, which is what the phase detectors compare against the DCO.
//
// The one-shot trigger gives `first_edge`, a single pulse coincident with the
// first `diff_pulse` after reset or after `rearm`, and `synced` stays high from
// then on. The first edge starts the DCO in phase with the input.
//
// Timing: `diff_pulse` appears 3 clock edges after the input changes
// (2 synchroniser flops + 1 register). The synchroniser is this design's
// addition; the XOR differentiator and the one-shot follow the block diagram.
module dfed (
  input  logic clk,
  input  logic rst_n,
  input  logic din,        // raw data input (NRZ)
  input  logic rearm,      // re-arm the one-shot (resynchronise)
  output logic diff_pulse, // one-cycle pulse per input transition
  output logic first_edge, // pulse on the first transition after arming
  output logic synced      // a first edge has been seen
);
  logic s1, s2, d_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1     <= 1'b0;
      s2     <= 1'b0;
      d_prev <= 1'b0;
    end else begin
      s1     <= din;
      s2     <= s1;
      d_prev <= s2;
    end
  end

  assign diff_pulse = s2 ^ d_prev;
  assign first_edge = diff_pulse & ~synced & ~rearm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          synced <= 1'b0;
    else if (rearm)      synced <= 1'b0;
    else if (diff_pulse) synced <= 1'b1;
  end
endmodule
