// jk_pd: JK flip-flop phase detector.
//
// `s` (J) sets the flip-flop and `c` (K) clears it, both one-cycle pulses on
// the high-speed clock. `q` is high from the set pulse to the clear pulse, so
// its width is the phase difference of the two pulse streams; `qn` is its
// complement (the "0" output of the block diagram).
//
// When set and clear arrive in the same cycle the two edges are in phase and
// the phase difference is zero, so the flip-flop is cleared. This is this
// design's choice: a textbook JK flip-flop would toggle there.
module jk_pd (
  input  logic clk,
  input  logic rst_n,
  input  logic s,
  input  logic c,
  output logic q,
  output logic qn
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (c)  q <= 1'b0;
    else if (s)  q <= 1'b1;
  end
  assign qn = ~q;
endmodule
