// clk_divider: programmable integer clock divider (the 1/N, 1/M and 1/L
// dividers of the clock generator).
//
// A counter runs 0 .. div-1 on `clk_in`; `clk_out` is high for the first
// ceil(div/2) counts, and `tick` marks count 0. With div <= 1 the input clock
// is passed straight through (divide by one), so `clk_out` is then a gated
// copy of `clk_in`; this bypass is this design's choice. The division ratio
// may change at any time and takes effect at the next wrap.
module clk_divider #(
  parameter int unsigned W = 8
) (
  input  logic         clk_in,
  input  logic         rst_n,
  input  logic [W-1:0] div,
  output logic         clk_out,
  output logic         tick
);
  logic [W-1:0] cnt;
  logic         q;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n)                 cnt <= '0;
    else if (cnt >= div - W'(1)) cnt <= '0;
    else                        cnt <= cnt + W'(1);
  end

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= (cnt >= div - W'(1)) || (cnt < ((div - W'(1)) >> 1));
  end

  assign tick    = (cnt == '0);
  assign clk_out = (div <= W'(1)) ? clk_in : q;
endmodule
