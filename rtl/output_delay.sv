// output_delay: programmable phase delay of the recovered clock.
//
// The recovered clock is delayed by `sel` high-speed clock cycles (D phases,
// 0 .. DMAX) through a shift register, so that the output timing can be
// placed where the data is sampled safely. sel = 0 passes the input through.
// The depth DMAX is this design's choice; the published design names a fixed
// or programmable delay of D high-speed clock phases without a number.
module output_delay #(
  parameter int unsigned DMAX = (1 << crc_pkg::DW) - 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     din,
  input  logic [$clog2(DMAX+1)-1:0] sel,
  output logic                     dout
);
  logic [DMAX-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[DMAX-2:0], din};
  end

  always_comb begin
    if (sel == '0)             dout = din;
    else if (int'(sel) > DMAX) dout = sr[DMAX-1];
    else                       dout = sr[sel - 1'b1];
  end
endmodule
