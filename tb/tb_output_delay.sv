// tb_output_delay: random input bits; for every delay setting D the output
// must equal the input of D cycles earlier (D = 0: the current input),
// checked against a history kept in the testbench.
module tb_output_delay;
  localparam int DMAX = 15;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0, dout;
  logic [3:0] sel = '0;
  logic [63:0] hist = '0;
  int checks = 0, failures = 0;

  output_delay #(.DMAX(DMAX)) dut (.clk, .rst_n, .din, .sel, .dout);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      hist = {hist[62:0], din};      // hist[d-1] = input d cycles ago
      din = 1'($urandom_range(0, 1));
      if (i % 200 == 0) sel = 4'($urandom_range(0, DMAX));
      #1;
      if (i > 20) begin
        checks++;
        if (dout != ((sel == 0) ? din : hist[sel - 1])) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d", sel);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
