// tb_clk_divider: for division ratios 1..20 checks that clk_out has a
// period of exactly div input cycles with ceil(div/2) high cycles, and that
// tick marks one cycle per period; div = 1 passes the clock through.
module tb_clk_divider;
  logic clk = 1'b0, rst_n = 1'b0, clk_out, tick;
  logic [7:0] div = 8'd8;
  int checks = 0, failures = 0;

  clk_divider #(.W(8)) dut (.clk_in(clk), .rst_n, .div, .clk_out, .tick);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int d = 1; d <= 20; d++) begin
      int hi, ticks, rises;
      logic prev;
      rst_n = 1'b0; div = 8'(d);
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      if (d == 1) begin
        repeat (10) begin
          @(negedge clk); #1; check(clk_out == 1'b0, "bypass low");
          @(posedge clk); #1; check(clk_out == 1'b1, "bypass high");
        end
        continue;
      end
      repeat (2 * d) @(negedge clk);     // settle
      hi = 0; ticks = 0; rises = 0; prev = clk_out;
      for (int c = 0; c < 10 * d; c++) begin
        @(negedge clk);
        if (clk_out) hi++;
        if (tick) ticks++;
        if (clk_out && !prev) rises++;
        prev = clk_out;
      end
      check(hi == 10 * ((d + 1) / 2), $sformatf("div %0d high cycles %0d", d, hi));
      check(ticks == 10, $sformatf("div %0d ticks %0d", d, ticks));
      check(rises == 10, $sformatf("div %0d rises %0d", d, rises));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
