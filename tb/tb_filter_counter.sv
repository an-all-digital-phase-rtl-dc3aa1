// tb_filter_counter: drives `active` high for random lengths L and checks
// that in the last active cycle err equals the number of cycles since the
// setting edge (L), that err is 1 while inactive, and that it saturates.
module tb_filter_counter;
  localparam int W = 6;
  logic clk = 1'b0, rst_n = 1'b0, active = 1'b0;
  logic [W-1:0] err;
  int checks = 0, failures = 0;

  filter_counter #(.W(W)) dut (.clk, .rst_n, .active, .err);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t %s", $time, what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      int len, idle;
      len  = (i % 50 == 7) ? 100 : $urandom_range(1, 40);
      idle = $urandom_range(2, 5);
      for (int j = 0; j < idle; j++) begin
        @(negedge clk);
        active = 1'b0;
        // the first idle cycle still shows the count of the last active one
        if (j > 0) check(err == 1, "idle value");
      end
      // the set pulse is the cycle before active rises
      for (int k = 1; k <= len; k++) begin
        @(negedge clk);
        active = 1'b1;
        // value visible in the k-th active cycle: cycles since the set pulse
        check(int'(err) == ((k > (1 << W) - 1) ? (1 << W) - 1 : (k == 1 ? 1 : k)),
              $sformatf("err=%0d in active cycle %0d", err, k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
