// tb_jk_pd: checks the JK phase detector against a reference flip-flop
// model (clear has priority over set, otherwise set, otherwise hold) under
// random set/clear pulses, and that qn is the complement of q.
module tb_jk_pd;
  logic clk = 1'b0, rst_n = 1'b0, s = 1'b0, c = 1'b0;
  logic q, qn, ref_q;
  int checks = 0, failures = 0, n_both = 0;

  jk_pd dut (.clk, .rst_n, .s, .c, .q, .qn);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = 1'b0;
    repeat (2) @(negedge clk);
    check_q();
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      s = ($urandom_range(0, 4) == 0);
      c = ($urandom_range(0, 4) == 0);
      if (s && c) n_both++;
      @(posedge clk);
      if (c) ref_q = 1'b0; else if (s) ref_q = 1'b1;
      #1 check_q();
    end
    checks++; if (n_both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_q();
    checks++;
    if (q !== ref_q || qn !== ~ref_q) begin
      failures++;
      if (failures < 10) $display("FAIL %0t q=%b expected %b", $time, q, ref_q);
    end
  endtask
endmodule
