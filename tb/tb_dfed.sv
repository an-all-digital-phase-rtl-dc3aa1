// tb_dfed: checks the differentiator with first-edge detection.
// Random input bits are applied at the falling clock edge; a reference
// pipeline (three samples) predicts diff_pulse = one pulse per input
// transition, three edges later, first_edge = the first such pulse after reset
// or after rearm, and synced.
module tb_dfed;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0, rearm = 1'b0;
  logic diff_pulse, first_edge, synced;
  int checks = 0, failures = 0, n_first = 0;
  logic [2:0] hist;
  bit seen;

  dfed dut (.clk, .rst_n, .din, .rearm, .diff_pulse, .first_edge, .synced);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t %s", $time, what); end
  endtask

  initial begin
    hist = '0; seen = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      // synced register: rearm wins, a pulse sets it
      if (rearm) seen = 0;
      else if (hist[1] ^ hist[2]) seen = 1;
      hist = {hist[1:0], din};          // what the two synchroniser flops and D hold
      #1;
      check(diff_pulse == (hist[1] ^ hist[2]), "diff_pulse");
      check(first_edge == ((hist[1] ^ hist[2]) && !seen && !rearm), "first_edge");
      check(synced == seen, "synced");
      if (first_edge) n_first++;
      @(negedge clk);
      rearm = (i % 500 == 250);
      if ($urandom_range(0, 3) == 0) din = ~din;
    end
    check(n_first >= 5, "first edge re-armed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
