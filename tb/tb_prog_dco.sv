// tb_prog_dco: checks the programmable DCO.
// An expected-edge tracker is kept in the testbench: after a start in cycle
// s with period P the edges are s, s+P, s+2P, ...; after a load with phase
// ph and period P2 in cycle l the next edge is l + P2 - ph, then every P2,
// and a load to phase 0 past the middle of the period is itself an edge.
// Each cycle the DUT's pulse must equal "this cycle is an expected edge";
// dco_clk must be high for ceil(P/2) cycles per period; after stop there are
// no edges. Starts, loads (phase jumps and period changes) and stops are
// random.
module tb_prog_dco;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, load = 1'b0, stop = 1'b0;
  logic [W-1:0] load_phase = '0, load_period = 8'd10;
  logic pulse, dco_clk, running;
  logic [W-1:0] cnt, per;
  int checks = 0, failures = 0;
  int cyc = 0, next_edge = -1, cur_p = 0, hi = 0, n_loads = 0, n_starts = 0, n_stops = 0;
  bit run_m = 0;

  prog_dco #(.W(W)) dut (.clk, .rst_n, .start, .load, .realign(load && load_phase == 0), .stop,
                         .load_phase, .load_period,
                         .pulse, .dco_clk, .running, .cnt, .per);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL cyc %0d %s", cyc, what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      cyc++;
      // choose this cycle's controls
      start = 1'b0; load = 1'b0; stop = 1'b0;
      if (!run_m || $urandom_range(0, 299) == 0) begin
        if ($urandom_range(0, 3) == 0 || !run_m) begin
          start = 1'b1; load_period = W'($urandom_range(2, 40));
        end
      end else if ($urandom_range(0, 59) == 0) begin
        load = 1'b1;
        load_period = W'($urandom_range(2, 40));
        load_phase  = W'($urandom_range(0, int'(load_period) - 1));
      end else if ($urandom_range(0, 999) == 0) begin
        stop = 1'b1;
      end
      #1;
      // model: a load acts on the following cycles, the current cycle keeps
      // its edge; start makes this cycle an edge, stop removes it
      if (stop) begin
        run_m = 0; next_edge = -1; n_stops++;
      end else if (start) begin
        run_m = 1; cur_p = int'(load_period); next_edge = cyc; hi = 0; n_starts++;
      end
      // a load to phase 0 in the second half of the period gives the due edge now
      check(pulse == (run_m && (cyc == next_edge ||
                               (load && !start && !stop && load_phase == 0 &&
                                cur_p - (next_edge - cyc) > cur_p / 2))),
            $sformatf("pulse=%0d expected edge at %0d", pulse, next_edge));
      if (load && !stop && !start) begin
        cur_p = int'(load_period);
        next_edge = cyc + cur_p - int'(load_phase);
        n_loads++;
      end else if (run_m && cyc == next_edge) begin
        next_edge = cyc + cur_p;
      end
      // duty: dco_clk high in the first ceil(P/2) cycles after an edge
      if (run_m && !start && !load && !stop && cyc > 2)
        check(dco_clk == ((cur_p - (next_edge - cyc)) % cur_p < (cur_p + 1) / 2),
              "dco_clk duty");
    end
    check(n_loads > 10 && n_starts > 10 && n_stops > 2, "all controls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
