// tb_pf_estimator: random measurement events applied directly to the phase
// and frequency estimator; a testbench copy of the period register predicts
//   first edge:           period <- init, phase 0
//   up (DCO slow):        in1 <= T/2 ? (T - in1, phase in1) : (T, phase 0)
//   down (DCO fast):      in2 <= T/2 ? (T + in2, phase 0)   : (T, phase 0)
// and the reject / event flags. Fig. 1 cases are included as directed
// vectors: T=20, N=16 gives period 16 / phase 4; T=12, N=16 gives 16 / 0.
module tb_pf_estimator;
  localparam int W = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] init_period = 12'd20, in1 = '0, in2 = '0;
  logic first_edge = 0, in_pulse = 0, dco_pulse = 0, up_q = 0, down_q = 0;
  logic load, up_evt, down_evt, reject;
  logic [W-1:0] new_phase, new_period, period;
  int checks = 0, failures = 0, n_rej = 0, n_up = 0, n_dn = 0;
  int tref;

  pf_estimator #(.W(W)) dut (.clk, .rst_n, .init_period, .first_edge, .in_pulse, .dco_pulse,
                             .up_q, .down_q, .in1, .in2, .load, .new_phase, .new_period,
                             .period, .up_evt, .down_evt, .reject);

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

  // apply one cycle of inputs and check the combinational result
  task automatic step(input bit fe, input bit ip, input bit dp, input bit uq, input bit dq,
                      input int e1, input int e2);
    int ep, eph; bit el, er, eu, ed;
    @(negedge clk);
    first_edge = fe; in_pulse = ip; dco_pulse = dp; up_q = uq; down_q = dq;
    in1 = W'(e1); in2 = W'(e2);
    #1;
    eu = dp && uq && !fe; ed = ip && dq && !fe;
    er = (eu && e1 > tref / 2) || (ed && e2 > tref / 2);
    el = fe || eu || ed;
    if (fe)      begin ep = int'(init_period); eph = 0; end
    else if (er) begin ep = tref; eph = 0; end
    else if (ed) begin ep = tref + e2; eph = 0; end
    else         begin ep = tref - e1; eph = e1; end
    check(up_evt == eu && down_evt == ed && reject == er && load == el, "flags");
    if (el) check(int'(new_period) == ep && int'(new_phase) == eph,
                  $sformatf("T=%0d in1=%0d in2=%0d up=%0d: got %0d/%0d exp %0d/%0d",
                            tref, e1, e2, eu, new_period, new_phase, ep, eph));
    if (el) tref = ep;
    n_rej += int'(er); n_up += int'(eu && !er); n_dn += int'(ed && !er);
    @(posedge clk); #1;
    check(int'(period) == tref, "period register");
  endtask

  initial begin
    tref = 20;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Fig. 1(a): T = 20 > N = 16, M = 4
    step(1, 1, 0, 0, 0, 0, 0);
    step(0, 0, 1, 1, 0, 4, 0);
    check(period == 16 && tref == 16, "Fig.1(a) period T-M");
    // Fig. 1(b): T = 12 < N = 16, M = 4
    init_period = 12'd12;
    step(1, 1, 0, 0, 0, 0, 0);
    step(0, 1, 0, 0, 1, 0, 4);
    check(period == 16, "Fig.1(b) period T+M");
    for (int i = 0; i < 5000; i++) begin
      int kind;
      kind = $urandom_range(0, 9);
      if (tref < 8 || tref > 3000) begin
        init_period = W'($urandom_range(8, 200));
        step(1, 1, 0, 0, 0, 0, 0);
      end else if (kind < 4)
        step(0, 0, 1, 1, 0, $urandom_range(0, tref), $urandom_range(0, 50));
      else if (kind < 8)
        step(0, 1, 0, 0, 1, $urandom_range(0, 50), $urandom_range(0, tref));
      else
        step(0, $urandom_range(0, 1), $urandom_range(0, 1), 0, 0,
             $urandom_range(0, 50), $urandom_range(0, 50));
    end
    check(n_rej > 0 && n_up > 0 && n_dn > 0, "all event kinds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
