// tb_clock_controller: random commands and decisions, with random apply
// strobes. Checks that the tracking command follows the tracker only on
// apply, that the output command is updated only on apply with a locked
// decision, and the locked / ever_locked flags. Both start at Mid.
module tb_clock_controller;
  import crc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, apply = 1'b0;
  osc_cmd_t cmd = '0, trk_cmd, out_cmd, m_trk, m_out;
  trk_state_e state = TRK_COARSE;
  logic locked, ever_locked, m_l, m_el;
  int checks = 0, failures = 0, n_lock = 0;

  clock_controller dut (.trk_clk(clk), .rst_n, .apply, .cmd, .state, .trk_cmd, .out_cmd,
                        .locked, .ever_locked);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    m_trk = '{coarse: 5'd16, fine: 4'd8};
    m_out = m_trk; m_l = 0; m_el = 0;
    repeat (2) @(negedge clk);
    check(trk_cmd == m_trk && out_cmd == m_out && !locked && !ever_locked, "reset values");
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      cmd   = osc_cmd_t'($urandom_range(0, 511));
      state = trk_state_e'($urandom_range(1, 3));
      apply = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (apply) begin
        m_trk = cmd;
        m_l = (state == TRK_LOCKED);
        if (m_l) begin m_out = cmd; m_el = 1; n_lock++; end
      end
      #1;
      check(trk_cmd == m_trk && out_cmd == m_out && locked == m_l && ever_locked == m_el,
            $sformatf("cycle %0d", i));
    end
    check(n_lock > 10, "locked updates happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
