// clock_controller: hands the search commands to the two oscillators of the
// clock pair at safe times.
//
// Both oscillators are driven from registered commands that change only when
// the frequency tracker signals `apply` (the start of a preset region), never
// while a window is being measured.
//   trk_cmd: "tracking commands" for ring oscillator #2, follow every update;
//   out_cmd: "locked commands" for ring oscillator #1 (the output clock),
//            copied from the tracker only when the decision is locked, so the
//            output clock does not wander during a search.
// `locked` reports that out_cmd holds a locked setting and the last decision
// was locked. The output oscillator starts at the same Mid setting as the
// tracker. The gating rule is this design's reading of "a clock controller
// to decide correct controlled timing at changing commands".
module clock_controller (
  input  logic                trk_clk,
  input  logic                rst_n,
  input  logic                apply,
  input  crc_pkg::osc_cmd_t   cmd,
  input  crc_pkg::trk_state_e state,
  output crc_pkg::osc_cmd_t   trk_cmd,
  output crc_pkg::osc_cmd_t   out_cmd,
  output logic                locked,
  output logic                ever_locked
);
  import crc_pkg::*;

  always_ff @(posedge trk_clk or negedge rst_n) begin
    if (!rst_n) begin
      trk_cmd     <= '{coarse: CW'(1) << (CW - 1), fine: FW'(1) << (FW - 1)};
      out_cmd     <= '{coarse: CW'(1) << (CW - 1), fine: FW'(1) << (FW - 1)};
      locked      <= 1'b0;
      ever_locked <= 1'b0;
    end else if (apply) begin
      trk_cmd <= cmd;
      locked  <= (state == TRK_LOCKED);
      if (state == TRK_LOCKED) begin
        out_cmd     <= cmd;
        ever_locked <= 1'b1;
      end
    end
  end
endmodule
