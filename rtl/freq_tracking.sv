// freq_tracking: frequency-tracking module of the on-chip clock generator.
//
// Runs on the tracking oscillator's clock `trk_clk` and compares it with the
// divided reference `ref_div` (reference / N).
//
// Window generator: the rising edges of ref_div (through a two-flop
// synchroniser) bound the windows. Windows alternate between an active region
// of WIN ref_div periods, in which the tracking-clock cycles C are counted,
// and a preset region of one ref_div period, in which new commands settle in
// the oscillator and nothing is measured. The target is C = WIN * m_target
// (the 1/M divider of the loop: the tracking clock divided by M must match
// reference / N; counting over WIN periods gives WIN times the resolution).
//
// Decision, at the end of each active window, from e = C - WIN*M:
//   |e| <= LOCK_TH            -> locked: commands kept;
//   LOCK_TH < |e| <= SEARCH_TH -> fine search ("fix-step"): the combined
//                                command {I, II} moves by one fine step, the
//                                fine word II carrying into the coarse word I;
//   |e| > SEARCH_TH           -> coarse search ("prune-and-search"): the
//                                coarse word I moves by range/2^i with i
//                                growing by one per coarse step (binary
//                                search), II unchanged.
// fast (C > M: oscillator too fast) moves the commands towards more delay.
// The search never stops (recycled action), so drift is followed.
//
// The commands start at Mid, the middle of the range. The first coarse step
// is a quarter of the coarse range (i = 2). Window timing, thresholds and
// step start are this design's choices; the three states and the update
// rules are the published ones.
module freq_tracking #(
  parameter int unsigned CW        = crc_pkg::CW,
  parameter int unsigned FW        = crc_pkg::FW,
  parameter int unsigned CNW       = crc_pkg::CNW,
  parameter int unsigned WIN       = 4,
  parameter int unsigned LOCK_TH   = 1,
  parameter int unsigned SEARCH_TH = 8
) (
  input  logic                trk_clk,
  input  logic                rst_n,
  input  logic                ref_div,   // reference / N (asynchronous)
  input  logic [CNW-1:0]      m_target,  // M
  output crc_pkg::osc_cmd_t   cmd,       // {I coarse, II fine}
  output crc_pkg::trk_state_e state,     // last decision
  output logic                fast,      // last decision: too fast
  output logic                apply,     // one cycle: cmd/state just updated
  output logic [CNW-1:0]      count      // last measured C
);
  import crc_pkg::*;

  typedef enum logic [1:0] {W_IDLE, W_ACTIVE, W_PRESET} win_e;

  localparam int unsigned TW = CW + FW;
  localparam int unsigned SW = $clog2(CW + 1);

  logic           r1, r2, r3, bdry;
  localparam int unsigned BW = $clog2(WIN + 1);

  logic [CNW-1:0] cnt;
  logic [BW-1:0]  nb;
  win_e           win;
  logic [CNW-1:0] target;
  logic [SW-1:0]  step_i;
  logic [TW-1:0]  word;

  // window boundaries from the synchronised reference / N
  always_ff @(posedge trk_clk or negedge rst_n) begin
    if (!rst_n) {r1, r2, r3} <= '0;
    else        {r1, r2, r3} <= {ref_div, r1, r2};
  end
  assign bdry = r2 & ~r3;

  assign target = CNW'(m_target * CNW'(WIN));

  // cycle counter: restarts at the start of a window, runs over WIN periods
  logic win_end;
  assign win_end = bdry && (win != W_ACTIVE || int'(nb) >= WIN - 1);

  always_ff @(posedge trk_clk or negedge rst_n) begin
    if (!rst_n)            cnt <= CNW'(1);
    else if (win_end)      cnt <= CNW'(1);
    else if (cnt != '1)    cnt <= cnt + CNW'(1);
  end

  always_ff @(posedge trk_clk or negedge rst_n) begin
    if (!rst_n)       nb <= '0;
    else if (win_end) nb <= '0;
    else if (bdry)    nb <= nb + BW'(1);
  end

  // decision on the count of the window that ends now
  logic [CNW:0] diff, mag;
  logic         too_fast;
  trk_state_e   dec;
  always_comb begin
    diff     = {1'b0, cnt} - {1'b0, target};
    too_fast = cnt > target;
    mag      = too_fast ? diff : -diff;
    if (mag <= (CNW+1)'(LOCK_TH))        dec = TRK_LOCKED;
    else if (mag <= (CNW+1)'(SEARCH_TH)) dec = TRK_FINE;
    else                                 dec = TRK_COARSE;
  end

  // command update
  logic [TW:0]   wsum;
  logic [CW:0]   csum;
  logic [CW-1:0] cstep;
  always_comb begin
    cstep = (int'(step_i) >= CW) ? CW'(1) : CW'(1) << (CW - int'(step_i));
    wsum  = too_fast ? ({1'b0, word} + (TW+1)'(1)) : ({1'b0, word} - (TW+1)'(1));
    csum  = too_fast ? ({1'b0, cmd.coarse} + {1'b0, cstep})
                     : ({1'b0, cmd.coarse} - {1'b0, cstep});
  end
  assign word = cmd;

  always_ff @(posedge trk_clk or negedge rst_n) begin
    if (!rst_n) begin
      win        <= W_IDLE;
      cmd.coarse <= CW'(1) << (CW - 1);
      cmd.fine   <= FW'(1) << (FW - 1);
      state      <= TRK_COARSE;
      fast       <= 1'b0;
      apply      <= 1'b0;
      count      <= '0;
      step_i     <= SW'(2);
    end else begin
      apply <= 1'b0;
      if (win_end) begin
        unique case (win)
          W_IDLE:   win <= W_ACTIVE;
          W_PRESET: win <= W_ACTIVE;
          W_ACTIVE: begin
            win   <= W_PRESET;
            apply <= 1'b1;
            state <= dec;
            fast  <= too_fast;
            count <= cnt;
            unique case (dec)
              TRK_COARSE: begin
                // prune and search: saturate at the ends of the band
                if (csum[CW])      cmd.coarse <= too_fast ? '1 : '0;
                else               cmd.coarse <= csum[CW-1:0];
                if (int'(step_i) < CW) step_i <= step_i + SW'(1);
              end
              TRK_FINE: begin
                // fix step with carry between fine and coarse words
                if (!wsum[TW])     cmd <= wsum[TW-1:0];
              end
              default: ;
            endcase
          end
          default: win <= W_IDLE;
        endcase
      end
    end
  end
endmodule
