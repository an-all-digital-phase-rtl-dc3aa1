// crc_pkg: widths, types and defaults shared by the clock-recovery and
// clock-generator RTL.
//
// All periods and phase errors of the clock recovery are integers counted in
// cycles of the high-speed reference clock (the "normalised" time unit of the
// design). The widths below are this design's choice; the published design
// gives no word widths.
package crc_pkg;

  // Width of a normalised period / phase error (high-speed clock cycles).
  localparam int unsigned PW = 12;
  // Width of the k ("M-time") setting of the multiple-frequency generator.
  localparam int unsigned KW = 4;
  // Width of the programmable output delay selector (D phases).
  localparam int unsigned DW = 4;

  // Clock generator: coarse (path selector) and fine (delay matrix) command
  // widths, and width of the window counter of the frequency tracker.
  localparam int unsigned CW  = 5;
  localparam int unsigned FW  = 4;
  localparam int unsigned CNW = 10;

  typedef logic [PW-1:0] period_t;

  // Decision of the frequency tracker (Fig. 8 numbering: 1 coarse, 2 fine,
  // 3 locked).
  typedef enum logic [1:0] {
    TRK_COARSE = 2'd1,
    TRK_FINE   = 2'd2,
    TRK_LOCKED = 2'd3
  } trk_state_e;

  // Combined oscillator command: coarse word I (path selector) and fine word
  // II (delay matrix). The fine word carries into the coarse word.
  typedef struct packed {
    logic [CW-1:0] coarse;
    logic [FW-1:0] fine;
  } osc_cmd_t;

endpackage
