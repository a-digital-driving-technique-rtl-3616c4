// amoled_pkg: types and constants shared by the delta-sigma AMOLED driver.
//
// The panel is a 2.2-inch QVGA AMOLED with 240 columns (x3 RGB data lines)
// and 320 scan lines. Every pixel of every colour gets one 1-bit
// pulse-density sample per sub-field; the driver handles one pixel (three
// colours) per clock, so the oversampling ratio is
//   OSR = f_clk / (ROWS * COLS * frame_rate)
// which gives about 7 at 32 MHz and 17 at 80 MHz for a 60 Hz video source.
// Panel size, colour depth, source-driver count and stage count follow the
// published system; the 60 Hz video rate is this design's assumption.
package amoled_pkg;

  localparam int unsigned PANEL_ROWS   = 320;  // scan lines
  localparam int unsigned PANEL_COLS   = 240;  // pixel columns (x3 data lines)
  localparam int unsigned GRAY_W       = 8;    // input gray-level width
  localparam int unsigned SD_COUNT     = 4;    // source drivers
  localparam int unsigned SD_DEPTH     = 64;   // shift-register stages per source driver
  localparam int unsigned SCAN_PHASES  = 4;    // scan driver clock phases
  localparam int unsigned VIDEO_FPS    = 60;   // assumed video frame rate

  // One 1-bit PDM sample for each colour of a pixel.
  typedef struct packed {
    logic r;
    logic g;
    logic b;
  } rgb1_t;

  // One 8-bit gray level for each colour of a pixel.
  typedef struct packed {
    logic [GRAY_W-1:0] r;
    logic [GRAY_W-1:0] g;
    logic [GRAY_W-1:0] b;
  } rgb8_t;

  // DVI control tokens (10-bit TMDS words sent while data enable is low).
  localparam logic [9:0] TMDS_CTRL_00 = 10'b1101010100;
  localparam logic [9:0] TMDS_CTRL_01 = 10'b0010101011;
  localparam logic [9:0] TMDS_CTRL_10 = 10'b0101010100;
  localparam logic [9:0] TMDS_CTRL_11 = 10'b1010101011;

  // Oversampling ratio (sub-fields per video frame), rounded to nearest.
  function automatic int unsigned osr(input longint unsigned f_clk_hz,
                                      input int unsigned rows,
                                      input int unsigned cols,
                                      input int unsigned fps);
    longint unsigned clocks_per_frame = longint'(rows) * cols * fps;
    return int'((f_clk_hz + clocks_per_frame / 2) / clocks_per_frame);
  endfunction

endpackage
