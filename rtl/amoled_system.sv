// amoled_system: the delta-sigma digitally driven QVGA AMOLED display.
//
// Each pixel's OLED is switched fully on or off, so thin-film-transistor
// threshold shifts hardly change its current; gray levels come from the
// density of on-samples over time. A first-order delta-sigma modulator per
// colour sets that density without the frame-bound bit planes of PWM, which
// is what removes false contours in moving images.
//
// This top joins the FPGA driver (TMDS input, gamma tables, frame buffers,
// modulators, timing) with the panel electronics: four source drivers of
// 64 stages, each serving COLS/4 columns (x3 colours), and the panel's
// integrated 4-phase scan driver (a behavioural model). data_line carries
// the 1-bit level of every column and colour; scan_line[i] selects row i.
// Column k*COLS/4 + j of source driver k sits, after a line has been
// shifted in, at stage COLS/4-1-j.
//
// Timing: one pixel per clk_drv cycle; a scan line is selected for COLS
// cycles, a sub-field lasts ROWS*COLS cycles. The pixel array itself (two
// transistors and a capacitor per pixel, and the OLED) is analog and lies
// outside this top.
//
// The system structure (FPGA driver, four 64-stage source drivers, 4-phase
// integrated scan driver, 320x240 RGB panel) follows the document; how the
// 240 columns are split over the drivers (60 each, the upper 4 stages
// unused) and the stage-to-column order are this design's choices.
module amoled_system
  import amoled_pkg::*;
#(
  parameter int unsigned ROWS      = PANEL_ROWS,
  parameter int unsigned COLS      = PANEL_COLS,
  parameter int unsigned NUM_SD    = SD_COUNT,
  parameter int unsigned SD_STAGES = SD_DEPTH
) (
  input  logic                   clk_vid,
  input  logic                   rst_vid_n,
  input  logic [9:0]             tmds_r,
  input  logic [9:0]             tmds_g,
  input  logic [9:0]             tmds_b,
  input  logic                   gamma_en,
  input  logic                   gamma_we,
  input  logic [1:0]             gamma_sel,
  input  logic [GRAY_W-1:0]      gamma_addr,
  input  logic [GRAY_W-1:0]      gamma_data,
  output logic                   frame_done,
  input  logic                   clk_drv,
  input  logic                   rst_drv_n,
  output rgb1_t [COLS-1:0]       data_line,
  output logic  [ROWS-1:0]       scan_line,
  output logic [31:0]            subfield_cnt
);

  localparam int unsigned SD_COLS = COLS / NUM_SD;

  rgb1_t                   sd_din;
  logic [NUM_SD-1:0]       sd_shift;
  logic                    sd_load;
  logic [SCAN_PHASES-1:0]  scan_ck;
  logic                    scan_stv;
  rgb1_t [SD_STAGES-1:0]   sd_out [NUM_SD];

  amoled_driver_fpga #(.ROWS(ROWS), .COLS(COLS), .NUM_SD(NUM_SD)) u_fpga (
    .clk_vid, .rst_vid_n, .tmds_r, .tmds_g, .tmds_b,
    .gamma_en, .gamma_we, .gamma_sel, .gamma_addr, .gamma_data, .frame_done,
    .clk_drv, .rst_drv_n,
    .sd_din(sd_din), .sd_shift(sd_shift), .sd_load(sd_load),
    .scan_ck(scan_ck), .scan_stv(scan_stv), .subfield_cnt(subfield_cnt));

  for (genvar k = 0; k < NUM_SD; k++) begin : g_sd
    source_driver #(.STAGES(SD_STAGES)) u_sd (
      .clk(clk_drv), .rst_n(rst_drv_n), .shift(sd_shift[k]), .din(sd_din),
      .load(sd_load), .dout(sd_out[k]));
    for (genvar j = 0; j < SD_COLS; j++) begin : g_col
      assign data_line[k*SD_COLS + j] = sd_out[k][SD_COLS-1-j];
    end
  end

  scan_driver #(.ROWS(ROWS)) u_scan (.stv(scan_stv), .ck(scan_ck), .g(scan_line));

  initial begin
    assert (SD_COLS <= SD_STAGES)
      else $error("each source driver serves more columns than it has stages");
  end

endmodule
