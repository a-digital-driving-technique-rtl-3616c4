// amoled_driver_fpga: the FPGA half of the delta-sigma AMOLED driver.
//
// Video side (clk_vid, the recovered TMDS pixel clock): three TMDS decoders
// turn the aligned 10-bit channel words back into 24-bit RGB; DVI carries
// hsync/vsync as the control bits of the blue channel. Each colour passes a
// programmable gamma table and video_capture writes it into that colour's
// frame buffer in raster order.
//
// Panel side (clk_drv, 32-80 MHz): drive_controller walks over all pixels
// once per sub-field, one pixel per clock. For each colour, the pixel's gray
// level and stored error are read from the frame buffer, one 8-bit adder
// (dsm_modulator) forms the next pulse-density bit and error, and the error
// is written back. The three bits of a pixel leave on sd_din together with
// the source-driver shift enables; sd_load latches a finished line; scan_ck
// and scan_stv run the panel's 4-phase scan driver.
//
// Timing: sd_din/sd_shift are valid two clk_drv cycles after the read
// address. The two clock domains meet only in the frame buffers; a frame
// written while it is displayed may show parts of both frames in one
// sub-field. rst_vid_n and rst_drv_n reset their domains; releasing
// rst_drv_n starts a first sub-field in which every pixel's error is taken
// as zero.
//
// The block structure (one adder and one frame buffer per colour, TMDS
// input, four source drivers, 4-phase scan driver) follows the document; the
// gamma table port, the pipeline and the reset behaviour are this design's.
// Only the blue channel's data enable and vsync (control bit C1) are used
// for addressing; the other decoder control outputs are left unconnected
// on purpose, which lint reports as unused signals.
module amoled_driver_fpga
  import amoled_pkg::*;
#(
  parameter int unsigned ROWS   = PANEL_ROWS,
  parameter int unsigned COLS   = PANEL_COLS,
  parameter int unsigned NUM_SD = SD_COUNT,
  localparam int unsigned AW    = $clog2(ROWS * COLS)
) (
  // video side
  input  logic                   clk_vid,
  input  logic                   rst_vid_n,
  input  logic [9:0]             tmds_r,
  input  logic [9:0]             tmds_g,
  input  logic [9:0]             tmds_b,
  input  logic                   gamma_en,
  input  logic                   gamma_we,
  input  logic [1:0]             gamma_sel,   // 0: red, 1: green, 2: blue
  input  logic [GRAY_W-1:0]      gamma_addr,
  input  logic [GRAY_W-1:0]      gamma_data,
  output logic                   frame_done,  // last panel pixel written
  // panel side
  input  logic                   clk_drv,
  input  logic                   rst_drv_n,
  output rgb1_t                  sd_din,
  output logic [NUM_SD-1:0]      sd_shift,
  output logic                   sd_load,
  output logic [SCAN_PHASES-1:0] scan_ck,
  output logic                   scan_stv,
  output logic [31:0]            subfield_cnt
);

  // ---------------- video side ----------------
  logic       de_r, de_g, de_b;
  logic [1:0] c_r, c_g, c_b;
  rgb8_t      dec_pix, gam_pix, wr_pix;
  logic       de_q, vsync_q;
  logic          wr_en;
  logic [AW-1:0] wr_addr;

  tmds_decoder u_dec_r (.clk(clk_vid), .rst_n(rst_vid_n), .q(tmds_r), .de(de_r), .ctrl(c_r), .d(dec_pix.r));
  tmds_decoder u_dec_g (.clk(clk_vid), .rst_n(rst_vid_n), .q(tmds_g), .de(de_g), .ctrl(c_g), .d(dec_pix.g));
  tmds_decoder u_dec_b (.clk(clk_vid), .rst_n(rst_vid_n), .q(tmds_b), .de(de_b), .ctrl(c_b), .d(dec_pix.b));

  gamma_lut #(.W(GRAY_W)) u_gam_r (.clk(clk_vid), .rst_n(rst_vid_n), .en(gamma_en),
    .cfg_we(gamma_we && gamma_sel == 2'd0), .cfg_addr(gamma_addr), .cfg_data(gamma_data),
    .din(dec_pix.r), .dout(gam_pix.r));
  gamma_lut #(.W(GRAY_W)) u_gam_g (.clk(clk_vid), .rst_n(rst_vid_n), .en(gamma_en),
    .cfg_we(gamma_we && gamma_sel == 2'd1), .cfg_addr(gamma_addr), .cfg_data(gamma_data),
    .din(dec_pix.g), .dout(gam_pix.g));
  gamma_lut #(.W(GRAY_W)) u_gam_b (.clk(clk_vid), .rst_n(rst_vid_n), .en(gamma_en),
    .cfg_we(gamma_we && gamma_sel == 2'd2), .cfg_addr(gamma_addr), .cfg_data(gamma_data),
    .din(dec_pix.b), .dout(gam_pix.b));

  // delay data enable and vsync by the gamma table's clock
  always_ff @(posedge clk_vid or negedge rst_vid_n) begin
    if (!rst_vid_n) begin
      de_q    <= 1'b0;
      vsync_q <= 1'b0;
    end else begin
      de_q    <= de_b;
      vsync_q <= ~de_b & c_b[1];
    end
  end

  video_capture #(.ROWS(ROWS), .COLS(COLS)) u_cap (
    .clk(clk_vid), .rst_n(rst_vid_n), .de(de_q), .vsync(vsync_q), .pix(gam_pix),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_pix(wr_pix), .frame_done(frame_done));

  // ---------------- panel side ----------------
  logic              rd_en, wb_en, first_s1;
  logic [AW-1:0]     rd_addr, wb_addr;
  rgb8_t             fb_pix, fb_err, new_err;
  logic [2:0]        y_valid;

  drive_controller #(.ROWS(ROWS), .COLS(COLS), .NUM_SD(NUM_SD)) u_ctl (
    .clk(clk_drv), .rst_n(rst_drv_n),
    .rd_en(rd_en), .rd_addr(rd_addr),
    .wb_en(wb_en), .wb_addr(wb_addr), .first_s1(first_s1),
    .sd_shift(sd_shift), .sd_load(sd_load),
    .scan_ck(scan_ck), .scan_stv(scan_stv), .subfield_cnt(subfield_cnt));

  frame_buffer #(.DEPTH(ROWS * COLS), .W(GRAY_W)) u_fb_r (
    .clk_a(clk_vid), .we_a(wr_en), .addr_a(wr_addr), .pix_a(wr_pix.r),
    .clk_b(clk_drv), .re_b(rd_en), .raddr_b(rd_addr), .pix_b(fb_pix.r), .err_b(fb_err.r),
    .we_b(wb_en), .waddr_b(wb_addr), .err_wb(new_err.r));
  frame_buffer #(.DEPTH(ROWS * COLS), .W(GRAY_W)) u_fb_g (
    .clk_a(clk_vid), .we_a(wr_en), .addr_a(wr_addr), .pix_a(wr_pix.g),
    .clk_b(clk_drv), .re_b(rd_en), .raddr_b(rd_addr), .pix_b(fb_pix.g), .err_b(fb_err.g),
    .we_b(wb_en), .waddr_b(wb_addr), .err_wb(new_err.g));
  frame_buffer #(.DEPTH(ROWS * COLS), .W(GRAY_W)) u_fb_b (
    .clk_a(clk_vid), .we_a(wr_en), .addr_a(wr_addr), .pix_a(wr_pix.b),
    .clk_b(clk_drv), .re_b(rd_en), .raddr_b(rd_addr), .pix_b(fb_pix.b), .err_b(fb_err.b),
    .we_b(wb_en), .waddr_b(wb_addr), .err_wb(new_err.b));

  dsm_modulator #(.W(GRAY_W)) u_dsm_r (.clk(clk_drv), .rst_n(rst_drv_n), .valid_in(wb_en),
    .first(first_s1), .x(fb_pix.r), .e_in(fb_err.r), .e_out(new_err.r), .y(sd_din.r), .y_valid(y_valid[0]));
  dsm_modulator #(.W(GRAY_W)) u_dsm_g (.clk(clk_drv), .rst_n(rst_drv_n), .valid_in(wb_en),
    .first(first_s1), .x(fb_pix.g), .e_in(fb_err.g), .e_out(new_err.g), .y(sd_din.g), .y_valid(y_valid[1]));
  dsm_modulator #(.W(GRAY_W)) u_dsm_b (.clk(clk_drv), .rst_n(rst_drv_n), .valid_in(wb_en),
    .first(first_s1), .x(fb_pix.b), .e_in(fb_err.b), .e_out(new_err.b), .y(sd_din.b), .y_valid(y_valid[2]));

  // every bit shifted into a source driver is a fresh modulator output
  assert property (@(posedge clk_drv) disable iff (!rst_drv_n) |sd_shift |-> &y_valid)
    else $error("source driver shifted without a modulator output");

endmodule
