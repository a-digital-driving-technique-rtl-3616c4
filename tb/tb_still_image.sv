// tb_still_image: a still QVGA image from a live 60 Hz video stream, shown
// at the lowest and the highest panel clock of the system (32 and 80 MHz).
// The video source sends the same frame continuously with blanking, at a
// pixel clock that gives 60 frames per second. For each panel clock the
// driver is released from reset, the number of sub-fields that fit in one
// video frame period is measured (the oversampling ratio: about 7 at
// 32 MHz and 17 at 80 MHz), and a pixel-array model counts, over that many
// sub-fields, how often each pixel and colour was on; a gray level x must
// give exactly floor(OSR*x/256) on-sub-fields, since the modulator starts
// from zero error. The image holds all 256 gray levels.
module tb_still_image;
  import amoled_pkg::*;
  import tmds_tb_pkg::*;

  localparam int ROWS = PANEL_ROWS;
  localparam int COLS = PANEL_COLS;
  localparam int HBLANK = 16;
  localparam int VBLANK = 4;
  localparam realtime VID_HALF = 1.0e9 / (2.0 * VIDEO_FPS * (ROWS + VBLANK) * (COLS + HBLANK));

  int checks = 0, failures = 0;
  logic clk_vid = 1'b0, clk_drv = 1'b0;
  logic rst_vid_n = 1'b0, rst_drv_n = 1'b0;
  logic [9:0] tmds_r = TMDS_CTRL_00, tmds_g = TMDS_CTRL_00, tmds_b = TMDS_CTRL_00;
  logic frame_done;
  rgb1_t [COLS-1:0] data_line;
  logic [ROWS-1:0] scan_line;
  logic [31:0] subfield_cnt;
  realtime drv_half = 15.625;

  always #(VID_HALF) clk_vid = ~clk_vid;
  always #(drv_half) clk_drv = ~clk_drv;

  amoled_system dut (
    .clk_vid, .rst_vid_n, .tmds_r, .tmds_g, .tmds_b,
    .gamma_en(1'b0), .gamma_we(1'b0), .gamma_sel(2'd0), .gamma_addr(8'd0), .gamma_data(8'd0),
    .frame_done, .clk_drv, .rst_drv_n, .data_line, .scan_line, .subfield_cnt);

  function automatic logic [7:0] image(int r, int c, int ch);
    // gray ramps: every level appears, in each colour
    return 8'((r * COLS + c) * (ch + 1) + ch * 77);
  endfunction

  int d_r = 0, d_g = 0, d_b = 0;
  task automatic send(input logic [7:0] dr, dg, db, input logic de, input logic hs, input logic vs);
    @(negedge clk_vid);
    tmds_r = encode(dr, de, 2'b00, d_r);
    tmds_g = encode(dg, de, 2'b00, d_g);
    tmds_b = encode(db, de, {vs, hs}, d_b);
  endtask

  // continuous video: the same frame, over and over
  initial begin
    repeat (4) @(posedge clk_vid);
    rst_vid_n = 1'b1;
    forever begin
      for (int l = 0; l < VBLANK; l++)
        for (int i = 0; i < COLS + HBLANK; i++) send(0, 0, 0, 1'b0, i < 8, 1'b1);
      for (int r = 0; r < ROWS; r++) begin
        for (int i = 0; i < HBLANK; i++) send(0, 0, 0, 1'b0, i < 8, 1'b0);
        for (int c = 0; c < COLS; c++)
          send(image(r, c, 0), image(r, c, 1), image(r, c, 2), 1'b1, 1'b0, 1'b0);
      end
    end
  end

  // pixel-array model: level stored while a row is selected, counted when
  // the selection ends, for the first nsf selections of each row
  shortint on_cnt [ROWS][COLS][3];
  int shown [ROWS];
  int nsf = 0;
  bit counting = 0;
  int prev_row = -1;

  always @(posedge clk_drv) if (counting) begin
    int r, n;
    r = -1;
    n = 0;
    for (int i = 0; i < ROWS; i++) if (scan_line[i]) begin r = i; n++; end
    if (n > 1) begin
      failures++;
      $display("FAIL: %0d scan lines selected at once, sub-field %0d", n, subfield_cnt);
    end
    if (prev_row >= 0 && r != prev_row) begin
      shown[prev_row]++;
    end
    if (r >= 0 && shown[r] < nsf && r != prev_row) begin
      for (int c = 0; c < COLS; c++)
        for (int ch = 0; ch < 3; ch++)
          on_cnt[r][c][ch] += shortint'(data_line[c][2-ch]);
    end
    prev_row = r;
  end

  task automatic run(input realtime half_ns, input int f_mhz);
    int sf0, sf1, want, bad;
    drv_half = half_ns;
    nsf = int'(osr(longint'(f_mhz) * 1_000_000, ROWS, COLS, VIDEO_FPS));
    for (int r = 0; r < ROWS; r++) begin
      shown[r] = 0;
      for (int c = 0; c < COLS; c++) for (int ch = 0; ch < 3; ch++) on_cnt[r][c][ch] = 0;
    end
    prev_row = -1;
    // the frame buffers already hold the still image: start the panel
    @(posedge frame_done);
    @(negedge clk_drv) rst_drv_n = 1'b1;
    counting = 1;
    // sub-fields per video frame period
    @(posedge frame_done);
    sf0 = subfield_cnt;
    @(posedge frame_done);
    sf1 = subfield_cnt;
    checks++;
    $display("%0d MHz: %0d sub-fields per video frame (OSR %0d)", f_mhz, sf1 - sf0, nsf);
    if (sf1 - sf0 < nsf - 1 || sf1 - sf0 > nsf + 1) begin
      failures++;
      $display("FAIL: %0d sub-fields per frame at %0d MHz, expected about %0d", sf1 - sf0, f_mhz, nsf);
    end
    wait (shown[ROWS-1] >= nsf);
    counting = 0;
    bad = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        for (int ch = 0; ch < 3; ch++) begin
          want = (nsf * int'(image(r, c, ch))) / 256;
          checks++;
          if (int'(on_cnt[r][c][ch]) != want) begin
            failures++;
            if (bad++ < 10)
              $display("FAIL: %0d MHz pixel (%0d,%0d,%0d) on %0d of %0d sub-fields, expected %0d",
                       f_mhz, r, c, ch, on_cnt[r][c][ch], nsf, want);
          end
        end
    // stop the panel while row 0 is selected, so that the scan driver holds
    // no token that a restart would carry on
    wait (scan_line[0]);
    @(negedge clk_drv) rst_drv_n = 1'b0;
  endtask

  initial begin
    run(15.625, 32);
    run(6.25, 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(12 * 1.0e9 / VIDEO_FPS);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
