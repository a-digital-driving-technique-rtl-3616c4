// tb_gray_ramp: the moving-ramp workload. The video source sends 258 frames
// in which every pixel steps through the gray levels (red 0..255 rising,
// green falling, blue rising at half speed from a per-pixel offset), with
// the video and panel clocks set so that one video frame lasts OSR
// sub-fields, for OSR 7 and OSR 17. A pixel-array model records every
// sample each pixel receives; a probe on the modulator input records the
// gray level each sample was computed from. Because the error carries over
// between sub-fields, the number of on-samples in ANY window of consecutive
// sub-fields, wherever it starts, must equal the window's summed gray
// levels divided by 256 to within one sample: the eye's integration window
// needs no alignment with the frames. Every window of OSR and of 3*OSR
// samples is checked, for every pixel and colour. The levels read must also
// follow the ramp (each sample's level is the current or the previous
// frame's).
module tb_gray_ramp;
  import amoled_pkg::*;
  import tmds_tb_pkg::*;

  localparam int ROWS = 4, COLS = 8, NSD = 4;
  localparam int NPIX = ROWS * COLS;
  localparam int HBLANK = 8, VBLANK = 3;
  localparam int NFRAMES = 258;
  localparam int MAXS = 17 * (NFRAMES + 4);

  int checks = 0, failures = 0;
  logic clk_vid = 1'b0, clk_drv = 1'b0;
  logic rst_vid_n = 1'b0, rst_drv_n = 1'b0;
  logic [9:0] tmds_r = TMDS_CTRL_00, tmds_g = TMDS_CTRL_00, tmds_b = TMDS_CTRL_00;
  logic frame_done;
  rgb1_t [COLS-1:0] data_line;
  logic [ROWS-1:0] scan_line;
  logic [31:0] subfield_cnt;
  realtime drv_half = 5.0, vid_half = 10.0;

  always #(vid_half) clk_vid = ~clk_vid;
  always #(drv_half) clk_drv = ~clk_drv;

  amoled_system #(.ROWS(ROWS), .COLS(COLS), .NUM_SD(NSD)) dut (
    .clk_vid, .rst_vid_n, .tmds_r, .tmds_g, .tmds_b,
    .gamma_en(1'b0), .gamma_we(1'b0), .gamma_sel(2'd0), .gamma_addr(8'd0), .gamma_data(8'd0),
    .frame_done, .clk_drv, .rst_drv_n, .data_line, .scan_line, .subfield_cnt);

  function automatic logic [7:0] ramp(int k, int p, int ch);
    int f = (k > 255) ? 255 : k;
    case (ch)
      0: return 8'(f);
      1: return 8'(255 - f);
      default: return 8'(f / 2 + p * 5);
    endcase
  endfunction

  int d_r = 0, d_g = 0, d_b = 0;
  task automatic send(input logic [7:0] dr, dg, db, input logic de, input logic vs);
    @(negedge clk_vid);
    tmds_r = encode(dr, de, 2'b00, d_r);
    tmds_g = encode(dg, de, 2'b00, d_g);
    tmds_b = encode(db, de, {vs, 1'b0}, d_b);
  endtask

  task automatic video(input int first, input int nframes);
    for (int k = first; k < first + nframes; k++) begin
      for (int l = 0; l < VBLANK; l++)
        for (int i = 0; i < COLS + HBLANK; i++) send(0, 0, 0, 1'b0, 1'b1);
      for (int r = 0; r < ROWS; r++) begin
        for (int i = 0; i < HBLANK; i++) send(0, 0, 0, 1'b0, 1'b0);
        for (int c = 0; c < COLS; c++)
          send(ramp(k, r * COLS + c, 0), ramp(k, r * COLS + c, 1), ramp(k, r * COLS + c, 2),
               1'b1, 1'b0);
      end
    end
  endtask

  // gray level each computed sample came from, in order, per pixel
  logic [7:0] xq [NPIX][3][$];
  // samples as the panel received them, with their gray levels
  logic [7:0] xs [NPIX][3][MAXS];
  bit         ys [NPIX][3][MAXS];
  int         ns [NPIX];
  bit         recording = 0;
  int         prev_row = -1;
  int         n_level_changes = 0;

  always @(posedge clk_drv) if (recording) begin
    if (dut.u_fpga.wb_en) begin
      int p;
      p = int'(dut.u_fpga.wb_addr);
      xq[p][0].push_back(dut.u_fpga.fb_pix.r);
      xq[p][1].push_back(dut.u_fpga.fb_pix.g);
      xq[p][2].push_back(dut.u_fpga.fb_pix.b);
    end
  end

  always @(posedge clk_drv) if (recording) begin
    int r;
    r = -1;
    for (int i = 0; i < ROWS; i++) if (scan_line[i]) r = i;
    if (r >= 0 && r != prev_row) begin
      for (int c = 0; c < COLS; c++) begin
        int p;
        p = r * COLS + c;
        if (ns[p] < MAXS) begin
          for (int ch = 0; ch < 3; ch++) begin
            xs[p][ch][ns[p]] = xq[p][ch].pop_front();
            ys[p][ch][ns[p]] = data_line[c][2-ch];
          end
          ns[p]++;
        end
      end
    end
    prev_row = r;
  end

  task automatic check_windows(input int osr_v);
    int bad = 0;
    for (int p = 0; p < NPIX; p++)
      for (int ch = 0; ch < 3; ch++) begin
        for (int i = 1; i < ns[p]; i++) if (xs[p][ch][i] != xs[p][ch][i-1]) n_level_changes++;
        for (int m = 1; m <= 3; m += 2) begin
          int w = m * osr_v;
          for (int s = 0; s + w <= ns[p]; s++) begin
            int sx, sy;
            sx = 0; sy = 0;
            for (int i = s; i < s + w; i++) begin
              sx += int'(xs[p][ch][i]);
              sy += int'(ys[p][ch][i]);
            end
            checks++;
            if (sy * 256 - sx >= 256 || sx - sy * 256 >= 256) begin
              failures++;
              if (bad++ < 10)
                $display("FAIL: OSR %0d pixel %0d colour %0d window %0d+%0d: %0d on, levels sum %0d",
                         osr_v, p, ch, s, w, sy, sx);
            end
          end
        end
      end
  endtask

  task automatic run(input int osr_v);
    // one video frame = osr_v sub-fields
    drv_half = 5.0;
    vid_half = 5.0 * real'(osr_v * NPIX) / real'((ROWS + VBLANK) * (COLS + HBLANK));
    for (int p = 0; p < NPIX; p++) begin
      ns[p] = 0;
      for (int ch = 0; ch < 3; ch++) xq[p][ch].delete();
    end
    prev_row = -1;
    @(negedge clk_vid) rst_vid_n = 1'b1;
    video(0, 1);                        // first frame before the panel starts
    @(negedge clk_drv) rst_drv_n = 1'b1;
    recording = 1;
    video(1, NFRAMES - 1);
    recording = 0;
    wait (scan_line[0]);
    @(negedge clk_drv) rst_drv_n = 1'b0;
    @(negedge clk_vid) rst_vid_n = 1'b0;
    checks++;
    // (the video clock is rounded to whole nanoseconds, so allow 5 %)
    if (ns[0] * 100 < osr_v * (NFRAMES - 2) * 95) begin
      failures++;
      $display("FAIL: OSR %0d: only %0d samples per pixel for %0d frames", osr_v, ns[0], NFRAMES - 1);
    end
    // levels follow the ramp: red never falls, green never rises
    for (int p = 0; p < NPIX; p++)
      for (int i = 1; i < ns[p]; i++) begin
        checks++;
        if (xs[p][0][i] < xs[p][0][i-1] || xs[p][1][i] > xs[p][1][i-1]) begin
          failures++;
          $display("FAIL: OSR %0d pixel %0d levels out of ramp order at sample %0d", osr_v, p, i);
        end
      end
    check_windows(osr_v);
    $display("OSR %0d: %0d samples per pixel over %0d frames", osr_v, ns[0], NFRAMES - 1);
  endtask

  initial begin
    run(7);
    run(17);
    checks++;
    if (n_level_changes == 0) begin
      failures++;
      $display("FAIL: gray levels never changed during a run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd40_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
