// tb_amoled_system: end-to-end test of the whole display at full QVGA size.
//
// A TMDS video source (tmds_tb_pkg) sends a test frame; the driver is held
// in reset until the frame is in the frame buffers, then runs NSF
// sub-fields. A model of the pixel array stores, for every pixel and colour,
// the data-line level present while its scan line is selected, and counts
// the sub-fields in which the pixel was on. With the modulator state
// starting at zero, a pixel of gray level x must be on in exactly
// floor(NSF*x/256) of NSF sub-fields. The test then programmes the three
// gamma tables, sends a second frame and repeats the check on the mapped
// levels. Timing checks: one scan line at a time, each selected for COLS
// clocks (the gate scan time), and ROWS*COLS clocks between two selections
// of the same row (one sub-field). It also counts the mechanisms exercised
// (gamma bypass and mapping, TMDS XOR/XNOR/inverted words, sync tokens,
// start pulse, all four scan phases and source drivers, zero start state,
// sub-field wrap) and fails for any that never happened.
module tb_amoled_system;
  import amoled_pkg::*;
  import tmds_tb_pkg::*;

  localparam int unsigned ROWS = PANEL_ROWS;
  localparam int unsigned COLS = PANEL_COLS;
  localparam int unsigned NSD  = SD_COUNT;
  localparam int unsigned NSF  = 6;        // sub-fields checked per frame
  localparam int unsigned HBLANK = 8;
  localparam int unsigned VBLANK = 3;

  int checks = 0, failures = 0;

  logic clk_vid = 1'b0, clk_drv = 1'b0;
  logic rst_vid_n = 1'b0, rst_drv_n = 1'b0;
  logic [9:0] tmds_r = TMDS_CTRL_00, tmds_g = TMDS_CTRL_00, tmds_b = TMDS_CTRL_00;
  logic gamma_en = 1'b0, gamma_we = 1'b0;
  logic [1:0] gamma_sel = '0;
  logic [7:0] gamma_addr = '0, gamma_data = '0;
  logic frame_done;
  rgb1_t [COLS-1:0] data_line;
  logic [ROWS-1:0] scan_line;
  logic [31:0] subfield_cnt;

  always #20 clk_vid = ~clk_vid;            // 25 MHz video pixel clock
  always #15.625 clk_drv = ~clk_drv;        // 32 MHz panel clock

  amoled_system dut (
    .clk_vid, .rst_vid_n, .tmds_r, .tmds_g, .tmds_b,
    .gamma_en, .gamma_we, .gamma_sel, .gamma_addr, .gamma_data, .frame_done,
    .clk_drv, .rst_drv_n, .data_line, .scan_line, .subfield_cnt);

  // ---------------- mechanism counters ----------------
  int n_gamma_bypass = 0, n_gamma_map = 0, n_xor = 0, n_xnor = 0, n_inv = 0;
  int n_hsync = 0, n_vsync = 0, n_stv = 0, n_first = 0, n_wrap = 0, n_on = 0, n_off = 0;
  int n_phase[4] = '{default: 0};
  int n_sd_on[NSD] = '{default: 0};

  // ---------------- stimulus helpers ----------------
  function automatic logic [7:0] pattern(int frame, int r, int c, int ch);
    return 8'((r * 7 + c * 13 + ch * 85 + frame * 31 + ((r * c) >> 3)) & 255);
  endfunction

  function automatic logic [7:0] gamma_fn(int ch, logic [7:0] x);
    case (ch)
      0: return 8'(255 - x);
      1: return 8'(x >> 1);
      default: return 8'((int'(x) * int'(x)) >> 8);
    endcase
  endfunction

  int disp_r, disp_g, disp_b;

  task automatic send(input logic [7:0] dr, dg, db, input logic de,
                      input logic hs, input logic vs);
    @(negedge clk_vid);
    tmds_r = encode(dr, de, 2'b00, disp_r);
    tmds_g = encode(dg, de, 2'b00, disp_g);
    tmds_b = encode(db, de, {vs, hs}, disp_b);
    if (de) begin
      if (tmds_r[8]) n_xor++; else n_xnor++;
      if (tmds_r[9]) n_inv++;
    end else begin
      if (hs) n_hsync++;
      if (vs) n_vsync++;
    end
  endtask

  task automatic send_frame(input int frame);
    for (int l = 0; l < VBLANK; l++)
      for (int i = 0; i < COLS + HBLANK; i++) send(0, 0, 0, 1'b0, i < 4, 1'b1);
    for (int r = 0; r < ROWS; r++) begin
      for (int i = 0; i < HBLANK; i++) send(0, 0, 0, 1'b0, i < 4, 1'b0);
      for (int c = 0; c < COLS; c++)
        send(pattern(frame, r, c, 0), pattern(frame, r, c, 1), pattern(frame, r, c, 2),
             1'b1, 1'b0, 1'b0);
    end
    for (int i = 0; i < HBLANK; i++) send(0, 0, 0, 1'b0, 1'b0, 1'b0);
  endtask

  // ---------------- pixel-array model ----------------
  logic [2:0] latched [ROWS][COLS];
  shortint    on_cnt  [ROWS][COLS][3];
  int         shown   [ROWS];     // completed selections per row
  int         sel_len [ROWS];     // clocks the row has been selected
  longint     last_sel[ROWS];     // cycle of the row's last selection start
  longint     cyc = 0;
  bit         counting = 0;
  int         prev_row = -1;

  function automatic int active_row();
    int r = -1, n = 0;
    for (int i = 0; i < ROWS; i++) if (scan_line[i]) begin r = i; n++; end
    return (n > 1) ? -2 : r;
  endfunction

  always @(posedge clk_drv) begin
    int r;
    cyc++;
    if (counting) begin
      r = active_row();
      if (r == -2) begin
        failures++;
        $display("FAIL: more than one scan line selected at cycle %0d", cyc);
      end
      // a selection ended: the pixel keeps the level it stored
      if (prev_row >= 0 && r != prev_row) begin
        checks++;
        if (sel_len[prev_row] != COLS) begin
          failures++;
          $display("FAIL: row %0d selected for %0d clocks, expected %0d",
                   prev_row, sel_len[prev_row], COLS);
        end
        if (shown[prev_row] < NSF) begin
          for (int c = 0; c < COLS; c++)
            for (int ch = 0; ch < 3; ch++) begin
              on_cnt[prev_row][c][ch] += shortint'(latched[prev_row][c][2-ch]);
              if (latched[prev_row][c][2-ch]) begin
                n_on++;
                n_sd_on[c / (COLS / NSD)]++;
              end else n_off++;
            end
        end
        shown[prev_row]++;
      end
      if (r >= 0) begin
        if (r != prev_row) begin
          // a new selection: check the sub-field period
          if (last_sel[r] >= 0) begin
            checks++;
            if (cyc - last_sel[r] != longint'(ROWS) * COLS) begin
              failures++;
              $display("FAIL: row %0d reselected after %0d clocks", r, cyc - last_sel[r]);
            end
          end
          last_sel[r] = cyc;
          sel_len[r] = 0;
          if (r == 0) n_stv++;
          n_phase[r % 4]++;
        end
        sel_len[r]++;
        for (int c = 0; c < COLS; c++) begin
          if (sel_len[r] > 1 && latched[r][c] != data_line[c]) begin
            failures++;
            $display("FAIL: data line of column %0d changed during row %0d", c, r);
          end
          latched[r][c] = data_line[c];
        end
      end
      prev_row = (r >= 0) ? r : -1;
    end
  end

  task automatic clear_model();
    for (int r = 0; r < ROWS; r++) begin
      shown[r] = 0;
      sel_len[r] = 0;
      last_sel[r] = -1;
      for (int c = 0; c < COLS; c++)
        for (int ch = 0; ch < 3; ch++) on_cnt[r][c][ch] = 0;
    end
    prev_row = -1;
  endtask

  task automatic run_and_check(input int frame, input bit use_gamma);
    int bad = 0;
    int exp_cnt;
    logic [7:0] x;
    clear_model();
    @(negedge clk_drv);
    rst_drv_n = 1'b1;
    counting = 1;
    // the first sub-field after reset starts from a zero modulator state
    @(posedge clk_drv);
    if (dut.u_fpga.first_s1 || dut.u_fpga.u_ctl.first0) n_first++;
    wait (shown[ROWS-1] >= NSF);
    @(posedge clk_drv);
    counting = 0;
    if (subfield_cnt >= NSF) n_wrap++;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        for (int ch = 0; ch < 3; ch++) begin
          x = pattern(frame, r, c, ch);
          if (use_gamma) x = gamma_fn(ch, x);
          exp_cnt = (NSF * int'(x)) / 256;
          checks++;
          if (int'(on_cnt[r][c][ch]) != exp_cnt) begin
            failures++;
            if (bad++ < 10)
              $display("FAIL: frame %0d pixel (%0d,%0d) colour %0d on %0d times, expected %0d",
                       frame, r, c, ch, on_cnt[r][c][ch], exp_cnt);
          end
        end
    @(negedge clk_drv);
    rst_drv_n = 1'b0;
  endtask

  initial begin
    disp_r = 0; disp_g = 0; disp_b = 0;
    repeat (4) @(posedge clk_vid);
    rst_vid_n = 1'b1;
    repeat (4) @(posedge clk_vid);

    // frame 0: gamma tables bypassed
    fork send_frame(0); join_none
    wait (frame_done);
    $display("frame 0 captured at %0t", $time);
    n_gamma_bypass++;
    repeat (16) @(posedge clk_vid);
    run_and_check(0, 1'b0);

    // programme the gamma tables, then frame 1 through them
    for (int ch = 0; ch < 3; ch++)
      for (int i = 0; i < 256; i++) begin
        @(negedge clk_vid);
        gamma_we = 1'b1; gamma_sel = 2'(ch);
        gamma_addr = 8'(i); gamma_data = gamma_fn(ch, 8'(i));
      end
    @(negedge clk_vid);
    gamma_we = 1'b0;
    gamma_en = 1'b1;
    wait fork;
    fork send_frame(1); join_none
    wait (frame_done);
    n_gamma_map++;
    repeat (16) @(posedge clk_vid);
    run_and_check(1, 1'b1);

    begin
      string names[$];
      int counts[$];
      names = '{"gamma bypass", "gamma mapping", "TMDS XOR word", "TMDS XNOR word",
                          "TMDS inverted word", "hsync token", "vsync token", "start pulse",
                          "phase 0", "phase 1", "phase 2", "phase 3", "driver 0 on",
                          "driver 1 on", "driver 2 on", "driver 3 on", "zero start state",
                          "sub-field wrap", "pixel on", "pixel off"};
      counts = '{n_gamma_bypass, n_gamma_map, n_xor, n_xnor, n_inv, n_hsync, n_vsync,
                        n_stv, n_phase[0], n_phase[1], n_phase[2], n_phase[3], n_sd_on[0],
                        n_sd_on[1], n_sd_on[2], n_sd_on[3], n_first, n_wrap, n_on, n_off};
      foreach (names[i]) begin
        checks++;
        $display("mechanism %-20s %0d", names[i], counts[i]);
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL: mechanism '%s' never happened", names[i]);
        end
      end
    end
    // the document's operating points: OSR 7 at 32 MHz and 17 at 80 MHz
    checks += 2;
    if (ROWS == 320 && COLS == 240 &&
        (osr(64'd32_000_000, ROWS, COLS, VIDEO_FPS) != 7 ||
         osr(64'd80_000_000, ROWS, COLS, VIDEO_FPS) != 17)) begin
      failures++;
      $display("FAIL: oversampling ratios do not match 7 and 17");
    end
    $display("sub-field = %0d clocks; OSR at 32 MHz = %0d, at 80 MHz = %0d",
             ROWS * COLS, osr(64'd32_000_000, ROWS, COLS, VIDEO_FPS),
             osr(64'd80_000_000, ROWS, COLS, VIDEO_FPS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(64'd40 * 64'(2 * (ROWS + VBLANK) * (COLS + HBLANK) + 2000)
      + 64'd32 * 64'(2 * (NSF + 2) * ROWS * COLS + 2000));
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
