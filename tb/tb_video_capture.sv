// tb_video_capture: sends frames with blanking, a vsync, extra pixels beyond
// the panel width and extra lines beyond its height, and checks that
// exactly the panel's pixels are written once each, at row*COLS+col, with
// their data, and that frame_done marks the last one.
module tb_video_capture;
  import amoled_pkg::*;
  localparam int unsigned ROWS = 6, COLS = 10;
  localparam int unsigned AW = $clog2(ROWS * COLS);

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic de = 1'b0, vsync = 1'b0;
  rgb8_t pix = '0;
  logic wr_en, frame_done;
  logic [AW-1:0] wr_addr;
  rgb8_t wr_pix;
  rgb8_t exp_pix [ROWS * COLS];
  int    written [ROWS * COLS];
  int    n_done = 0, n_writes = 0;

  always #5 clk = ~clk;

  video_capture #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .rst_n, .de, .vsync, .pix,
    .wr_en, .wr_addr, .wr_pix, .frame_done);

  always @(posedge clk) if (rst_n) begin
    if (wr_en) begin
      n_writes++;
      checks++;
      if (int'(wr_addr) >= ROWS * COLS || wr_pix !== exp_pix[wr_addr]) begin
        failures++;
        $display("FAIL: write of %h at %0d", wr_pix, wr_addr);
      end else written[wr_addr]++;
    end
    if (frame_done) begin
      n_done++;
      checks++;
      if (!wr_en || wr_addr != AW'(ROWS * COLS - 1)) begin
        failures++;
        $display("FAIL: frame_done without the last pixel");
      end
    end
  end

  task automatic frame(input int seed, input int extra_cols, input int extra_rows);
    for (int i = 0; i < ROWS * COLS; i++) begin
      exp_pix[i] = rgb8_t'(24'(i * 40503 + seed * 977));
      written[i] = 0;
    end
    @(negedge clk); vsync = 1'b1; de = 1'b0;
    repeat (3) @(negedge clk);
    vsync = 1'b0;
    for (int r = 0; r < ROWS + extra_rows; r++) begin
      repeat (4) @(negedge clk);
      de = 1'b1;
      for (int c = 0; c < COLS + extra_cols; c++) begin
        pix = (r < ROWS && c < COLS) ? exp_pix[r * COLS + c] : rgb8_t'(24'hDEAD00 + 24'(c));
        @(negedge clk);
      end
      de = 1'b0;
    end
    repeat (4) @(negedge clk);
    for (int i = 0; i < ROWS * COLS; i++) begin
      checks++;
      if (written[i] != 1) begin
        failures++;
        $display("FAIL: pixel %0d written %0d times", i, written[i]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    frame(1, 0, 0);
    frame(2, 3, 2);
    frame(3, 0, 1);
    checks++;
    if (n_done != 3) begin
      failures++;
      $display("FAIL: %0d frame_done pulses, expected 3", n_done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
