// tb_amoled_driver_fpga: checks the FPGA driver's output bit stream.
// A TMDS frame is sent to a 4x8 panel-sized driver; after the driver is
// released from reset, every sample shifted out must equal the carry of a
// reference first-order delta-sigma modulator kept per pixel and colour
// (error starting at zero), must go to the source driver owning its column,
// and the lines must be latched once per COLS clocks. A second run passes
// the frame through programmed gamma tables.
module tb_amoled_driver_fpga;
  import amoled_pkg::*;
  import tmds_tb_pkg::*;
  localparam int ROWS = 4, COLS = 8, NSD = 4, NSF = 20;

  int checks = 0, failures = 0;
  logic clk_vid = 1'b0, clk_drv = 1'b0, rst_vid_n = 1'b0, rst_drv_n = 1'b0;
  logic [9:0] tmds_r = TMDS_CTRL_00, tmds_g = TMDS_CTRL_00, tmds_b = TMDS_CTRL_00;
  logic gamma_en = 1'b0, gamma_we = 1'b0;
  logic [1:0] gamma_sel = '0;
  logic [7:0] gamma_addr = '0, gamma_data = '0;
  logic frame_done, sd_load, scan_stv;
  rgb1_t sd_din;
  logic [NSD-1:0] sd_shift;
  logic [3:0] scan_ck;
  logic [31:0] subfield_cnt;

  always #20 clk_vid = ~clk_vid;
  always #6 clk_drv = ~clk_drv;

  amoled_driver_fpga #(.ROWS(ROWS), .COLS(COLS), .NUM_SD(NSD)) dut (
    .clk_vid, .rst_vid_n, .tmds_r, .tmds_g, .tmds_b, .gamma_en, .gamma_we, .gamma_sel,
    .gamma_addr, .gamma_data, .frame_done, .clk_drv, .rst_drv_n, .sd_din, .sd_shift,
    .sd_load, .scan_ck, .scan_stv, .subfield_cnt);

  int d_r = 0, d_g = 0, d_b = 0;
  logic [7:0] level [ROWS * COLS][3];
  int err [ROWS * COLS][3];
  int pix = 0, shifts = 0, loads = 0, since_load = 0;
  bit running = 0;

  function automatic logic [7:0] gam(int ch, logic [7:0] x);
    return (ch == 0) ? 8'(255 - x) : (ch == 1) ? 8'(x >> 2) : 8'(x ^ 8'h5A);
  endfunction

  task automatic send(input logic [7:0] dr, dg, db, input logic de, input logic vs);
    @(negedge clk_vid);
    tmds_r = encode(dr, de, 2'b00, d_r);
    tmds_g = encode(dg, de, 2'b00, d_g);
    tmds_b = encode(db, de, {vs, 1'b0}, d_b);
  endtask

  task automatic send_frame(input int seed, input bit mapped);
    logic [7:0] v [3];
    repeat (6) send(0, 0, 0, 1'b0, 1'b1);
    for (int r = 0; r < ROWS; r++) begin
      repeat (5) send(0, 0, 0, 1'b0, 1'b0);
      for (int c = 0; c < COLS; c++) begin
        for (int ch = 0; ch < 3; ch++) begin
          v[ch] = 8'($urandom);
          if (seed == 0 && r == 0 && c < 2) v[ch] = (c == 0) ? 8'd0 : 8'd255;
          level[r * COLS + c][ch] = mapped ? gam(ch, v[ch]) : v[ch];
        end
        send(v[0], v[1], v[2], 1'b1, 1'b0);
      end
    end
    repeat (5) send(0, 0, 0, 1'b0, 1'b0);
  endtask

  always @(posedge clk_drv) if (running) begin
    if (sd_load) begin
      loads++;
      checks++;
      if (since_load != COLS) begin
        failures++;
        $display("FAIL: %0d samples between line loads", since_load);
      end
      since_load = 0;
    end
    if (|sd_shift) begin
      int col;
      rgb1_t want;
      col = pix % COLS;
      for (int ch = 0; ch < 3; ch++) err[pix][ch] += level[pix][ch];
      want = {err[pix][0] >= 256, err[pix][1] >= 256, err[pix][2] >= 256};
      for (int ch = 0; ch < 3; ch++) err[pix][ch] %= 256;
      checks += 2;
      if (sd_shift != NSD'(1 << (col / (COLS / NSD)))) begin
        failures++;
        $display("FAIL: column %0d shifted into drivers %b", col, sd_shift);
      end
      if (sd_din !== want) begin
        failures++;
        $display("FAIL: sample %0d pixel %0d bits %b expected %b", shifts, pix, sd_din, want);
      end
      shifts++;
      since_load++;
      pix = (pix + 1) % (ROWS * COLS);
    end
  end

  task automatic run();
    for (int p = 0; p < ROWS * COLS; p++) for (int ch = 0; ch < 3; ch++) err[p][ch] = 0;
    pix = 0; shifts = 0; loads = 0; since_load = 0;
    @(negedge clk_drv);
    rst_drv_n = 1'b1; running = 1;
    // three clocks of latency (controller start, read, modulator), then
    // one sample per clock
    repeat (NSF * ROWS * COLS + 3) @(posedge clk_drv);
    #1 running = 0;
    checks += 2;
    if (shifts != NSF * ROWS * COLS) begin
      failures++;
      $display("FAIL: %0d samples in %0d clocks, expected one per clock", shifts, NSF * ROWS * COLS + 3);
    end
    if (loads != NSF * ROWS - 1) begin
      failures++;
      $display("FAIL: %0d line loads, expected %0d", loads, NSF * ROWS - 1);
    end
    @(negedge clk_drv) rst_drv_n = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk_vid);
    rst_vid_n = 1'b1;
    send_frame(0, 1'b0);
    repeat (4) @(posedge clk_vid);
    run();
    for (int ch = 0; ch < 3; ch++)
      for (int i = 0; i < 256; i++) begin
        @(negedge clk_vid);
        gamma_we = 1'b1; gamma_sel = 2'(ch); gamma_addr = 8'(i); gamma_data = gam(ch, 8'(i));
      end
    @(negedge clk_vid);
    gamma_we = 1'b0; gamma_en = 1'b1;
    send_frame(1, 1'b1);
    repeat (4) @(posedge clk_vid);
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
