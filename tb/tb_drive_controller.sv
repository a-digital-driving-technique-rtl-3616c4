// tb_drive_controller: compares every output of the sub-field timing
// generator, cycle by cycle over three sub-fields of an 8x8 panel, with a
// reference computed from the cycle count: raster read addresses, write-back
// one clock later, zero-state flag for the first sub-field, source-driver
// shift enables two clocks later, a load at each line start, scan phase
// (row mod 4) and start pulse following each load, and the sub-field count.
// It also checks the rates: one pixel per clock, ROWS*COLS clocks per
// sub-field.
module tb_drive_controller;
  localparam int ROWS = 8, COLS = 8, NSD = 4;
  localparam int N = ROWS * COLS;
  localparam int AW = $clog2(N);

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rd_en, wb_en, first_s1, sd_load, scan_stv;
  logic [AW-1:0] rd_addr, wb_addr;
  logic [NSD-1:0] sd_shift;
  logic [3:0] scan_ck;
  logic [31:0] subfield_cnt;
  int k = -1;
  int n_load = 0, n_exp_load = 0;

  always #5 clk = ~clk;

  drive_controller #(.ROWS(ROWS), .COLS(COLS), .NUM_SD(NSD)) dut (.clk, .rst_n,
    .rd_en, .rd_addr, .wb_en, .wb_addr, .first_s1, .sd_shift, .sd_load,
    .scan_ck, .scan_stv, .subfield_cnt);

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL: cycle %0d %s = %0d, expected %0d", k, what, got, want);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (k < 0 && rd_en) k = 0;
    if (k >= 0) begin
      int j, row, m;
      expect_eq("rd_en", rd_en, 1);
      expect_eq("rd_addr", rd_addr, k % N);
      expect_eq("subfield_cnt", subfield_cnt, k / N);
      if (k >= 1) begin
        expect_eq("wb_en", wb_en, 1);
        expect_eq("wb_addr", wb_addr, (k - 1) % N);
        expect_eq("first_s1", first_s1, (k - 1) < N);
      end
      j = k - 2;
      if (j >= 0) begin
        expect_eq("sd_shift", sd_shift, 1 << ((j % COLS) / (COLS / NSD)));
        expect_eq("sd_load", sd_load, (j % COLS == 0) && j >= COLS);
        if (sd_load) n_load++;
        if ((j % COLS == 0) && j >= COLS) n_exp_load++;
      end else begin
        expect_eq("sd_shift", sd_shift, 0);
        expect_eq("sd_load", sd_load, 0);
      end
      if (j - 1 >= COLS) begin
        m = (j - 1) / COLS;
        row = (m - 1) % ROWS;
        expect_eq("scan_ck", scan_ck, 1 << (row % 4));
        expect_eq("scan_stv", scan_stv, row == 0 || row == ROWS - 1);
      end else begin
        expect_eq("scan_ck", scan_ck, 0);
        expect_eq("scan_stv", scan_stv, 1);
      end
      k++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3 * N + 20) @(posedge clk);
    expect_eq("line loads", n_load, n_exp_load);
    expect_eq("loads seen", longint'(n_load > 3 * ROWS - 2), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
