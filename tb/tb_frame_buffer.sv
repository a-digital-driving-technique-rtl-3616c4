// tb_frame_buffer: port A writes gray levels on its own clock, port B reads
// gray level and state with one clock of latency and writes states back;
// every read is compared with a reference copy of both fields.
module tb_frame_buffer;
  localparam int unsigned DEPTH = 48;
  localparam int unsigned AW = $clog2(DEPTH);

  int checks = 0, failures = 0;
  logic clk_a = 1'b0, clk_b = 1'b0;
  logic we_a = 1'b0, re_b = 1'b0, we_b = 1'b0;
  logic [AW-1:0] addr_a = '0, raddr_b = '0, waddr_b = '0;
  logic [7:0] pix_a = '0, err_wb = '0, pix_b, err_b;
  logic [7:0] ref_pix [DEPTH], ref_err [DEPTH];

  always #5 clk_a = ~clk_a;
  always #7 clk_b = ~clk_b;

  frame_buffer #(.DEPTH(DEPTH), .W(8)) dut (.clk_a, .we_a, .addr_a, .pix_a,
    .clk_b, .re_b, .raddr_b, .pix_b, .err_b, .we_b, .waddr_b, .err_wb);

  initial begin
    // fill both fields
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk_a);
      we_a = 1'b1; addr_a = AW'(i); pix_a = 8'($urandom); ref_pix[i] = pix_a;
    end
    @(negedge clk_a); we_a = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk_b);
      we_b = 1'b1; waddr_b = AW'(i); err_wb = 8'($urandom); ref_err[i] = err_wb;
    end
    @(negedge clk_b); we_b = 1'b0;
    // random reads, with state writes to other addresses in the same clock
    for (int n = 0; n < 2000; n++) begin
      int ra = $urandom % DEPTH;
      int wa = (ra + 1 + $urandom % (DEPTH - 1)) % DEPTH;
      @(negedge clk_b);
      re_b = 1'b1; raddr_b = AW'(ra);
      we_b = ($urandom % 2) == 1; waddr_b = AW'(wa); err_wb = 8'($urandom);
      @(negedge clk_b);
      if (we_b) ref_err[wa] = err_wb;
      re_b = 1'b0; we_b = 1'b0;
      checks++;
      if (pix_b !== ref_pix[ra] || err_b !== ref_err[ra]) begin
        failures++;
        $display("FAIL: addr %0d read %02h/%02h expected %02h/%02h", ra, pix_b, err_b,
                 ref_pix[ra], ref_err[ra]);
      end
      // the read data holds while re_b is low
      @(negedge clk_b);
      checks++;
      if (pix_b !== ref_pix[ra]) begin
        failures++;
        $display("FAIL: read data changed without a read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_b);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
