// tb_tmds_decoder: checks the TMDS decoder against a DVI encoder.
// Random bytes (and runs of bytes that force both XOR and XNOR coding and
// both polarities) are encoded with a running disparity and must decode to
// the same byte one clock later; the four control tokens must decode to
// their control value with data enable low.
module tb_tmds_decoder;
  import tmds_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] q = '0;
  logic de;
  logic [1:0] ctrl;
  logic [7:0] d;
  int cnt = 0;
  int n_xor = 0, n_xnor = 0, n_inv = 0, n_ctrl = 0;

  always #5 clk = ~clk;

  tmds_decoder dut (.clk, .rst_n, .q, .de, .ctrl, .d);

  task automatic send_data(input logic [7:0] b);
    @(negedge clk);
    q = encode(b, 1'b1, 2'b00, cnt);
    if (q[8]) n_xor++; else n_xnor++;
    if (q[9]) n_inv++;
    @(negedge clk);
    checks++;
    if (!de || d !== b) begin
      failures++;
      $display("FAIL: byte %02h sent as %010b decoded de=%0b d=%02h", b, q, de, d);
    end
  endtask

  task automatic send_ctrl(input logic [1:0] c);
    @(negedge clk);
    q = encode(8'h00, 1'b0, c, cnt);
    n_ctrl++;
    @(negedge clk);
    checks++;
    if (de || ctrl !== c) begin
      failures++;
      $display("FAIL: control %0d decoded de=%0b ctrl=%0d", c, de, ctrl);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 4; c++) send_ctrl(2'(c));
    for (int i = 0; i < 256; i++) send_data(8'(i));
    for (int i = 0; i < 2000; i++) begin
      if (i % 97 == 0) send_ctrl(2'($urandom));
      send_data(8'($urandom));
    end
    checks += 3;
    if (n_xor == 0 || n_xnor == 0 || n_inv == 0) begin
      failures++;
      $display("FAIL: not all word kinds were exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
