// tb_gamma_lut: the table must reset to identity, map every level through
// a newly written table with one clock of latency, and pass the input
// unchanged when disabled.
module tb_gamma_lut;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, cfg_we = 1'b0;
  logic [7:0] cfg_addr = '0, cfg_data = '0, din = '0, dout;
  logic [7:0] ref_tbl [256];

  always #5 clk = ~clk;

  gamma_lut #(.W(8)) dut (.clk, .rst_n, .en, .cfg_we, .cfg_addr, .cfg_data, .din, .dout);

  task automatic look(input logic [7:0] x, input logic [7:0] want);
    @(negedge clk);
    din = x;
    @(negedge clk);
    checks++;
    if (dout !== want) begin
      failures++;
      $display("FAIL: en=%0b in=%0d out=%0d expected %0d", en, x, dout, want);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    for (int i = 0; i < 256; i++) look(8'(i), 8'(i));     // identity after reset
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      ref_tbl[i] = 8'($urandom);
      cfg_we = 1'b1; cfg_addr = 8'(i); cfg_data = ref_tbl[i];
    end
    @(negedge clk);
    cfg_we = 1'b0;
    for (int i = 0; i < 256; i++) look(8'(i), ref_tbl[i]);
    for (int i = 0; i < 500; i++) begin
      logic [7:0] x = 8'($urandom);
      look(x, ref_tbl[x]);
    end
    en = 1'b0;
    for (int i = 0; i < 256; i++) look(8'(i), 8'(i));     // bypass
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
