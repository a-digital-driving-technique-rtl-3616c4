// tb_scan_driver: drives the 4-phase clocks and the start pulse as the panel
// driver does (each phase high for one line time in turn, start pulse high
// across the last and first rows) and checks that scan lines 0..ROWS-1 are
// selected one at a time, in order, for three sub-fields, and that nothing
// is selected before the first start pulse.
module tb_scan_driver;
  import amoled_pkg::*;
  localparam int unsigned ROWS = 12;
  localparam int unsigned LINE = 5;   // clocks per line time

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic stv = 1'b0;
  logic [3:0] ck = '0;
  logic [ROWS-1:0] g;

  always #5 clk = ~clk;

  scan_driver #(.ROWS(ROWS)) dut (.stv, .ck, .g);

  initial begin
    // phases running without a start pulse select nothing
    for (int l = 0; l < 8; l++) begin
      @(negedge clk); ck = 4'(1 << (l % 4));
      repeat (LINE) begin
        @(negedge clk);
        checks++;
        if (g != '0) begin failures++; $display("FAIL: selection without start pulse"); end
      end
    end
    @(negedge clk); ck = '0; stv = 1'b1;     // as if row ROWS-1 was shown
    repeat (LINE) @(negedge clk);
    for (int sf = 0; sf < 3; sf++)
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk);
        ck  = 4'(1 << (r % 4));
        stv = (r == 0) || (r == ROWS - 1);
        repeat (LINE) begin
          @(negedge clk);
          checks++;
          if (g !== (ROWS'(1) << r)) begin
            failures++;
            $display("FAIL: sub-field %0d row %0d scan lines %b", sf, r, g);
          end
        end
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
