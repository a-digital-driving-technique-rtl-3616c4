// tb_dsm_modulator: checks the one-adder delta-sigma step against its
// arithmetic (carry = bit, sum = error) for random operands, the zero start
// state, and the pulse density: a constant level x held for 256 steps from
// zero error gives exactly x ones, and floor(n*x/256) after n steps.
module tb_dsm_modulator;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_in = 1'b0, first = 1'b0;
  logic [7:0] x = '0, e_in = '0, e_out;
  logic y, y_valid;

  always #5 clk = ~clk;

  dsm_modulator #(.W(8)) dut (.clk, .rst_n, .valid_in, .first, .x, .e_in, .e_out, .y, .y_valid);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // single steps
    for (int i = 0; i < 1000; i++) begin
      int s;
      @(negedge clk);
      x = 8'($urandom); e_in = 8'($urandom); first = ($urandom % 8) == 0; valid_in = 1'b1;
      s = int'(x) + (first ? 0 : int'(e_in));
      #1;
      checks++;
      if (e_out !== 8'(s)) begin
        failures++;
        $display("FAIL: x=%0d e=%0d first=%0b e_out=%0d expected %0d", x, e_in, first, e_out, s & 255);
      end
      @(negedge clk);
      checks++;
      if (!y_valid || y !== (s >= 256)) begin
        failures++;
        $display("FAIL: x=%0d e=%0d y=%0b expected %0b", x, e_in, y, s >= 256);
      end
    end
    // pulse density of held levels, error fed back as the frame buffer would
    for (int lvl = 0; lvl < 256; lvl += 5) begin
      int ones;
      logic [7:0] err;
      ones = 0;
      err = '0;
      for (int n = 1; n <= 256; n++) begin
        @(negedge clk);
        x = 8'(lvl); e_in = err; first = (n == 1); valid_in = 1'b1;
        #1 err = e_out;
        @(negedge clk);
        ones += int'(y);
        checks++;
        if (ones != (n * lvl) / 256) begin
          failures++;
          $display("FAIL: level %0d after %0d steps %0d ones, expected %0d", lvl, n, ones, (n * lvl) / 256);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
