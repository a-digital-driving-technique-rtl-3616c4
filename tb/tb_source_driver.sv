// tb_source_driver: shifts random lines of RGB bits into an 8-stage driver
// with idle clocks in between, loads them, and checks the latched outputs
// against a reference shift register, including a load in the same clock as
// the first shift of the next line.
module tb_source_driver;
  import amoled_pkg::*;
  localparam int unsigned STAGES = 8;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic shift = 1'b0, load = 1'b0;
  rgb1_t din = '0;
  rgb1_t [STAGES-1:0] dout;
  rgb1_t [STAGES-1:0] ref_sr, ref_out;

  always #5 clk = ~clk;

  source_driver #(.STAGES(STAGES)) dut (.clk, .rst_n, .shift, .din, .load, .dout);

  // reference model on the same edges
  always @(posedge clk) if (rst_n) begin
    if (load)  ref_out <= ref_sr;
    if (shift) ref_sr  <= {ref_sr[STAGES-2:0], din};
  end

  initial begin
    ref_sr = '0; ref_out = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      shift = ($urandom % 4) != 0;
      load  = ($urandom % 9) == 0;
      din   = rgb1_t'(3'($urandom));
      @(posedge clk); #1;
      checks++;
      if (dout !== ref_out) begin
        failures++;
        $display("FAIL: step %0d dout %h expected %h", n, dout, ref_out);
      end
    end
    // a line of exactly STAGES samples, then load together with the next shift
    @(negedge clk);
    for (int i = 0; i < STAGES; i++) begin
      shift = 1'b1; load = 1'b0; din = rgb1_t'(3'(i + 1));
      @(negedge clk);
    end
    load = 1'b1; din = rgb1_t'(3'd7);
    @(negedge clk);
    shift = 1'b0; load = 1'b0;
    for (int i = 0; i < STAGES; i++) begin
      checks++;
      if (dout[STAGES-1-i] !== rgb1_t'(3'(i + 1))) begin
        failures++;
        $display("FAIL: stage %0d holds %0d, expected %0d", STAGES - 1 - i, dout[STAGES-1-i], i + 1);
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
