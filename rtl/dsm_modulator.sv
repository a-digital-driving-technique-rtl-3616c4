// dsm_modulator: first-order delta-sigma modulator for one colour.
//
// The whole modulator is one W-bit adder. The input gray level x is added to
// the pixel's stored error e_in; the carry out of the adder is the 1-bit
// pulse-density output y and the W-bit sum is the new error e_out, which is
// written back to the frame buffer. Over n sub-fields a pixel with constant
// gray level x therefore emits floor(n*x / 2^W) ones when its error starts
// at zero, so its time-averaged light output is x / 2^W of full scale. The
// error feedback shapes the quantisation noise to high frequencies, where
// the eye (a low-pass filter) removes it. With first high the stored error
// is ignored and taken as zero: this clears the state during the first
// sub-field after reset.
//
// Timing: e_out is combinational from x and e_in; y and y_valid are
// registered, one clock after valid_in. The adder-with-carry structure and
// first order follow the document; the zero start-up state is this design's
// choice.
module dsm_modulator #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_in,
  input  logic         first,     // treat e_in as zero
  input  logic [W-1:0] x,         // gray level X
  input  logic [W-1:0] e_in,      // stored quantisation error
  output logic [W-1:0] e_out,     // new quantisation error
  output logic         y,         // PDM output bit Y
  output logic         y_valid
);

  logic [W:0] sum;

  always_comb begin
    sum   = {1'b0, x} + {1'b0, (first ? '0 : e_in)};
    e_out = sum[W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= 1'b0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= valid_in;
      if (valid_in) y <= sum[W];
    end
  end

endmodule
