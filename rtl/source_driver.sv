// source_driver: one panel source driver, a shift register with a line latch.
//
// While shift is high, the RGB PDM sample on din enters stage 0 and every
// stage moves one place up, so after k shifts the first sample of a line sits
// in stage k-1. load copies the whole shift register into the output latch
// that drives the data lines; a load in the same clock as a shift latches the
// register as it was before that shift, so the next line can start shifting
// while the current one is latched. Each data line carries one colour of one
// column: the panel's 2-transistor pixels store the level present while their
// scan line is selected and drive the OLED fully on or off.
//
// Timing: all outputs registered on clk; dout changes on the edge that
// samples load. The 64-stage register and four drivers per panel follow the
// document; the separate output latch and the shift/load protocol are this
// design's choices.
module source_driver
  import amoled_pkg::*;
#(
  parameter int unsigned STAGES = SD_DEPTH
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift,
  input  rgb1_t               din,
  input  logic                load,
  output rgb1_t [STAGES-1:0]  dout
);

  rgb1_t [STAGES-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      dout <= '0;
    end else begin
      if (shift) sr   <= {sr[STAGES-2:0], din};
      if (load)  dout <= sr;
    end
  end

endmodule
