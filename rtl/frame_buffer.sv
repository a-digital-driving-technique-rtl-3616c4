// frame_buffer: the per-colour pixel memory of the delta-sigma driver.
//
// Each word holds two fields for one pixel: the 8-bit input gray level
// (written from the video side, port A) and the 8-bit delta-sigma state,
// i.e. the quantisation error left by the pixel's last sample (read and
// rewritten by the modulator, port B). Port B reads both fields of a pixel
// and, one clock later, writes the new state back; because the driver
// visits a pixel only once per sub-field, the read and the write never
// touch the same address in the same clock for panels of two or more
// pixels.
//
// Timing: port A writes on clk_a. Port B reads synchronously: pix_b and
// err_b are valid the clock after re_b; the state write happens on the clk_b
// edge that samples we_b. The two ports may run on unrelated clocks. The
// document gives one frame buffer per colour; holding the gray level and the
// modulator state side by side in it is this design's reading.
module frame_buffer #(
  parameter int unsigned DEPTH = 320 * 240,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  // port A: video writes
  input  logic          clk_a,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [W-1:0]  pix_a,
  // port B: modulator read-modify-write
  input  logic          clk_b,
  input  logic          re_b,
  input  logic [AW-1:0] raddr_b,
  output logic [W-1:0]  pix_b,
  output logic [W-1:0]  err_b,
  input  logic          we_b,
  input  logic [AW-1:0] waddr_b,
  input  logic [W-1:0]  err_wb
);

  logic [W-1:0] pix_mem [DEPTH];
  logic [W-1:0] err_mem [DEPTH];

  always_ff @(posedge clk_a) begin
    if (we_a) pix_mem[addr_a] <= pix_a;
  end

  always_ff @(posedge clk_b) begin
    if (re_b) begin
      pix_b <= pix_mem[raddr_b];
      err_b <= err_mem[raddr_b];
    end
    if (we_b) err_mem[waddr_b] <= err_wb;
  end

endmodule
