// video_capture: writes the decoded video stream into the frame buffers.
//
// Counts pixels while data enable (de) is high and lines at each falling
// edge of de; a high vsync returns both counters to the top-left pixel.
// Every active pixel inside the ROWS x COLS panel is issued as one write of
// its three gray levels at address row*COLS + col. Pixels outside the panel
// area are dropped. frame_done pulses with the write of the last pixel of
// the panel.
//
// Timing: inputs are sampled each clk; wr_* are registered, one clock after
// the pixel. The document says only that the FPGA receives the video stream
// and keeps one frame buffer per colour; this raster-order addressing and the
// vsync/de handling are this design's choices.
module video_capture
  import amoled_pkg::*;
#(
  parameter int unsigned ROWS = PANEL_ROWS,
  parameter int unsigned COLS = PANEL_COLS,
  localparam int unsigned AW  = $clog2(ROWS * COLS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          de,
  input  logic          vsync,
  input  rgb8_t         pix,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output rgb8_t         wr_pix,
  output logic          frame_done
);

  localparam int unsigned RW = $clog2(ROWS + 1);
  localparam int unsigned CW = $clog2(COLS + 1);

  logic [RW-1:0] row;
  logic [CW-1:0] col;
  logic          de_q;
  logic          in_panel;

  assign in_panel = (row < RW'(ROWS)) && (col < CW'(COLS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row        <= '0;
      col        <= '0;
      de_q       <= 1'b0;
      wr_en      <= 1'b0;
      wr_addr    <= '0;
      wr_pix     <= '0;
      frame_done <= 1'b0;
    end else begin
      de_q       <= de;
      wr_en      <= 1'b0;
      frame_done <= 1'b0;
      if (vsync) begin
        row <= '0;
        col <= '0;
      end else if (de) begin
        if (in_panel) begin
          wr_en      <= 1'b1;
          wr_addr    <= AW'(row * COLS + col);
          wr_pix     <= pix;
          frame_done <= (row == RW'(ROWS - 1)) && (col == CW'(COLS - 1));
        end
        if (col != CW'(COLS)) col <= col + 1'b1;
      end else if (de_q) begin
        // end of an active line
        col <= '0;
        if (row != RW'(ROWS)) row <= row + 1'b1;
      end
    end
  end

endmodule
