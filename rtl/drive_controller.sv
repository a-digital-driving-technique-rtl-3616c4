// drive_controller: sub-field timing of the delta-sigma panel driver.
//
// The panel is refreshed continuously, one pixel per clock, in raster order:
// a sub-field is ROWS lines of COLS clocks with no blanking, so a sub-field
// lasts ROWS*COLS clocks and the oversampling ratio is f_clk divided by
// ROWS*COLS*frame_rate. There is no frame boundary: sub-fields follow one
// another without a gap and each pixel's modulator state carries over.
//
// The controller runs a three-stage pipeline:
//   stage 0  rd_en/rd_addr    read gray level and state of a pixel
//   stage 1  wb_en/wb_addr    the modulator adds them; the new state is
//            first_s1         written back (first_s1: first sub-field after
//                             reset, state taken as zero)
//   stage 2  sd_shift, sd_load  the PDM bits enter the source driver that
//                             owns the column; on the first pixel of every
//                             line all drivers latch the line just shifted in
// On the clock edge that performs a load, the scan driver's phase clocks
// move on so that the row just latched is selected: phase (row mod 4) is
// high for that line time, and the start pulse stv is high while the last
// and the first row are selected, so it is stable at the rising edge of
// phase 0 that selects row 0. A row is thus displayed one line time after it
// was shifted in, and its scan line stays high for COLS clocks (the gate
// scan time).
//
// The one-pixel-per-clock rate is this design's reading of the document's
// clock frequencies and oversampling ratios (7 at 32 MHz, 17 at 80 MHz); the
// pipeline, the load protocol and the phase/start-pulse timing are this
// design's choices. ROWS must be a multiple of 4 and COLS of NUM_SD.
module drive_controller
  import amoled_pkg::*;
#(
  parameter int unsigned ROWS   = PANEL_ROWS,
  parameter int unsigned COLS   = PANEL_COLS,
  parameter int unsigned NUM_SD = SD_COUNT,
  localparam int unsigned AW    = $clog2(ROWS * COLS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // stage 0
  output logic                   rd_en,
  output logic [AW-1:0]          rd_addr,
  // stage 1
  output logic                   wb_en,
  output logic [AW-1:0]          wb_addr,
  output logic                   first_s1,
  // stage 2
  output logic [NUM_SD-1:0]      sd_shift,
  output logic                   sd_load,
  // scan driver
  output logic [SCAN_PHASES-1:0] scan_ck,
  output logic                   scan_stv,
  // status
  output logic [31:0]            subfield_cnt   // completed sub-fields
);

  localparam int unsigned SD_COLS = COLS / NUM_SD;
  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned CW = $clog2(COLS);
  localparam int unsigned SW = (NUM_SD > 1) ? $clog2(NUM_SD) : 1;

  // stage 0 counters
  logic [RW-1:0] row0;
  logic [CW-1:0] col0;
  logic [CW-1:0] sdcol0;     // column within the current source driver
  logic [SW-1:0] sd0;        // current source driver
  logic          first0;
  // stage 1
  logic          v1;
  logic [RW-1:0] row1;
  logic [CW-1:0] col1;
  logic [SW-1:0] sd1;
  // stage 2 / scan
  logic          shifted;    // at least one pixel has reached the drivers
  logic [RW-1:0] load_row;   // row latched by the current sd_load

  wire last_col = (col0 == CW'(COLS - 1));
  wire last_row = (row0 == RW'(ROWS - 1));

  // stage 0
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_en        <= 1'b0;
      rd_addr      <= '0;
      row0         <= '0;
      col0         <= '0;
      sdcol0       <= '0;
      sd0          <= '0;
      first0       <= 1'b1;
      subfield_cnt <= '0;
    end else begin
      rd_en <= 1'b1;
      if (rd_en) begin
        if (last_col) begin
          col0   <= '0;
          sdcol0 <= '0;
          sd0    <= '0;
          if (last_row) begin
            row0         <= '0;
            rd_addr      <= '0;
            first0       <= 1'b0;
            subfield_cnt <= subfield_cnt + 1'b1;
          end else begin
            row0    <= row0 + 1'b1;
            rd_addr <= rd_addr + 1'b1;
          end
        end else begin
          col0    <= col0 + 1'b1;
          rd_addr <= rd_addr + 1'b1;
          if (sdcol0 == CW'(SD_COLS - 1)) begin
            sdcol0 <= '0;
            sd0    <= sd0 + 1'b1;
          end else begin
            sdcol0 <= sdcol0 + 1'b1;
          end
        end
      end
    end
  end

  // stage 1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1       <= 1'b0;
      row1     <= '0;
      col1     <= '0;
      sd1      <= '0;
      wb_en    <= 1'b0;
      wb_addr  <= '0;
      first_s1 <= 1'b1;
    end else begin
      v1       <= rd_en;
      row1     <= row0;
      col1     <= col0;
      sd1      <= sd0;
      wb_en    <= rd_en;
      wb_addr  <= rd_addr;
      first_s1 <= first0;
    end
  end

  // stage 2
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sd_shift <= '0;
      sd_load  <= 1'b0;
      shifted  <= 1'b0;
      load_row <= '0;
    end else begin
      for (int k = 0; k < NUM_SD; k++)
        sd_shift[k] <= v1 && (sd1 == SW'(k));
      sd_load  <= v1 && (col1 == '0) && shifted;
      load_row <= (row1 == '0) ? RW'(ROWS - 1) : row1 - 1'b1;
      if (v1) shifted <= 1'b1;
    end
  end

  // scan driver phases, moved on together with the source-driver latches
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      // as if the last row had just been shown: no phase high yet, start
      // pulse already up for the first selection of row 0
      scan_ck  <= '0;
      scan_stv <= 1'b1;
    end else if (sd_load) begin
      scan_ck  <= SCAN_PHASES'(1) << load_row[1:0];
      scan_stv <= (load_row == RW'(ROWS - 1)) || (load_row == '0);
    end
  end

  // The phase of a row is its index mod 4, and the phases must wrap with
  // the rows, so ROWS must be a multiple of 4.
  initial begin
    assert (ROWS % SCAN_PHASES == 0 && ROWS >= SCAN_PHASES)
      else $error("ROWS must be a multiple of %0d", SCAN_PHASES);
    assert (COLS % NUM_SD == 0 && COLS >= 2)
      else $error("COLS must be a multiple of NUM_SD and at least 2");
  end

endmodule
