// gamma_lut: programmable gray-level mapping for one colour.
//
// Digital driving makes gamma correction a table lookup: each 8-bit input
// gray level is replaced by the table entry it addresses before it is stored
// in the frame buffer. The table resets to the identity mapping and is
// rewritten one entry per clock through the cfg_* port. With en low the
// table is bypassed.
//
// Timing: dout is registered, one clock after din. A table write takes
// effect on the clock after cfg_we. The document only names programmable
// gamma correction as an advantage of digital driving; table size (one entry
// per gray level), reset contents and the write port are this design's
// choices.
module gamma_lut #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,        // 1: map through the table, 0: bypass
  input  logic         cfg_we,
  input  logic [W-1:0] cfg_addr,
  input  logic [W-1:0] cfg_data,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  localparam int unsigned N = 1 << W;

  logic [W-1:0] tbl [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) tbl[i] <= W'(i);
    end else if (cfg_we) begin
      tbl[cfg_addr] <= cfg_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= en ? tbl[din] : din;
  end

endmodule
