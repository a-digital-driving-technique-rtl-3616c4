// tmds_decoder: decodes one 10-bit TMDS (DVI) channel word per pixel clock.
//
// The video source sends its 24-bit RGB stream as three TMDS channels; after
// the receiver front end has deserialised and word-aligned a channel, this
// block turns each 10-bit word back into either an 8-bit data byte (data
// enable high) or a 2-bit control value (one of the four control tokens,
// data enable low). Decoding follows the DVI 1.0 rules: bit 9 says the low
// byte was inverted, bit 8 says the transitions were coded with XOR (1) or
// XNOR (0). Words that are not control tokens are decoded as data.
//
// Interface: q is sampled on every rising edge of clk; de, ctrl and d are
// registered, so they follow q by one clock. ctrl keeps the last control
// value while data is being received. The document only names the TMDS
// link; the decoding rules are those of the DVI standard.
module tmds_decoder
  import amoled_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] q,      // aligned TMDS word
  output logic       de,     // 1: d is pixel data, 0: control period
  output logic [1:0] ctrl,   // C1,C0 of the last control token
  output logic [7:0] d       // decoded data byte
);

  logic [7:0] low;
  logic [7:0] dec;
  logic       is_ctrl;
  logic [1:0] ctrl_val;

  always_comb begin
    is_ctrl  = 1'b1;
    ctrl_val = 2'b00;
    unique case (q)
      TMDS_CTRL_00: ctrl_val = 2'b00;
      TMDS_CTRL_01: ctrl_val = 2'b01;
      TMDS_CTRL_10: ctrl_val = 2'b10;
      TMDS_CTRL_11: ctrl_val = 2'b11;
      default:      is_ctrl  = 1'b0;
    endcase

    low    = q[9] ? ~q[7:0] : q[7:0];
    dec[0] = low[0];
    for (int i = 1; i < 8; i++)
      dec[i] = q[8] ? (low[i] ^ low[i-1]) : ~(low[i] ^ low[i-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      de   <= 1'b0;
      ctrl <= 2'b00;
      d    <= '0;
    end else begin
      de <= ~is_ctrl;
      if (is_ctrl) ctrl <= ctrl_val;
      else         d    <= dec;
    end
  end

endmodule
