// scan_driver: behavioural model of the panel's integrated scan driver.
//
// The scan driver is built from thin-film transistors on the panel glass,
// so this file is a behavioural model of its logic function, not
// synthesizable FPGA logic. It is a chain of ROWS stages moved along by four
// clock phases ck[0..3]: stage i is clocked by phase i mod 4. On a rising
// edge of its phase a stage takes the token from the stage before it (stage
// 0 takes the start pulse stv), and its scan line g[i] is high while it holds
// the token and its phase is high. With each phase high for one line time in
// turn, exactly one scan line is selected per line time and the selection
// walks down the panel. stv must be high at the rising edge of ck[0] that
// starts the first line, and low at the next rising edge of ck[0].
//
// The stages start empty (initial block); the glass circuit has no reset.
// Each stage keeps its token until its own phase rises again, so if the
// phases stop in the middle of a sub-field (a reset of the panel driver),
// the tokens left in the chain walk on once the phases restart and select a
// second scan line until they leave the last stage, for at most one
// sub-field.
// The document gives the 4-phase clocking; the token-passing behaviour is the
// usual one for such shift-register gate drivers.
module scan_driver
  import amoled_pkg::*;
#(
  parameter int unsigned ROWS = PANEL_ROWS
) (
  input  logic                   stv,  // start pulse
  input  logic [SCAN_PHASES-1:0] ck,   // 4-phase clocks
  output logic [ROWS-1:0]        g     // scan lines
);

  logic [ROWS-1:0] q;   // token held by each stage

  for (genvar i = 0; i < ROWS; i++) begin : g_stage
    logic tok;
    initial tok = 1'b0;
    always @(posedge ck[i % SCAN_PHASES]) begin
      if (i == 0) tok <= stv;
      else        tok <= q[(i == 0) ? 0 : i - 1];
    end
    assign q[i] = tok;
    assign g[i] = tok & ck[i % SCAN_PHASES];
  end

endmodule
