// tmds_tb_pkg: DVI 1.0 TMDS encoder used by the testbenches as the video
// source. encode() is the transmitter's algorithm: transition minimisation
// with XOR or XNOR, then DC balancing with a running disparity kept in cnt.
package tmds_tb_pkg;

  function automatic logic [9:0] encode(input logic [7:0] d, input logic de,
                                        input logic [1:0] c, ref int cnt);
    logic [8:0] qm;
    int n1d, n1, n0;
    logic [9:0] q;
    if (!de) begin
      cnt = 0;
      case (c)
        2'b00: return 10'b1101010100;
        2'b01: return 10'b0010101011;
        2'b10: return 10'b0101010100;
        default: return 10'b1010101011;
      endcase
    end
    n1d = $countones(d);
    qm[0] = d[0];
    if (n1d > 4 || (n1d == 4 && d[0] == 1'b0)) begin
      for (int i = 1; i < 8; i++) qm[i] = ~(qm[i-1] ^ d[i]);
      qm[8] = 1'b0;
    end else begin
      for (int i = 1; i < 8; i++) qm[i] = qm[i-1] ^ d[i];
      qm[8] = 1'b1;
    end
    n1 = $countones(qm[7:0]);
    n0 = 8 - n1;
    if (cnt == 0 || n1 == n0) begin
      q[9] = ~qm[8];
      q[8] = qm[8];
      q[7:0] = qm[8] ? qm[7:0] : ~qm[7:0];
      if (qm[8] == 1'b0) cnt = cnt + (n0 - n1);
      else               cnt = cnt + (n1 - n0);
    end else if ((cnt > 0 && n1 > n0) || (cnt < 0 && n0 > n1)) begin
      q[9] = 1'b1;
      q[8] = qm[8];
      q[7:0] = ~qm[7:0];
      cnt = cnt + 2 * int'(qm[8]) + (n0 - n1);
    end else begin
      q[9] = 1'b0;
      q[8] = qm[8];
      q[7:0] = qm[7:0];
      cnt = cnt - 2 * int'(!qm[8]) + (n1 - n0);
    end
    return q;
  endfunction

endpackage
