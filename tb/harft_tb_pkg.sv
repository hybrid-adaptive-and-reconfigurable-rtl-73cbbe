// harft_tb_pkg: reference helpers for the HARFT testbenches.
//
// ecc_encode fills in the check bits and the parity bit of a frame so that it
// is a valid codeword of the frame code (bit b of word w has position
// 32*w + b; check bits at positions 1, 2, 4, ..., 2048; position 0 makes the
// total parity even). ref_syndrome recomputes the syndrome bit by bit, as an
// independent reference for the hardware.
package harft_tb_pkg;
  localparam int unsigned W = 101;

  function automatic bit is_check_pos(int p);
    return (p == 0) || ((p & (p - 1)) == 0 && p < 4096);
  endfunction

  function automatic void ref_syndrome(input logic [31:0] f [W], output int syn, output bit par);
    syn = 0;
    par = 0;
    for (int p = 0; p < 32 * W; p++) begin
      if (f[p / 32][p % 32]) begin
        syn ^= p;
        par ^= 1'b1;
      end
    end
  endfunction

  function automatic void ecc_encode(inout logic [31:0] f [W]);
    int s;
    bit par;
    for (int p = 0; p < 32 * W; p++) if (is_check_pos(p)) f[p / 32][p % 32] = 1'b0;
    ref_syndrome(f, s, par);
    for (int k = 0; k < 12; k++) if (s[k]) f[(1 << k) / 32][(1 << k) % 32] = 1'b1;
    ref_syndrome(f, s, par);
    if (par) f[0][0] = 1'b1;
  endfunction
endpackage
