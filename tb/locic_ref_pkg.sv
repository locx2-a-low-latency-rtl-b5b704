// Reference models used by the testbenches to check the LOCic encoder
// independently of the RTL: CRC by polynomial long division, descrambling
// of a scrambled bit stream, and the two BCID PRBS sequences.
package locic_ref_pkg;
  timeunit 1ps; timeprecision 1fs;

  // CRC-8 (x^8+x^2+x+1): remainder of payload * x^8 divided by the generator.
  function automatic logic [7:0] crc8_ref(input logic [111:0] p);
    logic [119:0] r;
    r = {p, 8'h00};
    for (int i = 119; i >= 8; i--)
      if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0];
  endfunction

  // Descrambler state: the last 58 received payload bits, newest in [0].
  typedef logic [57:0] scr_hist_t;

  // Descramble one 112-bit payload (bit 111 received first).
  function automatic logic [111:0] descramble(input logic [111:0] s, inout scr_hist_t h);
    logic [111:0] d;
    for (int i = 111; i >= 0; i--) begin
      d[i] = s[i] ^ h[38] ^ h[57];
      h = {h[56:0], s[i]};
    end
    return d;
  endfunction

  // PRBS7 x^7+x^6+1 and PRBS5 x^5+x^3+1, written as integer shifts.
  function automatic int prbs7_next(input int s);
    int fb;
    fb = ((s >> 6) ^ (s >> 5)) & 1;
    return ((s << 1) | fb) & 'h7f;
  endfunction
  function automatic int prbs5_next(input int s);
    int fb;
    fb = ((s >> 4) ^ (s >> 2)) & 1;
    return ((s << 1) | fb) & 'h1f;
  endfunction
  // 4-bit BCID code of bunch crossing n after BCR (n = 0 at the BCR crossing).
  function automatic logic [3:0] bcid_code(input int n);
    int a, b;
    a = 'h7f; b = 'h1f;
    for (int i = 0; i < n; i++) begin
      a = prbs7_next(a);
      b = prbs5_next(b);
    end
    return 4'(((a & 3) << 2) | (b & 3));
  endfunction
endpackage
