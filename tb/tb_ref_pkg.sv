// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL.
//
// GF(16) arithmetic uses log/antilog tables built by stepping alpha^i with
// the field polynomial x^4 + x + 1. RS parity is found by search: the two
// parity symbols are the only pair that makes r(alpha) = r(alpha^2) = 0.
// The scrambler is modelled bit by bit with a shift register. A frame is
// built as a list of line symbols, header first.
package tb_ref_pkg;

  function automatic logic [3:0] r_exp(int e);
    logic [4:0] v;
    v = 5'd1;
    for (int i = 0; i < (e % 15); i++) begin
      v = v << 1;
      if (v[4]) v = v ^ 5'b10011;
    end
    return v[3:0];
  endfunction

  function automatic int r_log(logic [3:0] a);
    for (int i = 0; i < 15; i++) if (r_exp(i) == a) return i;
    return -1;
  endfunction

  function automatic logic [3:0] r_mul(logic [3:0] a, logic [3:0] b);
    if (a == 0 || b == 0) return 4'd0;
    return r_exp(r_log(a) + r_log(b));
  endfunction

  // r(alpha^j) for a 10-symbol codeword, symbol i = coefficient of x^i
  function automatic logic [3:0] r_synd(logic [39:0] cw, int j);
    logic [3:0] s;
    s = 4'd0;
    for (int i = 0; i < 10; i++) s ^= r_mul(cw[i*4 +: 4], r_exp(i * j));
    return s;
  endfunction

  function automatic logic [7:0] r_parity(logic [31:0] d);
    for (int p = 0; p < 256; p++) begin
      logic [39:0] cw;
      cw = {d, 8'(p)};
      if (r_synd(cw, 1) == 0 && r_synd(cw, 2) == 0) return 8'(p);
    end
    return 8'hxx;
  endfunction

  // Serial scrambler: h[0] newest scrambled bit, h[4] is 5 bits back.
  localparam logic [62:0] R_SEED = 63'h2AAA_AAAA_AAAA_AAAA;  // RTL reset value
  function automatic logic [63:0] r_scramble(inout logic [62:0] h, input logic [63:0] d);
    logic [63:0] s;
    for (int k = 0; k < 64; k++) begin
      s[k] = d[k] ^ h[4] ^ h[62];
      h    = {h[61:0], s[k]};
    end
    return s;
  endfunction

  function automatic logic [63:0] r_descramble(inout logic [62:0] h, input logic [63:0] s);
    logic [63:0] d;
    for (int k = 0; k < 64; k++) begin
      d[k] = s[k] ^ h[4] ^ h[62];
      h    = {h[61:0], s[k]};
    end
    return d;
  endfunction

  localparam logic [7:0] R_HDR_DATA = 8'h74;
  localparam logic [7:0] R_HDR_IDLE = 8'h8B;

  // Line frame from a scrambled word: header, then A9 B9 ... A0 B0.
  function automatic logic [87:0] r_frame(logic [63:0] s, bit idle, bit rs_byp);
    logic [39:0] a, b;
    logic [87:0] f;
    a = {s[63:32], rs_byp ? 8'h00 : r_parity(s[63:32])};
    b = {s[31:0],  rs_byp ? 8'h00 : r_parity(s[31:0])};
    f = {idle ? R_HDR_IDLE : R_HDR_DATA, 80'h0};
    for (int n = 0; n < 20; n++) begin
      int sym = 9 - n / 2;
      logic [3:0] v = (n % 2 == 0) ? a[sym*4 +: 4] : b[sym*4 +: 4];
      f[79 - 4*n -: 4] = v;
    end
    return f;
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

endpackage
