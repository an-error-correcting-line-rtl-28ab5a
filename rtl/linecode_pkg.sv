// linecode_pkg: constants, types and GF(16) arithmetic shared by the line
// encoder and decoder.
//
// The line code frames 64 user bits as follows: the bits are scrambled, split
// into two 32-bit blocks, each block gets two Reed-Solomon parity symbols over
// GF(16) (RS(15,13) shortened to RS(10,8)), the 20 symbols of the two blocks are
// interleaved, and an 8-bit DC-balanced header is put in front: 88 line bits
// per frame. Frame sizes follow the first coding option of the design; the
// field polynomial x^4+x+1, the generator roots alpha and alpha^2 and the two
// header patterns are this implementation's own choices.
//
// GF(16) elements are 4-bit polynomial-basis vectors; alpha = 4'b0010.
package linecode_pkg;

  localparam int unsigned USER_BITS  = 64;  // K_b
  localparam int unsigned SYM_BITS   = 4;   // m
  localparam int unsigned RS_NS      = 10;  // symbols per RS block (shortened)
  localparam int unsigned RS_KS      = 8;   // data symbols per RS block
  localparam int unsigned RS_NMAX    = 15;  // 2^m - 1, full code length
  localparam int unsigned RS_BLOCKS  = 2;   // L, interleaved blocks
  localparam int unsigned RS_BITS    = RS_NS * SYM_BITS * RS_BLOCKS;  // N_b = 80
  localparam int unsigned HDR_BITS   = 8;   // H
  localparam int unsigned FRAME_BITS = RS_BITS + HDR_BITS;            // N_tot = 88
  localparam int unsigned BLK_DBITS  = RS_KS * SYM_BITS;              // 32
  localparam int unsigned BLK_BITS   = RS_NS * SYM_BITS;              // 40

  // DC-balanced headers: four ones each, Hamming distance 8 from each other;
  // every one- or two-bit shift of either pattern differs from both in at
  // least 3 of its known bits, so a slipped frame boundary is not mistaken
  // for a header with the two-bit upset tolerance.
  localparam logic [HDR_BITS-1:0] HDR_DATA_PAT = 8'b0111_0100;
  localparam logic [HDR_BITS-1:0] HDR_IDLE_PAT = 8'b1000_1011;

  typedef enum logic [1:0] {
    HDR_INVALID = 2'd0,
    HDR_DATA    = 2'd1,
    HDR_IDLE    = 2'd2
  } hdr_kind_t;

  typedef logic [SYM_BITS-1:0] gf_t;

  // Multiplication modulo x^4 + x + 1 (shift-and-add).
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t p;
    gf_t aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < SYM_BITS; i++) begin
      if (b[i]) p = p ^ aa;
      aa = {aa[2:0], 1'b0} ^ (aa[3] ? 4'b0011 : 4'b0000);
    end
    return p;
  endfunction

  // alpha^e, e taken modulo 15.
  function automatic gf_t gf_exp(int unsigned e);
    gf_t r;
    r = 4'b0001;
    for (int i = 0; i < int'(e % RS_NMAX); i++) r = gf_mul(r, 4'b0010);
    return r;
  endfunction

  // Discrete logarithm base alpha; returns 0 for the (undefined) log of 0.
  function automatic logic [3:0] gf_log(gf_t a);
    gf_t r;
    logic [3:0] l;
    r = 4'b0001;
    l = '0;
    for (int i = 0; i < int'(RS_NMAX); i++) begin
      if (r == a) l = 4'(i);
      r = gf_mul(r, 4'b0010);
    end
    return l;
  endfunction

  // Multiplicative inverse, a^14; returns 0 for 0.
  function automatic gf_t gf_inv(gf_t a);
    gf_t r;
    r = 4'b0001;
    for (int i = 0; i < 14; i++) r = gf_mul(r, a);
    return r;
  endfunction

  // Symbol interleaving of the two RS codewords into the 80-bit RS field of a
  // frame: A9 B9 A8 B8 ... A0 B0 from the top, where A is the codeword of the
  // upper 32 scrambled bits and Xj the symbol of x^j. Two adjacent line bits
  // in different symbols therefore always fall into different codewords.
  function automatic logic [RS_BITS-1:0] interleave(logic [BLK_BITS-1:0] cw_a,
                                                    logic [BLK_BITS-1:0] cw_b);
    logic [RS_BITS-1:0] seg;
    for (int j = 0; j < int'(RS_NS); j++) begin
      seg[(2*j+1)*SYM_BITS +: SYM_BITS] = cw_a[j*SYM_BITS +: SYM_BITS];
      seg[(2*j)*SYM_BITS   +: SYM_BITS] = cw_b[j*SYM_BITS +: SYM_BITS];
    end
    return seg;
  endfunction

  function automatic logic [2*BLK_BITS-1:0] deinterleave(logic [RS_BITS-1:0] seg);
    logic [BLK_BITS-1:0] cw_a, cw_b;
    for (int j = 0; j < int'(RS_NS); j++) begin
      cw_a[j*SYM_BITS +: SYM_BITS] = seg[(2*j+1)*SYM_BITS +: SYM_BITS];
      cw_b[j*SYM_BITS +: SYM_BITS] = seg[(2*j)*SYM_BITS   +: SYM_BITS];
    end
    return {cw_a, cw_b};
  endfunction

endpackage
