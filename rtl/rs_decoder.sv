// rs_decoder: single-symbol-error-correcting decoder for the shortened
// RS(10,8) code over GF(16) made by rs_encoder.
//
// The syndromes S1 = r(alpha) and S2 = r(alpha^2) are computed by Horner
// evaluation (the unrolled form of a syndrome feedback shift register). A
// single error of value e at position i gives S1 = e*alpha^i and
// S2 = e*alpha^(2i), so the locator is X = S2/S1 = alpha^i, its logarithm is
// the position and the value is e = S1/X. Inversion and logarithm are table
// lookups. Because positions NS..14 of the full-length code are known zeros,
// a locator that points there reveals a multiple error; so does a case where
// only one syndrome is zero. Such blocks are flagged uncorrectable and passed
// on unchanged. Single-error correction and the zero-padding check follow the
// design; the decoding equations are the standard ones for t = 1.
//
// Interface (combinational): code_in = {KS data symbols, p1, p0}, highest
// power first. data_out is the corrected data. err_detected: some syndrome
// is non-zero. corrected: one symbol was repaired (possibly a parity symbol).
// In bypass no correction is made and all flags are 0.
module rs_decoder
  import linecode_pkg::*;
#(
  parameter int unsigned KS = 8,
  parameter int unsigned NS = 10
) (
  input  logic                    bypass,
  input  logic [NS*SYM_BITS-1:0]  code_in,
  output logic [KS*SYM_BITS-1:0]  data_out,
  output logic                    err_detected,
  output logic                    corrected,
  output logic                    uncorrectable
);

  localparam gf_t ALPHA  = 4'b0010;
  localparam gf_t ALPHA2 = 4'b0100;

  gf_t        s1, s2;
  gf_t        x_loc, e_val;
  logic [3:0] pos;
  logic [NS*SYM_BITS-1:0] fixed;

  always_comb begin
    s1 = '0;
    s2 = '0;
    for (int i = int'(NS) - 1; i >= 0; i--) begin
      s1 = gf_mul(s1, ALPHA)  ^ code_in[i*SYM_BITS +: SYM_BITS];
      s2 = gf_mul(s2, ALPHA2) ^ code_in[i*SYM_BITS +: SYM_BITS];
    end
  end

  always_comb begin
    x_loc = gf_mul(s2, gf_inv(s1));
    pos   = gf_log(x_loc);
    e_val = gf_mul(s1, gf_inv(x_loc));
    fixed = code_in;
    err_detected  = 1'b0;
    corrected     = 1'b0;
    uncorrectable = 1'b0;
    if (!bypass && (s1 != '0 || s2 != '0)) begin
      err_detected = 1'b1;
      if (s1 == '0 || s2 == '0 || 32'(pos) >= NS) begin
        uncorrectable = 1'b1;
      end else begin
        corrected = 1'b1;
        for (int i = 0; i < int'(NS); i++)
          if (32'(pos) == i) fixed[i*SYM_BITS +: SYM_BITS] = code_in[i*SYM_BITS +: SYM_BITS] ^ e_val;
      end
    end
    data_out = fixed[NS*SYM_BITS-1 : (NS-KS)*SYM_BITS];
  end

endmodule
