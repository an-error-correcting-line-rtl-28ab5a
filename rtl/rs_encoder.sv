// rs_encoder: systematic Reed-Solomon encoder over GF(16), RS(15,13)
// shortened to RS(NS, KS) = RS(10,8), for one block.
//
// The parity is the remainder of m(x) * x^2 divided by the generator
// g(x) = (x + alpha)(x + alpha^2) = x^2 + alpha^5 x + alpha^3, computed by the
// usual two-stage division feedback shift register. The register is unrolled
// over the KS data symbols, so a block is encoded combinationally in one
// cycle. The five leading symbols of the full-length code are zero and are
// not sent. Systematic encoding, the symbol width and the block sizes follow
// the design; the field polynomial x^4 + x + 1 and the generator roots are
// this implementation's choices.
//
// Interface: data holds the KS data symbols, the most significant symbol is
// the coefficient of the highest power. parity = {p1, p0}; the codeword is
// {data, p1, p0}. In bypass the parity is zero (test mode).
module rs_encoder
  import linecode_pkg::*;
#(
  parameter int unsigned KS = 8,
  parameter int unsigned NS = 10
) (
  input  logic                         bypass,
  input  logic [KS*SYM_BITS-1:0]       data,
  output logic [(NS-KS)*SYM_BITS-1:0]  parity
);

  localparam gf_t G1 = 4'b0110;  // alpha^5
  localparam gf_t G0 = 4'b1000;  // alpha^3

  always_comb begin
    gf_t r1, r0, fb;
    r1 = '0;
    r0 = '0;
    for (int i = int'(KS) - 1; i >= 0; i--) begin
      fb = data[i*SYM_BITS +: SYM_BITS] ^ r1;
      r1 = r0 ^ gf_mul(fb, G1);
      r0 = gf_mul(fb, G0);
    end
    parity = bypass ? '0 : {r1, r0};
  end

  initial begin
    assert (NS - KS == 2) else $error("rs_encoder: two parity symbols expected");
  end

endmodule
