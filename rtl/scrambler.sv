// scrambler: self-synchronizing (multiplicative) scrambler of order 63 that
// processes one W-bit word per enabled clock.
//
// Each scrambled bit is S[k] = D[k] ^ S[k-5] ^ S[k-63], the recursion of the
// primitive trinomial x^63 + x^58 + 1 (taps at 5 and 63 bits back). The order 63 and the self-synchronizing
// structure follow the design; the trinomial is this implementation's choice.
// Bit 0 of a word is the earliest bit of the sequence. A 63-bit register keeps
// the most recent scrambled bits; the W bits of a word are computed in one
// combinational pass (bit k of a word depends on bit k-5 of the same word).
// A tap close to the output was chosen over one next to the far end (such as
// 62 and 63) because it turns a constant input into a line as balanced as
// random data (idle-only traffic shows the same baseline wander); with taps
// at 62 and 63 an idle line stays visibly unbalanced for millions of bits.
//
// Reset loads the history with SEED (alternating bits), which must be neither
// all zeros nor all ones: with an all-zero history and all-zero input (idle
// frames) the output stays zero, and with an all-one history and all-one
// input it stays one; either way the line loses its transitions.
//
// Interface: dout is combinational from din and the history. On a clock with
// en = 1 the history takes the last 63 bits of dout. In bypass dout = din and
// the history is fed with din (a test mode; both link ends must agree).
module scrambler #(
  parameter int unsigned W     = 64,
  parameter int unsigned ORDER = 63,
  parameter int unsigned TAP   = 5,
  parameter logic [ORDER-1:0] SEED = 63'h2AAA_AAAA_AAAA_AAAA
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         bypass,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  logic [ORDER-1:0] hist;  // hist[ORDER-1] is the most recent scrambled bit

  always_comb begin
    logic [W+ORDER-1:0] ext;  // ext[ORDER+k] = S[k]; ext[j<ORDER] = history
    ext = {{W{1'b0}}, hist};
    for (int k = 0; k < int'(W); k++) begin
      if (bypass) ext[ORDER+k] = din[k];
      else        ext[ORDER+k] = din[k] ^ ext[ORDER+k-TAP] ^ ext[k];
    end
    dout = ext[W+ORDER-1:ORDER];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  hist <= SEED;
    else if (en) hist <= dout[W-1:W-ORDER];
  end

  initial begin
    assert (W >= ORDER) else $error("scrambler: W must be at least ORDER");
  end

endmodule
