// descrambler: self-synchronizing descrambler matching the scrambler, one
// W-bit word per enabled clock.
//
// D[k] = S[k] ^ S[k-5] ^ S[k-63]: a feed-forward function of the received
// scrambled bits only, so after 63 received bits it is in step with the
// transmitter whatever its starting state, and a single line error corrupts
// at most three user bits (the bit itself and the ones 5 and 63 later).
// The trinomial x^63 + x^58 + 1 is this implementation's choice.
//
// Interface: dout is combinational from din and the 63-bit history of
// received scrambled bits; a clock with en = 1 stores the last 63 bits of din.
// In bypass dout = din.
module descrambler #(
  parameter int unsigned W     = 64,
  parameter int unsigned ORDER = 63,
  parameter int unsigned TAP   = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         bypass,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  logic [ORDER-1:0] hist;  // hist[ORDER-1] is the most recent received bit

  always_comb begin
    logic [W+ORDER-1:0] ext;
    ext = {din, hist};
    for (int k = 0; k < int'(W); k++) begin
      if (bypass) dout[k] = din[k];
      else        dout[k] = din[k] ^ ext[ORDER+k-TAP] ^ ext[k];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  hist <= '0;
    else if (en) hist <= din[W-1:W-ORDER];
  end

  initial begin
    assert (W >= ORDER) else $error("descrambler: W must be at least ORDER");
  end

endmodule
