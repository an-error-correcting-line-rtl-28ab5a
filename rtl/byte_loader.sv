// byte_loader: gathers the 64 user bits of a frame from a byte-wide input.
//
// Bytes arrive with a valid/ready handshake; the first byte of a word becomes
// its most significant byte. After NBYTES bytes the word moves to a pending
// register, where it waits for the encoder to take it at a frame boundary,
// while the next word is gathered. When a full word is gathered and the
// pending register is still occupied, byte_ready drops until the encoder
// takes the pending word. The byte-wide input follows the design (the user
// word enters byte by byte for lack of pins); the handshake and byte order are
// this implementation's choices.
//
// Timing: a word is pending on the clock after its last byte is accepted
// (or after the older pending word is taken, if the register was full).
module byte_loader #(
  parameter int unsigned NBYTES = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [7:0]           byte_in,
  input  logic                 byte_valid,
  output logic                 byte_ready,
  input  logic                 take,
  output logic [NBYTES*8-1:0]  word,
  output logic                 word_valid
);

  logic [NBYTES*8-1:0] asm_word;
  logic [3:0]          asm_cnt;
  logic                asm_full;
  logic                move;

  assign asm_full   = (32'(asm_cnt) == NBYTES);
  assign byte_ready = !asm_full;
  assign move       = asm_full && (!word_valid || take);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      asm_word   <= '0;
      asm_cnt    <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      if (byte_valid && byte_ready) begin
        asm_word <= {asm_word[NBYTES*8-9:0], byte_in};
        asm_cnt  <= asm_cnt + 4'd1;
      end else if (move) begin
        asm_cnt  <= '0;
      end
      if (move) begin
        word       <= asm_word;
        word_valid <= 1'b1;
      end else if (take) begin
        word_valid <= 1'b0;
      end
    end
  end

  initial begin
    assert (NBYTES >= 2 && NBYTES < 16) else $error("byte_loader: NBYTES out of range");
  end

  // The encoder only takes a word that is pending.
  assert property (@(posedge clk) disable iff (!rst_n) take |-> word_valid)
    else $error("byte_loader: take without a pending word");

endmodule
