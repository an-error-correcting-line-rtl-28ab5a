// line_decoder: receive half of the line code, first coding option.
//
// frame_sync finds the frame boundary in the serial stream and delivers each
// 88-bit frame. The 80-bit RS field is de-interleaved into the two RS(10,8)
// codewords, each is checked and, if a single symbol is wrong, corrected;
// the corrected 64 scrambled bits are registered, descrambled and, for data
// frames received while locked, sent out as 8 bytes. Idle frames and frames
// with an unrecognisable header produce no bytes, but every delivered frame
// advances the descrambler so that it stays in step with the transmitter.
// The chain (frame sync, RS decoding, descrambling, byte output) follows the
// design; the pipeline register placement and the status pulses are this
// implementation's choices.
//
// Timing: one clock per line bit. The frame is decoded on the clock after
// its last bit enters, registered, and its first byte is on byte_out the
// clock after that; the last byte leaves 97 clocks after the frame's first
// bit entered, within the two frame times (176 clocks) allowed for decoding.
// corrected, uncorrectable and hdr_error pulse for one clock per affected
// frame, together with the registered frame.
module line_decoder
  import linecode_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_bit,
  input  logic       scr_bypass,
  input  logic       rs_bypass,
  output logic [7:0] byte_out,
  output logic       byte_valid,
  output logic       byte_first,
  output logic       locked,
  output logic       corrected,
  output logic       uncorrectable,
  output logic       hdr_error
);

  logic [FRAME_BITS-1:0] frame;
  logic                  frame_valid;
  hdr_kind_t             kind;
  logic                  slip;
  logic [BLK_BITS-1:0]   cw_a, cw_b;
  logic [BLK_DBITS-1:0]  dat_a, dat_b;
  logic                  det_a, det_b, cor_a, cor_b, unc_a, unc_b;

  // registered stage
  logic                  r_valid, r_locked, r_cor, r_unc;
  hdr_kind_t             r_kind;
  logic [USER_BITS-1:0]  r_word, user_word;

  frame_sync u_sync (
    .clk        (clk),
    .rst_n      (rst_n),
    .rx_bit     (rx_bit),
    .frame      (frame),
    .frame_valid(frame_valid),
    .kind       (kind),
    .locked     (locked),
    .slip       (slip)
  );

  assign {cw_a, cw_b} = deinterleave(frame[RS_BITS-1:0]);

  rs_decoder u_rsd_a (
    .bypass       (rs_bypass),
    .code_in      (cw_a),
    .data_out     (dat_a),
    .err_detected (det_a),
    .corrected    (cor_a),
    .uncorrectable(unc_a)
  );

  rs_decoder u_rsd_b (
    .bypass       (rs_bypass),
    .code_in      (cw_b),
    .data_out     (dat_b),
    .err_detected (det_b),
    .corrected    (cor_b),
    .uncorrectable(unc_b)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_valid  <= 1'b0;
      r_locked <= 1'b0;
      r_cor    <= 1'b0;
      r_unc    <= 1'b0;
      r_kind   <= HDR_INVALID;
      r_word   <= '0;
    end else begin
      r_valid <= frame_valid;
      if (frame_valid) begin
        r_locked <= locked;
        r_kind   <= kind;
        r_word   <= {dat_a, dat_b};
        r_cor    <= (cor_a || cor_b) && !(unc_a || unc_b);
        r_unc    <= unc_a || unc_b;
      end
    end
  end

  descrambler #(.W(USER_BITS)) u_descr (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (r_valid),
    .bypass(scr_bypass),
    .din   (r_word),
    .dout  (user_word)
  );

  byte_unloader #(.NBYTES(USER_BITS / 8)) u_unload (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (r_valid && r_locked && r_kind == HDR_DATA),
    .word      (user_word),
    .byte_out  (byte_out),
    .byte_valid(byte_valid),
    .byte_first(byte_first)
  );

  assign corrected     = r_valid && r_locked && r_cor;
  assign uncorrectable = r_valid && r_locked && r_unc;
  assign hdr_error     = r_valid && r_locked && (r_kind == HDR_INVALID);

  // The RS decoders' flags are consistent: a detected error is either
  // corrected or declared uncorrectable.
  assert property (@(posedge clk) disable iff (!rst_n)
                   frame_valid |-> ((det_a == (cor_a || unc_a)) && (det_b == (cor_b || unc_b))))
    else $error("line_decoder: inconsistent RS decoder flags");

endmodule
