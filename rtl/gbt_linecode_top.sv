// gbt_linecode_top: the line-code demonstrator, encoder and decoder side by
// side on one clock, each with its own ports.
//
// The encoder takes user bytes and drives the serial line (enc_tx_bit); the
// decoder takes a serial line (dec_rx_bit) and returns user bytes. They are
// independent, so either can be exercised alone, or enc_tx_bit can be looped
// back to dec_rx_bit externally (through an error-injecting channel if
// wanted) for a back-to-back test. Scrambling and RS coding can be bypassed
// separately on each side as test modes. One clock cycle is one line bit; a
// frame is 88 clocks. Having both halves on one die with separate line ports
// follows the design's test chip; the shared clock and reset are this
// implementation's choice.
module gbt_linecode_top (
  input  logic       clk,
  input  logic       rst_n,
  // encoder
  input  logic [7:0] enc_byte_in,
  input  logic       enc_byte_valid,
  output logic       enc_byte_ready,
  input  logic       enc_scr_bypass,
  input  logic       enc_rs_bypass,
  output logic       enc_tx_bit,
  output logic       enc_tx_sof,
  output logic       enc_tx_idle,
  // decoder
  input  logic       dec_rx_bit,
  input  logic       dec_scr_bypass,
  input  logic       dec_rs_bypass,
  output logic [7:0] dec_byte_out,
  output logic       dec_byte_valid,
  output logic       dec_byte_first,
  output logic       dec_locked,
  output logic       dec_corrected,
  output logic       dec_uncorrectable,
  output logic       dec_hdr_error
);

  line_encoder u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .byte_in   (enc_byte_in),
    .byte_valid(enc_byte_valid),
    .byte_ready(enc_byte_ready),
    .scr_bypass(enc_scr_bypass),
    .rs_bypass (enc_rs_bypass),
    .tx_bit    (enc_tx_bit),
    .tx_sof    (enc_tx_sof),
    .tx_idle   (enc_tx_idle)
  );

  line_decoder u_dec (
    .clk          (clk),
    .rst_n        (rst_n),
    .rx_bit       (dec_rx_bit),
    .scr_bypass   (dec_scr_bypass),
    .rs_bypass    (dec_rs_bypass),
    .byte_out     (dec_byte_out),
    .byte_valid   (dec_byte_valid),
    .byte_first   (dec_byte_first),
    .locked       (dec_locked),
    .corrected    (dec_corrected),
    .uncorrectable(dec_uncorrectable),
    .hdr_error    (dec_hdr_error)
  );

endmodule
