// line_encoder: transmit half of the line code, first coding option.
//
// Per frame of 88 line bits: the 64-bit user word (or an all-zero word for an
// idle frame) is scrambled, split into two 32-bit blocks, each block gets two
// RS(10,8) parity symbols, the two codewords are symbol-interleaved into 80
// bits and the 8-bit data or idle header is put in front. The frame is then
// shifted out one bit per clock. User bytes enter through byte_loader; a frame
// boundary with no complete word pending sends an idle frame. The processing
// order (scramble, RS, header), the sizes and the byte-wide input follow the
// design; one clock per line bit with a modulo-88 frame counter, the idle
// payload and the interleaving order are this implementation's choices.
//
// Timing: at the last bit clock of a frame the pending word is taken, encoded
// combinationally and loaded into the serializer; its 88 bits leave on the
// next 88 clocks, so encoding plus serialization takes one frame time.
// tx_sof is high while the first (header) bit of a frame is on tx_bit, and
// tx_idle is high throughout an idle frame. The bypass inputs are test modes
// and must match the settings of the receiving decoder.
module line_encoder
  import linecode_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] byte_in,
  input  logic       byte_valid,
  output logic       byte_ready,
  input  logic       scr_bypass,
  input  logic       rs_bypass,
  output logic       tx_bit,
  output logic       tx_sof,
  output logic       tx_idle
);

  logic [7:0]            txcnt;
  logic                  load;
  logic [USER_BITS-1:0]  word;
  logic                  word_valid;
  logic [USER_BITS-1:0]  scr_in, scr_out;
  logic [7:0]            par_a, par_b;
  logic [FRAME_BITS-1:0] frame;

  assign load = (32'(txcnt) == FRAME_BITS - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      txcnt   <= '0;
      tx_sof  <= 1'b0;
      tx_idle <= 1'b1;
    end else begin
      txcnt  <= load ? 8'd0 : txcnt + 8'd1;
      tx_sof <= load;
      if (load) tx_idle <= !word_valid;
    end
  end

  byte_loader #(.NBYTES(USER_BITS / 8)) u_loader (
    .clk       (clk),
    .rst_n     (rst_n),
    .byte_in   (byte_in),
    .byte_valid(byte_valid),
    .byte_ready(byte_ready),
    .take      (load && word_valid),
    .word      (word),
    .word_valid(word_valid)
  );

  assign scr_in = word_valid ? word : '0;

  scrambler #(.W(USER_BITS)) u_scr (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (load),
    .bypass(scr_bypass),
    .din   (scr_in),
    .dout  (scr_out)
  );

  rs_encoder u_rs_a (
    .bypass(rs_bypass),
    .data  (scr_out[USER_BITS-1 -: BLK_DBITS]),
    .parity(par_a)
  );

  rs_encoder u_rs_b (
    .bypass(rs_bypass),
    .data  (scr_out[BLK_DBITS-1:0]),
    .parity(par_b)
  );

  assign frame = {word_valid ? HDR_DATA_PAT : HDR_IDLE_PAT,
                  interleave({scr_out[USER_BITS-1 -: BLK_DBITS], par_a},
                             {scr_out[BLK_DBITS-1:0], par_b})};

  serializer #(.FRAME_BITS(FRAME_BITS)) u_ser (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .frame (frame),
    .tx_bit(tx_bit)
  );

endmodule
