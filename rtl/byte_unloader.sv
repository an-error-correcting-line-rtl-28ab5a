// byte_unloader: sends a decoded user word out as bytes.
//
// load captures a word; on the following NBYTES clocks byte_out carries its
// bytes, most significant first, with byte_valid high and byte_first marking
// the first byte. A load while bytes are still going out restarts with the
// new word (the decoder loads at most once per frame, far more than NBYTES
// clocks apart). Byte-wide output follows the design; the pacing of one byte
// per clock is this implementation's choice.
module byte_unloader #(
  parameter int unsigned NBYTES = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [NBYTES*8-1:0] word,
  output logic [7:0]          byte_out,
  output logic                byte_valid,
  output logic                byte_first
);

  logic [NBYTES*8-1:0] buf_q;
  logic [3:0]          left;

  assign byte_out   = buf_q[NBYTES*8-1 -: 8];
  assign byte_valid = (left != '0);
  assign byte_first = (32'(left) == NBYTES);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q <= '0;
      left  <= '0;
    end else if (load) begin
      buf_q <= word;
      left  <= 4'(NBYTES);
    end else if (left != '0) begin
      buf_q <= {buf_q[NBYTES*8-9:0], 8'h00};
      left  <= left - 4'd1;
    end
  end

  initial begin
    assert (NBYTES >= 1 && NBYTES < 16) else $error("byte_unloader: NBYTES out of range");
  end

endmodule
