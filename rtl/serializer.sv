// serializer: parallel-to-serial converter for one line frame.
//
// load copies a FRAME_BITS-wide frame into a shift register; on every clock
// the register shifts left and tx_bit carries its top bit, so the frame
// leaves most significant bit first (header first), one bit per clock,
// starting on the clock after load. The caller loads a new frame every
// FRAME_BITS clocks; loading earlier abandons the rest of the old frame.
// The serial output follows the design; the bit order is this
// implementation's choice.
module serializer #(
  parameter int unsigned FRAME_BITS = 88
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [FRAME_BITS-1:0] frame,
  output logic                  tx_bit
);

  logic [FRAME_BITS-1:0] sr;

  assign tx_bit = sr[FRAME_BITS-1];

  always_ff @(posedge clk) begin
    if (!rst_n)    sr <= '0;
    else if (load) sr <= frame;
    else           sr <= {sr[FRAME_BITS-2:0], 1'b0};
  end

endmodule
