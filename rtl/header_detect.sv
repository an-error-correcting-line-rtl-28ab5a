// header_detect: classifies a received 8-bit frame header.
//
// Two DC-balanced header patterns are defined, data and idle, at Hamming
// distance 8 from each other. A header within HDR_TOL flipped bits of one of
// them is taken as that kind, so an upset of one or two bits (for instance a
// particle hit spanning two bit periods) still identifies the frame. exact
// reports a match with no flipped bit, used while searching for the frame
// boundary. The patterns and the tolerance are this implementation's choice;
// the design asks only for balanced, upset-tolerant headers.
//
// Interface: purely combinational.
module header_detect
  import linecode_pkg::*;
#(
  parameter int unsigned HDR_TOL = 2
) (
  input  logic [HDR_BITS-1:0] hdr,
  output hdr_kind_t           kind,
  output logic                exact
);

  logic [3:0] d_data, d_idle;

  always_comb begin
    d_data = 4'($countones(hdr ^ HDR_DATA_PAT));
    d_idle = 4'($countones(hdr ^ HDR_IDLE_PAT));
    exact  = (d_data == 4'd0) || (d_idle == 4'd0);
    if (32'(d_data) <= HDR_TOL)      kind = HDR_DATA;
    else if (32'(d_idle) <= HDR_TOL) kind = HDR_IDLE;
    else                             kind = HDR_INVALID;
  end

  initial begin
    assert (HDR_TOL < 4) else $error("header_detect: HDR_TOL must be below half the header distance");
  end

endmodule
