// tb_header_detect: exhaustive check of all 256 header values at the default
// tolerance of two bits, against Hamming distances counted bit by bit from
// the two header patterns.
module tb_header_detect;
  import linecode_pkg::*;
  import tb_ref_pkg::*;

  logic [7:0] hdr = '0;
  hdr_kind_t  kind;
  logic       exact;
  int checks = 0, failures = 0;

  header_detect dut (.hdr, .kind, .exact);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dd, di;
    hdr_kind_t ek;
    for (int v = 0; v < 256; v++) begin
      hdr = 8'(v);
      dd = 0; di = 0;
      for (int b = 0; b < 8; b++) begin
        if (hdr[b] != R_HDR_DATA[b]) dd++;
        if (hdr[b] != R_HDR_IDLE[b]) di++;
      end
      ek = (dd <= 2) ? HDR_DATA : (di <= 2) ? HDR_IDLE : HDR_INVALID;
      #1;
      checks++;
      if (kind != ek || exact != (dd == 0 || di == 0)) begin
        failures++;
        if (failures < 5) $display("hdr %b: kind %0d exp %0d exact %b", hdr, kind, ek, exact);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
