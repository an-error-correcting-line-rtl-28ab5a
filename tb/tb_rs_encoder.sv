// tb_rs_encoder: compares the encoder's parity with the parity pair found by
// exhaustive search for a zero syndrome at alpha and alpha^2, for random and
// corner-case data, and checks that bypass gives zero parity.
module tb_rs_encoder;
  import tb_ref_pkg::*;

  logic        bypass = 0;
  logic [31:0] data = '0;
  logic [7:0]  parity;
  int checks = 0, failures = 0;

  rs_encoder dut (.bypass, .data, .parity);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      data = (n < 32) ? (32'h1 << n) : (n == 32) ? 32'hFFFF_FFFF : $urandom();
      bypass = 0;
      #1;
      checks++;
      if (parity !== r_parity(data)) begin
        failures++;
        if (failures < 5) $display("data %h: got %h exp %h", data, parity, r_parity(data));
      end
      bypass = 1;
      #1;
      checks++;
      if (parity !== 8'h00) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
