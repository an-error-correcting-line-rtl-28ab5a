// tb_rs_decoder: builds codewords with the reference parity and checks the
// decoder on clean blocks, on every single-symbol error (all positions, all
// 15 error values), on random double-symbol errors (must never pass as
// clean, and must be flagged uncorrectable whenever the locator falls in the
// zero-padded positions), and in bypass mode.
module tb_rs_decoder;
  import tb_ref_pkg::*;

  logic        bypass = 0;
  logic [39:0] code_in = '0;
  logic [31:0] data_out;
  logic        err_detected, corrected, uncorrectable;
  int checks = 0, failures = 0;
  int n_pad_detect = 0;

  rs_decoder dut (.bypass, .code_in, .data_out, .err_detected, .corrected, .uncorrectable);

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (code %h)", msg, code_in);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [39:0] cw;
    for (int n = 0; n < 60; n++) begin
      d  = $urandom();
      cw = {d, r_parity(d)};
      code_in = cw; #1;
      chk(data_out == d && !err_detected && !corrected && !uncorrectable, "clean block");
      for (int pos = 0; pos < 10; pos++)
        for (int v = 1; v < 16; v++) begin
          code_in = cw ^ (40'(v) << (4 * pos)); #1;
          chk(data_out == d && err_detected && corrected && !uncorrectable, "single symbol error");
        end
      for (int k = 0; k < 20; k++) begin
        int p1, p2;
        logic [3:0] s1, s2;
        int loc;
        p1 = $urandom_range(0, 9);
        p2 = (p1 + $urandom_range(1, 9)) % 10;
        code_in = cw ^ (40'($urandom_range(1, 15)) << (4 * p1)) ^ (40'($urandom_range(1, 15)) << (4 * p2));
        #1;
        chk(err_detected, "double error detected");
        s1 = r_synd(code_in, 1);
        s2 = r_synd(code_in, 2);
        if (s1 != 0 && s2 != 0) begin
          loc = (r_log(s2) - r_log(s1) + 15) % 15;
          if (loc >= 10) begin
            n_pad_detect++;
            chk(uncorrectable && !corrected, "locator in padded zone flagged");
          end else begin
            chk(corrected && !uncorrectable, "double error looks single");
          end
        end else begin
          chk(uncorrectable && !corrected, "one zero syndrome flagged");
        end
      end
      bypass = 1;
      code_in = cw ^ 40'h1_0000_0000; #1;
      chk(data_out == (d ^ 32'h0100_0000) && !err_detected && !corrected && !uncorrectable, "bypass");
      bypass = 0;
    end
    chk(n_pad_detect > 0, "zero-padding detection exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
