// tb_scrambler: checks the 64-bit parallel scrambler against a bit-serial
// model of S[k] = D[k] ^ S[k-5] ^ S[k-63] over random words, including
// words fed while disabled (history must hold) and the bypass mode.
module tb_scrambler;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, bypass = 0;
  logic [63:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [62:0] h;
  logic [63:0] exp_s;

  scrambler dut (.clk, .rst_n, .en, .bypass, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h = {<<{R_SEED}};  // model keeps the newest bit at index 0
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      din    = (n % 50 == 7) ? 64'h0 : (n % 50 == 8) ? '1 : rand64();
      bypass = (n >= 300 && n < 320);
      en     = bypass || ($urandom_range(0, 3) != 0);
      #1;
      if (bypass) begin
        exp_s = din;
        h = {<<{din[63:1]}};  // newest first: h[0] = din[63]
      end else if (en) begin
        exp_s = r_scramble(h, din);
      end else begin
        logic [62:0] htmp;
        htmp  = h;
        exp_s = r_scramble(htmp, din);
      end
      checks++;
      if (dout !== exp_s) begin
        failures++;
        if (failures < 5) $display("mismatch word %0d: got %h exp %h", n, dout, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
