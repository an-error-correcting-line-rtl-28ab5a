// tb_descrambler: scrambles random user words with a bit-serial model that
// starts from a random state, feeds them to the descrambler (reset to zero)
// and checks that every word after the first is recovered exactly (the
// self-synchronization property), then checks the bypass mode.
module tb_descrambler;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, bypass = 0;
  logic [63:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [62:0] h;
  logic [63:0] user [0:299];

  descrambler dut (.clk, .rst_n, .en, .bypass, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h = {$urandom(), $urandom()};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      user[n] = (n % 40 == 5) ? 64'h0 : rand64();
      din = r_scramble(h, user[n]);
      en  = 1;
      #1;
      if (n >= 1) begin
        checks++;
        if (dout !== user[n]) begin
          failures++;
          if (failures < 5) $display("word %0d: got %h exp %h", n, dout, user[n]);
        end
      end
    end
    // bypass: data passes unchanged
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      bypass = 1;
      din = rand64();
      #1;
      checks++;
      if (dout !== din) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
