// tb_byte_unloader: loads random words at random spacing (at least 8 clocks
// apart) and checks the 8 bytes that follow: order, byte_valid, byte_first,
// and that nothing is output between words.
module tb_byte_unloader;
  logic clk = 0, rst_n = 0, load = 0;
  logic [63:0] word = '0, cur = '0;
  logic [7:0] byte_out;
  logic byte_valid, byte_first;
  int checks = 0, failures = 0;

  byte_unloader dut (.clk, .rst_n, .load, .word, .byte_out, .byte_valid, .byte_first);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 100; w++) begin
      @(negedge clk);
      chk(!byte_valid, "idle between words");
      word = {$urandom(), $urandom()};
      cur  = word;
      load = 1;
      @(negedge clk);
      load = 0;
      for (int b = 0; b < 8; b++) begin
        chk(byte_valid && byte_out == cur[63 - 8*b -: 8] && byte_first == (b == 0), "byte order and flags");
        @(negedge clk);
      end
      chk(!byte_valid, "exactly 8 bytes");
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
