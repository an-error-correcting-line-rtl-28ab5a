// tb_byte_loader: offers random bytes with random gaps and takes words at
// random times; checks every word against the bytes sent (first byte most
// significant), that no byte is lost or duplicated, and that byte_ready
// drops (back-pressure) exactly when a gathered word waits behind a pending
// one.
module tb_byte_loader;
  logic clk = 0, rst_n = 0;
  logic [7:0] byte_in = '0;
  logic byte_valid = 0, byte_ready, take = 0, word_valid;
  logic [63:0] word;
  int checks = 0, failures = 0, n_words = 0, n_stall = 0;
  logic [7:0] sent[$];

  byte_loader dut (.clk, .rst_n, .byte_in, .byte_valid, .byte_ready, .take, .word, .word_valid);

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
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      // check the handshake rule before acting
      chk(byte_ready == !(dut.asm_cnt == 8), "ready low only with a full gathering register");
      if (!byte_ready) n_stall++;
      byte_valid = ($urandom_range(0, 2) != 0);
      byte_in    = 8'($urandom());
      // slow consumer in the middle third, fast elsewhere
      take = word_valid && ($urandom_range(0, (cyc > 2000 && cyc < 4000) ? 40 : 2) == 0);
      if (take) begin
        logic [63:0] e;
        for (int b = 0; b < 8; b++) e = {e[55:0], sent.pop_front()};
        chk(word == e, "word holds the bytes in order");
        n_words++;
      end
      @(posedge clk);
      if (byte_valid && byte_ready) sent.push_back(byte_in);
    end
    chk(n_words > 100, "many words passed");
    chk(n_stall > 0, "back-pressure happened");
    $display("words %0d, stalled cycles %0d", n_words, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
