// tb_serializer: loads random frames every 88 clocks and checks that each
// leaves MSB first, one bit per clock, starting the clock after load.
module tb_serializer;
  logic clk = 0, rst_n = 0, load = 0, tx_bit;
  logic [87:0] frame = '0, cur = '0;
  int checks = 0, failures = 0;

  serializer dut (.clk, .rst_n, .load, .frame, .tx_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 50; f++) begin
      @(negedge clk);
      frame = {$urandom(), $urandom(), 24'($urandom())};
      cur   = frame;
      load  = 1;
      @(negedge clk);
      load  = 0;
      for (int i = 87; i >= 0; i--) begin
        checks++;
        if (tx_bit !== cur[i]) failures++;
        if (i > 0) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
