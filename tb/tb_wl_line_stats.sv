// tb_wl_line_stats: statistics of the encoder's serial output for four kinds
// of user traffic: random words, all-zero words, all-one words and idle
// frames only. Each stream is N_BITS line bits long (5 Mb by default).
//
// Baseline wander: the line, taken as +-1/2 of the signal amplitude, goes
// through a first-order high-pass filter with a 100 kHz corner at the
// 3.52 Gb/s line rate; the wander is the low-pass part the filter removes,
// y += a * (x - y) with a = 2*pi*100e3 / 3.52e9 per bit. For a random
// balanced line its standard deviation is 0.5 * sqrt(a / 2) = 0.47 % of the
// amplitude. Checked per stream: |mean wander| < 0.1 %, sigma < 0.6 %,
// fraction of ones within 0.5 % of one half, average run length below 2.1
// bits and the longest run below one frame (88 bits).
module tb_wl_line_stats;
  localparam longint N_BITS = 5_000_000;

  logic clk = 0, rst_n = 0;
  logic [7:0] byte_in = '0;
  logic byte_valid = 0, byte_ready;
  logic tx_bit, tx_sof, tx_idle;
  int checks = 0, failures = 0;
  int kind = 0;   // 0 random, 1 zeros, 2 ones, 3 idle

  line_encoder dut (.clk, .rst_n, .byte_in, .byte_valid, .byte_ready, .scr_bypass(1'b0),
                    .rs_bypass(1'b0), .tx_bit, .tx_sof, .tx_idle);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL kind %0d: %s", kind, msg);
    end
  endtask

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // feeder
  always @(negedge clk) begin
    byte_valid = rst_n && (kind != 3);
    byte_in = (kind == 0) ? 8'($urandom()) : (kind == 1) ? 8'h00 : 8'hFF;
  end

  initial begin
    real a, y, x, s1, s2, mean, sigma;
    longint ones, runs, run_len, max_run, n, n_data, n_idle;
    logic prev;
    string names[4] = '{"random data", "constant zeros", "constant ones", "idle frames"};
    a = 2.0 * 3.14159265358979 * 100.0e3 / 3.52e9;
    for (int k = 0; k < 4; k++) begin
      kind = k;
      rst_n = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
      while (!tx_sof) @(negedge clk);   // skip the reset frame
      @(negedge clk);
      while (!tx_sof) @(negedge clk);
      y = 0.0; s1 = 0.0; s2 = 0.0;
      ones = 0; runs = 1; run_len = 0; max_run = 0; n = 0; n_data = 0; n_idle = 0;
      prev = tx_bit;
      while (n < N_BITS) begin
        if (tx_sof) begin
          if (tx_idle) n_idle++;
          else         n_data++;
        end
        x = tx_bit ? 0.5 : -0.5;
        y = y + a * (x - y);
        if (n >= 50000) begin   // after the filter has settled
          s1 += y;
          s2 += y * y;
        end
        if (tx_bit) ones++;
        if (tx_bit == prev) run_len++;
        else begin
          runs++;
          run_len = 1;
        end
        if (run_len > max_run) max_run = run_len;
        prev = tx_bit;
        n++;
        @(negedge clk);
      end
      mean  = s1 / real'(N_BITS - 50000);
      sigma = $sqrt(s2 / real'(N_BITS - 50000) - mean * mean);
      $display("%-15s: %0d bits, %0d data / %0d idle frames, ones %.3f %%, wander mean %.4f %% sigma %.3f %%, run length avg %.3f max %0d",
               names[k], n, n_data, n_idle, 100.0 * real'(ones) / real'(n), 100.0 * mean, 100.0 * sigma,
               real'(n) / real'(runs), max_run);
      chk((k == 3) ? (n_data == 0) : (n_idle < 3), "traffic kind");
      chk(mean < 0.001 && mean > -0.001, "mean wander below 0.1 %");
      chk(sigma < 0.006, "wander sigma below 0.6 %");
      chk(real'(ones) / real'(n) > 0.495 && real'(ones) / real'(n) < 0.505, "balanced");
      chk(real'(n) / real'(runs) < 2.1, "average run length");
      chk(max_run < 88, "longest run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
