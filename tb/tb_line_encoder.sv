// tb_line_encoder: feeds random user words byte by byte, at times faster and
// times slower than the line can carry, collects the serial output frame by
// frame and rebuilds every frame with the reference model (serial scrambler,
// searched RS parity, interleaving, header). Checks: frame period of 88
// clocks, headers, every bit of every frame, words in order with none lost,
// idle frames sent when no word is ready, back-pressure, the one-frame
// encoding time, and the two bypass test modes.
module tb_line_encoder;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] byte_in = '0;
  logic byte_valid = 0, byte_ready, scr_bypass = 0, rs_bypass = 0;
  logic tx_bit, tx_sof, tx_idle;
  int checks = 0, failures = 0;
  int n_data = 0, n_idle = 0, n_stall = 0, max_lat = 0;

  logic [63:0] words[$];      // words whose last byte was accepted
  longint      done_at[$];    // clock of that last byte
  longint      cyc = 0;

  line_encoder dut (.clk, .rst_n, .byte_in, .byte_valid, .byte_ready, .scr_bypass, .rs_bypass,
                    .tx_bit, .tx_sof, .tx_idle);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // byte feeder: gap between bytes chosen per phase
  int gap_max = 2;
  bit feed_on = 0;
  initial begin
    logic [63:0] w;
    int b = 0;
    forever begin
      @(negedge clk);
      if (!feed_on || !rst_n) begin
        byte_valid = 0;
        b = 0;
        continue;
      end
      if (b == 0) w = rand64();
      byte_valid = ($urandom_range(0, gap_max) == 0);
      byte_in    = w[63 - 8*b -: 8];
      if (!byte_ready) n_stall++;
      @(posedge clk);
      if (byte_valid && byte_ready) begin
        b++;
        if (b == 8) begin
          words.push_back(w);
          done_at.push_back(cyc);
          b = 0;
        end
      end
    end
  end

  // run one phase: reset, then check nframes frames
  task automatic run_phase(bit sb, bit rb, int gmax, int nframes);
    logic [62:0] h;
    logic [87:0] f, e;
    longint last_sof;
    feed_on = 0;
    rst_n = 0;
    scr_bypass = sb;
    rs_bypass = rb;
    gap_max = gmax;
    repeat (3) @(posedge clk);
    words.delete();
    done_at.delete();
    h = {<<{R_SEED}};  // model keeps the newest bit at index 0
    rst_n = 1;
    feed_on = 1;
    // first frame after reset is the all-zero power-on content; skip to sof
    @(negedge clk);
    while (!tx_sof) @(negedge clk);
    last_sof = cyc - 88;
    for (int n = 0; n < nframes; n++) begin
      chk(cyc - last_sof == 88, "frame period 88 clocks");
      last_sof = cyc;
      for (int i = 87; i >= 0; i--) begin
        f[i] = tx_bit;
        if (i == 87) chk(tx_sof, "tx_sof on first bit");
        else         chk(!tx_sof, "tx_sof only on first bit");
        @(negedge clk);
      end
      chk(f[87:80] == R_HDR_DATA || f[87:80] == R_HDR_IDLE, "header is a defined pattern");
      if (f[87:80] == R_HDR_DATA) begin
        logic [63:0] w;
        chk(words.size() > 0, "data frame only when a word was given");
        w = words.pop_front();
        e = r_frame(sb ? w : r_scramble(h, w), 0, rb);
        if (sb) h = {<<{w[63:1]}};
        if (gmax >= 30 && cyc - done_at[0] > max_lat) max_lat = int'(cyc - done_at[0]);
        void'(done_at.pop_front());
        n_data++;
      end else begin
        e = r_frame(sb ? 64'h0 : r_scramble(h, 64'h0), 1, rb);
        if (sb) h = '0;
        chk(words.size() == 0 || done_at[0] >= cyc - 88 - 2, "idle only when no word was ready");
        n_idle++;
      end
      chk(f == e, "frame content");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run_phase(0, 0, 2, 60);    // feeder faster than the line: back-pressure
    run_phase(0, 0, 30, 40);   // feeder slower: idles in between
    run_phase(1, 0, 3, 15);    // scrambler bypassed
    run_phase(0, 1, 3, 15);    // RS bypassed
    run_phase(1, 1, 20, 15);
    chk(n_data > 80 && n_idle > 10, "data and idle frames both seen");
    chk(n_stall > 0, "back-pressure seen");
    // with a slow feeder (no word queued behind another), last byte accepted
    // -> last line bit is at most one frame of waiting for the boundary plus
    // the one frame the encoding and sending take
    chk(max_lat <= 2 * 88 + 2, "encoding latency");
    $display("data %0d idle %0d stall %0d max latency %0d", n_data, n_idle, n_stall, max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
