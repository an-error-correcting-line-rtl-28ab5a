// tb_wl_double_errors: correction rate for two independent bit errors in one
// frame, end to end through the demonstrator with the encoder looped back to
// the decoder.
//
// Every third frame gets two bit flips at distinct random positions of its
// 88 bits; the two frames after it are clean so the descrambler recovers.
// A hit frame counts as corrected when its user word comes out unchanged.
// For this frame layout the expected fraction follows from counting: a pair
// fails only when both bits fall in the RS field (80*79 of 88*87 ordered
// pairs), in the same codeword but not in the same symbol (1440 of 3160 pairs
// in the field), so 1 - 0.8255 * 0.4557 = 62.4 % are corrected. The test
// requires the measured fraction within 5 points of that, and every frame
// two after a hit to be correct again. Lock must never be lost.
module tb_wl_double_errors;
  import tb_ref_pkg::*;

  localparam int N_HITS = 700;

  logic clk = 0, rst_n = 0;
  logic [7:0] enc_byte_in = '0;
  logic enc_byte_valid = 0, enc_byte_ready, enc_scr_bypass = 0, enc_rs_bypass = 0;
  logic enc_tx_bit, enc_tx_sof, enc_tx_idle;
  logic dec_rx_bit = 0, dec_scr_bypass = 0, dec_rs_bypass = 0;
  logic [7:0] dec_byte_out;
  logic dec_byte_valid, dec_byte_first, dec_locked, dec_corrected, dec_uncorrectable, dec_hdr_error;

  gbt_linecode_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  int n_hits = 0, n_hit_ok = 0, n_recover = 0, n_unlock = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // feeder: always a word ready, so every frame carries data
  bit feed_on = 0;
  logic [63:0] words_in[$];
  initial begin
    logic [63:0] w;
    int b;
    b = 0;
    forever begin
      @(negedge clk);
      if (!feed_on && b == 0) begin
        enc_byte_valid = 0;
        continue;
      end
      if (b == 0) w = rand64();
      enc_byte_valid = 1;
      enc_byte_in = w[63 - 8*b -: 8];
      @(posedge clk);
      if (enc_byte_ready) begin
        b++;
        if (b == 8) begin
          words_in.push_back(w);
          b = 0;
        end
      end
    end
  end

  // channel: one frame of delay, two random flips on every third data frame
  bit inject_on = 0;
  logic [87:0] cap;
  int cap_n = -1, data_cnt = 0;
  logic outq[$];
  int role_q[$];   // per data frame: 0 plain, 1 hit, 2 just after a hit, 3 recovered
  always @(posedge clk) begin
    if (rst_n) begin
      logic [87:0] c;
      int n;
      c = cap;
      n = cap_n;
      if (enc_tx_sof) n = 0;
      if (n >= 0) begin
        c[87 - n] = enc_tx_bit;
        n++;
        if (n == 88) begin
          int role;
          role = 0;
          if (c[87:80] == R_HDR_DATA) begin
            if (inject_on) begin
              role = (data_cnt % 3 == 0) ? 1 : (data_cnt % 3 == 1) ? 2 : 3;
              if (role == 1) begin
                int p1, p2;
                p1 = $urandom_range(0, 87);
                p2 = (p1 + $urandom_range(1, 87)) % 88;
                c[p1] ^= 1'b1;
                c[p2] ^= 1'b1;
              end
              data_cnt++;
            end
            role_q.push_back(role);
          end
          for (int i = 87; i >= 0; i--) outq.push_back(c[i]);
          n = -1;
        end
      end
      cap <= c;
      cap_n <= n;
      dec_rx_bit <= (outq.size() > 0) ? outq.pop_front() : 1'b0;
    end
  end

  // decoder output
  logic [63:0] got;
  int nb = 0;
  bit locked_d = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (locked_d && !dec_locked) n_unlock++;
      locked_d <= dec_locked;
      if (dec_byte_valid) begin
        if (dec_byte_first) nb = 0;
        got = {got[55:0], dec_byte_out};
        nb++;
        if (nb == 8) begin
          logic [63:0] w;
          int role;
          w = words_in.pop_front();
          role = role_q.pop_front();
          case (role)
            0: chk(got == w, "clean word");
            1: begin
              n_hits++;
              if (got == w) n_hit_ok++;
            end
            3: begin
              chk(got == w, "recovered two frames after a hit");
              n_recover++;
            end
            default: ;
          endcase
        end
      end
    end
  end

  initial begin
    real frac;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 88 * 20 && !dec_locked; c++) @(posedge clk);
    chk(dec_locked, "locked");
    feed_on = 1;
    repeat (88 * 6) @(posedge clk);
    inject_on = 1;
    while (n_hits < N_HITS) @(posedge clk);
    inject_on = 0;
    frac = real'(n_hit_ok) / real'(n_hits);
    $display("double errors: %0d frames hit, %0d corrected (%.1f %%, expected 62.4 %%)",
             n_hits, n_hit_ok, 100.0 * frac);
    chk(frac > 0.574 && frac < 0.674, "correction fraction near 62.4 %");
    chk(n_recover > N_HITS - 5, "recovery frames checked");
    chk(n_unlock == 0, "lock kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
