// tb_gbt_linecode_top: end-to-end test of the demonstrator, encoder looped
// back to decoder through a channel that delays the line by one frame and
// can corrupt it. User words go in as bytes and must come out of the decoder
// unchanged and in order. Every mechanism is made to happen and counted:
// frame lock, idle frames, input back-pressure, single-bit and two-bit
// (burst) upsets corrected, double symbol errors in one RS block flagged
// uncorrectable (that frame and the next are then not compared, since the
// descrambler spreads the damage), header upsets tolerated, lock loss after
// invalid headers and relock, and the scrambler and RS bypass modes.
// The top has no parameters: this runs the design at its full size.
module tb_gbt_linecode_top;
  import tb_ref_pkg::*;

  typedef enum int {E_NONE, E_BIT, E_BURST, E_HDR, E_DOUBLE, E_BADHDR} err_t;

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

  // mechanism counters
  int n_lock = 0, n_unlock = 0, n_idle = 0, n_stall = 0, n_cor = 0, n_unc = 0;
  int n_hdr_err = 0, inj_bit = 0, inj_burst = 0, inj_hdr = 0, inj_double = 0, inj_bad = 0;
  int n_words_out = 0, n_words_cmp = 0, n_scr_byp = 0, n_rs_byp = 0;

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- byte feeder ----------------
  bit feed_on = 0;
  int gap_max = 2;
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
      enc_byte_valid = ($urandom_range(0, gap_max) == 0);
      enc_byte_in = w[63 - 8*b -: 8];
      if (enc_byte_valid && !enc_byte_ready) n_stall++;
      @(posedge clk);
      if (enc_byte_valid && enc_byte_ready) begin
        b++;
        if (b == 8) begin
          words_in.push_back(w);
          b = 0;
        end
      end
    end
  end

  // ---------------- channel ----------------
  err_t next_err = E_NONE;     // error to put on the next frame
  int   burst_left = 0;        // frames still to receive next_err
  logic [87:0] cap;
  int   cap_n = -1;
  logic outq[$];
  bit   skip_q[$];             // per data frame sent: do not compare
  bit   prev_double = 0;

  function automatic int sym_off(int j);   // block A symbol j
    return 79 - 4 * (2 * (9 - j)) - 3;
  endfunction

  function automatic logic [87:0] corrupt(logic [87:0] f, err_t e);
    case (e)
      E_BIT: f[$urandom_range(0, 79)] ^= 1'b1;
      E_BURST: begin
        int p = $urandom_range(0, 78);
        f[p] ^= 1'b1;
        f[p+1] ^= 1'b1;
      end
      E_HDR: begin
        int p = $urandom_range(80, 86);
        f[p] ^= 1'b1;
        f[p+1] ^= 1'b1;
      end
      E_DOUBLE: begin
        logic [39:0] cw, c2;
        int p1, p2;
        logic [3:0] v1, v2, s1, s2;
        for (int j = 0; j < 10; j++) cw[4*j +: 4] = f[sym_off(j) +: 4];
        forever begin
          p1 = $urandom_range(0, 9);
          p2 = (p1 + $urandom_range(1, 9)) % 10;
          v1 = 4'($urandom_range(1, 15));
          v2 = 4'($urandom_range(1, 15));
          c2 = cw ^ (40'(v1) << 4*p1) ^ (40'(v2) << 4*p2);
          s1 = r_synd(c2, 1);
          s2 = r_synd(c2, 2);
          if (s1 == 0 || s2 == 0 || ((r_log(s2) - r_log(s1) + 15) % 15) >= 10) break;
        end
        f[sym_off(p1) +: 4] ^= v1;
        f[sym_off(p2) +: 4] ^= v2;
      end
      E_BADHDR: f[87:80] = 8'hFF;
      default: ;
    endcase
    return f;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      cap_n <= -1;
      outq.delete();
      dec_rx_bit <= 0;
    end else begin
      // capture a whole frame from the encoder, then queue it (corrupted)
      logic [87:0] c;
      int n;
      c = cap;
      n = cap_n;
      if (enc_tx_sof) n = 0;
      if (n >= 0) begin
        c[87 - n] = enc_tx_bit;
        n++;
        if (n == 88) begin
          err_t e;
          bit is_data;
          is_data = (c[87:80] == R_HDR_DATA);
          e = (burst_left > 0) ? next_err : E_NONE;
          if (burst_left > 0) burst_left--;
          case (e)
            E_BIT: inj_bit++;
            E_BURST: inj_burst++;
            E_HDR: inj_hdr++;
            E_DOUBLE: inj_double++;
            E_BADHDR: inj_bad++;
            default: ;
          endcase
          c = corrupt(c, e);
          for (int i = 87; i >= 0; i--) outq.push_back(c[i]);
          // a double error also spoils the next frame, idle or data,
          // through the descrambler
          if (is_data && e != E_BADHDR) skip_q.push_back((e == E_DOUBLE) || prev_double);
          prev_double = (e == E_DOUBLE);
          n = -1;
        end
      end
      cap <= c;
      cap_n <= n;
      dec_rx_bit <= (outq.size() > 0) ? outq.pop_front() : 1'b0;
    end
  end

  // ---------------- monitors ----------------
  logic [63:0] got;
  int nb = 0;
  bit locked_d = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (enc_tx_sof && enc_tx_idle) n_idle++;
      if (dec_locked && !locked_d) n_lock++;
      if (!dec_locked && locked_d) n_unlock++;
      locked_d <= dec_locked;
      if (dec_corrected) n_cor++;
      if (dec_uncorrectable) n_unc++;
      if (dec_hdr_error) n_hdr_err++;
      if (dec_byte_valid) begin
        if (dec_byte_first) nb = 0;
        got = {got[55:0], dec_byte_out};
        nb++;
        if (nb == 8) begin
          logic [63:0] w;
          bit sk;
          chk(words_in.size() > 0 && skip_q.size() > 0, "a word was sent for each word out");
          w  = words_in.pop_front();
          sk = skip_q.pop_front();
          if (!sk) begin
            chk(got == w, "word out equals word in");
            n_words_cmp++;
          end
          n_words_out++;
        end
      end
    end else begin
      locked_d <= 0;
    end
  end

  task automatic inject(err_t e, int nframes);
    next_err = e;
    burst_left = nframes;
    while (burst_left > 0) @(posedge clk);
  endtask

  task automatic settle();
    // stop input and wait until every word has come out
    feed_on = 0;
    for (int c = 0; c < 88 * 12 && words_in.size() > 0; c++) @(posedge clk);
    repeat (88 * 3) @(posedge clk);
    chk(words_in.size() == 0, "all words delivered");
  endtask

  task automatic restart(bit sb, bit rb);
    feed_on = 0;
    rst_n = 0;
    enc_scr_bypass = sb;
    dec_scr_bypass = sb;
    enc_rs_bypass = rb;
    dec_rs_bypass = rb;
    repeat (3) @(posedge clk);
    words_in.delete();
    skip_q.delete();
    prev_double = 0;
    rst_n = 1;
    for (int c = 0; c < 88 * 20 && !dec_locked; c++) @(posedge clk);
    chk(dec_locked, "decoder locks on idle frames");
    repeat (88 * 2) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    // normal mode, fast input (back-pressure), then error kinds one by one
    restart(0, 0);
    gap_max = 1;
    feed_on = 1;
    repeat (88 * 10) @(posedge clk);
    inject(E_BIT, 15);
    inject(E_BURST, 15);
    inject(E_HDR, 10);
    gap_max = 40;                       // slow input: idles in between
    repeat (88 * 10) @(posedge clk);
    gap_max = 1;
    for (int i = 0; i < 4; i++) begin
      inject(E_DOUBLE, 1);
      repeat (88 * 3) @(posedge clk);
    end
    settle();
    chk(n_unlock == 0, "no lock loss from upsets");
    chk(n_cor >= inj_bit + inj_burst - 2 && n_cor <= inj_bit + inj_burst, "corrections reported");
    chk(n_unc == inj_double, "uncorrectable frames reported");
    chk(n_hdr_err == 0, "header upsets tolerated");
    // four invalid headers: lock lost, then regained on idle frames
    inject(E_BADHDR, 4);
    repeat (88 * 2) @(posedge clk);
    chk(!dec_locked && n_unlock == 1, "lock lost after four invalid headers");
    for (int c = 0; c < 88 * 20 && !dec_locked; c++) @(posedge clk);
    chk(dec_locked && n_lock == 2, "relocked");
    feed_on = 1;
    repeat (88 * 10) @(posedge clk);
    settle();
    // scrambler bypass
    restart(1, 0);
    feed_on = 1;
    inject(E_BIT, 5);
    repeat (88 * 5) @(posedge clk);
    settle();
    n_scr_byp = n_words_cmp;
    // RS bypass (clean line)
    restart(0, 1);
    feed_on = 1;
    repeat (88 * 15) @(posedge clk);
    settle();
    n_rs_byp = n_words_cmp - n_scr_byp;
    chk(n_lock >= 4, "locked in every phase");
    chk(n_idle > 0, "idle frames sent");
    chk(n_stall > 0, "input back-pressure");
    chk(inj_bit > 0 && inj_burst > 0 && inj_hdr > 0 && inj_double > 0 && inj_bad > 0, "all error kinds injected");
    chk(n_cor > 0 && n_unc > 0, "corrections and detections seen");
    chk(n_scr_byp > 0 && n_rs_byp > 0, "bypass modes carried data");
    $display("words out %0d compared %0d | locks %0d unlocks %0d idles %0d stalls %0d",
             n_words_out, n_words_cmp, n_lock, n_unlock, n_idle, n_stall);
    $display("injected bit %0d burst %0d hdr %0d double %0d badhdr %0d | corrected %0d uncorrectable %0d hdr_err %0d",
             inj_bit, inj_burst, inj_hdr, inj_double, inj_bad, n_cor, n_unc, n_hdr_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
