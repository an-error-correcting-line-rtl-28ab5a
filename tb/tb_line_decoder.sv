// tb_line_decoder: builds a serial stream with the reference encoder (serial
// scrambler from a random state, searched RS parity, interleaving, headers),
// starting at a random bit offset, and checks the decoder's output bytes
// against the user words. Line errors are injected: single bit flips, two
// adjacent flipped bits anywhere in the RS field (one upset spanning two bit
// periods), two flipped header bits, double symbol errors in one RS block
// that the code flags as uncorrectable, and runs of invalid headers that
// must drop the lock. Checks: the bytes, the corrected / uncorrectable /
// header-error pulses, lock and relock, the two-frame decoding time, and the
// two bypass modes.
module tb_line_decoder;
  import tb_ref_pkg::*;

  typedef enum int {E_NONE, E_BIT, E_BURST, E_HDR, E_DOUBLE, E_BADHDR} err_t;

  typedef struct {
    logic b;
    bit   first;
    int   fid;
    bit   u;      // queued by the test, not filler
  } sbit_t;

  typedef struct {
    logic [63:0] w;
    bit          skip;   // content not checked (corrupted or follows a corrupted frame)
    int          fid;
  } exp_t;

  logic clk = 0, rst_n = 0, rx_bit = 0, scr_bypass = 0, rs_bypass = 0;
  logic [7:0] byte_out;
  logic byte_valid, byte_first, locked, corrected, uncorrectable, hdr_error;
  int checks = 0, failures = 0;
  int n_cor = 0, n_unc = 0, n_hdr = 0, n_words = 0, n_unlock = 0;
  int exp_cor = 0, exp_unc = 0, exp_hdr = 0, max_lat = 0;
  longint cyc = 0;
  longint start_at[int];

  sbit_t q[$];
  exp_t  expq[$];
  logic [62:0] h;
  int fid = 0;
  bit prev_bad = 0;

  line_decoder dut (.clk, .rst_n, .rx_bit, .scr_bypass, .rs_bypass, .byte_out, .byte_valid,
                    .byte_first, .locked, .corrected, .uncorrectable, .hdr_error);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  int  pending_user = 0;
  bit  filling = 0;

  // line driver; when the test has queued nothing, idle frames keep the
  // line going (so the stream never breaks between test steps)
  always @(posedge clk) begin
    sbit_t s;
    if (q.size() == 0) begin
      filling = 1;
      send(1, E_NONE, scr_bypass, rs_bypass, 0);
      filling = 0;
    end
    s = q.pop_front();
    if (s.u) pending_user--;
    rx_bit <= s.b;
    if (s.first) start_at[s.fid] = cyc;
  end

  // output monitor
  logic [63:0] got;
  int nb = 0;
  bit locked_d = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (corrected) n_cor++;
      if (uncorrectable) n_unc++;
      if (hdr_error) n_hdr++;
      if (locked_d && !locked) n_unlock++;
      locked_d <= locked;
      if (byte_valid) begin
        if (byte_first) nb = 0;
        got = {got[55:0], byte_out};
        nb++;
        if (nb == 8) begin
          exp_t e;
          chk(expq.size() > 0, "output word expected");
          if (expq.size() > 0) begin
            e = expq.pop_front();
            if (!e.skip) chk(got == e.w, "decoded word");
            if (cyc - start_at[e.fid] > max_lat) max_lat = int'(cyc - start_at[e.fid]);
          end
          n_words++;
        end
      end
    end
  end

  // symbol j of block A / B as bit offset in the 88-bit frame
  function automatic int sym_off(bit blk_b, int j);
    return 79 - 4 * (2 * (9 - j) + (blk_b ? 1 : 0)) - 3;
  endfunction

  task automatic send(bit idle, err_t err, bit sb, bit rb, bit expect_out);
    logic [63:0] w, s;
    logic [87:0] f;
    w = idle ? 64'h0 : rand64();
    s = sb ? w : r_scramble(h, w);
    if (sb) h = {<<{w[63:1]}};
    f = r_frame(s, idle, rb);
    case (err)
      E_BIT: begin
        f[$urandom_range(0, 79)] ^= 1'b1;
        exp_cor++;
      end
      E_BURST: begin
        int p = $urandom_range(0, 78);
        f[p] ^= 1'b1;
        f[p+1] ^= 1'b1;
        exp_cor++;
      end
      E_HDR: begin
        int p = $urandom_range(80, 86);
        f[p] ^= 1'b1;
        f[p+1] ^= 1'b1;
      end
      E_DOUBLE: begin
        // two symbol errors in block A chosen so that the code detects them
        logic [39:0] cw;
        int p1, p2;
        logic [3:0] v1, v2, s1, s2;
        forever begin
          p1 = $urandom_range(0, 9);
          p2 = (p1 + $urandom_range(1, 9)) % 10;
          v1 = 4'($urandom_range(1, 15));
          v2 = 4'($urandom_range(1, 15));
          cw = {s[63:32], r_parity(s[63:32])} ^ (40'(v1) << 4*p1) ^ (40'(v2) << 4*p2);
          s1 = r_synd(cw, 1);
          s2 = r_synd(cw, 2);
          if (s1 == 0 || s2 == 0 || ((r_log(s2) - r_log(s1) + 15) % 15) >= 10) break;
        end
        f[sym_off(0, p1) +: 4] ^= v1;
        f[sym_off(0, p2) +: 4] ^= v2;
        exp_unc++;
      end
      E_BADHDR: begin
        f[87:80] = $urandom_range(0, 1) ? 8'hFF : 8'h00;
        exp_hdr++;
      end
      default: ;
    endcase
    if (!idle && expect_out && err != E_BADHDR)
      expq.push_back('{w: w, skip: (err == E_DOUBLE) || prev_bad, fid: fid});
    prev_bad = (err == E_DOUBLE);
    for (int i = 87; i >= 0; i--) q.push_back('{b: f[i], first: (i == 87), fid: fid, u: !filling});
    if (!filling) pending_user += 88;
    fid++;
  endtask

  task automatic drain();
    while (pending_user > 0) @(posedge clk);
    repeat (200) @(posedge clk);
  endtask

  task automatic start_phase(bit sb, bit rb);
    rst_n = 0;
    scr_bypass = sb;
    rs_bypass = rb;
    repeat (3) @(posedge clk);
    h = {$urandom(), $urandom()};
    prev_bad = 0;
    rst_n = 1;
    q.delete();
    pending_user = 0;
    repeat ($urandom_range(1, 87)) q.push_back('{b: 1'($urandom()), first: 0, fid: -1, u: 0});
    for (int i = 0; i < 8; i++) send(1, E_NONE, sb, rb, 0);
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    err_t e;
    repeat (2) @(posedge clk);
    // phase 1: normal coding with all error kinds
    start_phase(0, 0);
    for (int i = 0; i < 200; i++) begin
      int r;
      r = $urandom_range(0, 99);
      e = (r < 40) ? E_NONE : (r < 60) ? E_BIT : (r < 80) ? E_BURST : (r < 90) ? E_HDR : E_DOUBLE;
      send($urandom_range(0, 4) == 0, e, 0, 0, 1);
    end
    drain();
    chk(locked, "locked through the error run");
    chk(n_unlock == 0, "no lock loss from single upsets");
    // phase 2: four invalid headers drop lock; idles relock
    for (int i = 0; i < 4; i++) send(0, E_BADHDR, 0, 0, 0);
    drain();
    chk(!locked && n_unlock == 1, "lock lost after invalid headers");
    for (int i = 0; i < 8; i++) send(1, E_NONE, 0, 0, 0);
    for (int i = 0; i < 20; i++) send(0, E_NONE, 0, 0, 1);
    drain();
    chk(locked, "relocked");
    chk(expq.size() == 0, "every data word came out");
    chk(n_cor == exp_cor, "corrected pulses");
    chk(n_unc == exp_unc, "uncorrectable pulses");
    chk(n_hdr >= 3 && n_hdr <= exp_hdr, "header error pulses while locked");
    $display("words %0d corrected %0d/%0d uncorrectable %0d/%0d hdr errors %0d max latency %0d",
             n_words, n_cor, exp_cor, n_unc, exp_unc, n_hdr, max_lat);
    chk(max_lat <= 2 * 88, "decoding within two frame times");
    // phase 3: scrambler bypassed, errors still corrected
    start_phase(1, 0);
    for (int i = 0; i < 30; i++) send(0, (i % 3 == 0) ? E_BIT : E_NONE, 1, 0, 1);
    drain();
    chk(expq.size() == 0, "scrambler bypass words");
    // phase 4: RS bypassed, clean line
    start_phase(0, 1);
    for (int i = 0; i < 30; i++) send(0, E_NONE, 0, 1, 1);
    drain();
    chk(expq.size() == 0, "RS bypass words");
    chk(n_cor == exp_cor, "no correction in RS bypass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
