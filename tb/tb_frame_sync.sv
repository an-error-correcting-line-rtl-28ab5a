// tb_frame_sync: drives a serial stream of 88-bit frames after a random
// number of garbage bits and checks that the synchronizer
//  - hunts (slips) and locks within a few frames,
//  - delivers, while locked, exactly the frames that were sent,
//  - keeps lock and classifies correctly when a header has 2 flipped bits,
//  - keeps lock after 3 invalid headers and drops it after 4,
//  - drops lock after a one-bit slip of the stream, and relocks each time.
module tb_frame_sync;
  import linecode_pkg::*;
  import tb_ref_pkg::*;

  typedef struct {
    logic        b;
    bit          last;
    logic [87:0] f;
    hdr_kind_t   k;
    bit          u;  // queued by the test (not filler)
  } sbit_t;

  logic clk = 0, rst_n = 0, rx_bit = 0;
  logic [87:0] frame;
  logic frame_valid, locked, slip;
  hdr_kind_t kind;
  int checks = 0, failures = 0;
  int n_frames_ok = 0, n_slips = 0, n_unlock = 0;

  sbit_t q[$];
  logic [87:0] done_frame = '0, prev_f = '0;
  hdr_kind_t done_kind = HDR_INVALID, prev_k = HDR_INVALID;
  bit prev_last = 0;
  logic locked_d = 0;
  bit misaligned = 0;  // stream slipped on purpose, lock not yet lost

  frame_sync dut (.clk, .rst_n, .rx_bit, .frame, .frame_valid, .kind, .locked, .slip);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  int pending_user = 0;

  // driver: one bit per clock from the queue; when the test has queued
  // nothing, clean data frames keep the stream going
  always @(posedge clk) begin
    if (prev_last) begin
      done_frame <= prev_f;
      done_kind  <= prev_k;
    end
    if (rst_n) begin
      sbit_t s;
      if (q.size() == 0) begin
        logic [87:0] f;
        f = {R_HDR_DATA, rand64(), 16'($urandom())};
        for (int i = 87; i >= 0; i--) q.push_back('{b: f[i], last: (i == 0), f: f, k: HDR_DATA, u: 0});
      end
      s = q.pop_front();
      if (s.u) pending_user--;
      rx_bit    <= s.b;
      prev_last <= s.last;
      prev_f    <= s.f;
      prev_k    <= s.k;
    end
  end

  // monitor
  always @(negedge clk) begin
    if (rst_n) begin
      if (slip) n_slips++;
      if (locked_d && !locked) n_unlock++;
      locked_d <= locked;
      if (frame_valid && locked && !misaligned) begin
        chk(frame == done_frame, "delivered frame equals sent frame");
        if (done_kind != HDR_INVALID) chk(kind == done_kind, "header kind");
        else                          chk(kind == HDR_INVALID, "invalid header seen");
        n_frames_ok++;
      end
    end
  end

  task automatic push_frame(logic [87:0] f, hdr_kind_t k);
    for (int i = 87; i >= 0; i--) q.push_back('{b: f[i], last: (i == 0), f: f, k: k, u: 1});
    pending_user += 88;
  endtask

  function automatic logic [87:0] mk(bit idle);
    return {idle ? R_HDR_IDLE : R_HDR_DATA, rand64(), 16'($urandom())};
  endfunction

  task automatic push_frames(int n);
    for (int i = 0; i < n; i++) begin
      bit idle = ($urandom_range(0, 2) == 0);
      push_frame(mk(idle), idle ? HDR_IDLE : HDR_DATA);
    end
  endtask

  task automatic drain();
    while (pending_user > 0) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int garbage;
    int frames_before;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: random offset, then frames
    garbage = $urandom_range(1, 87);
    for (int i = 0; i < garbage; i++) q.push_back('{b: 1'($urandom()), last: 0, f: '0, k: HDR_INVALID, u: 1});
    pending_user += garbage;
    push_frames(8);
    drain();
    chk(locked, "locked after 8 frames");
    chk(n_slips > 0, "hunting slipped");
    push_frames(20);
    drain();
    chk(locked && n_frames_ok >= 20, "stays locked on clean frames");
    // phase 2: headers with two adjacent flipped bits
    for (int i = 0; i < 10; i++) begin
      logic [87:0] f;
      bit idle = i[0];
      int p = $urandom_range(80, 86);
      f = mk(idle);
      f[p] = ~f[p];
      f[p+1] = ~f[p+1];
      push_frame(f, idle ? HDR_IDLE : HDR_DATA);
    end
    push_frames(2);
    drain();
    chk(locked && n_unlock == 0, "2-bit header upsets tolerated");
    // phase 3: three invalid headers keep lock, four lose it
    for (int i = 0; i < 3; i++) push_frame({8'hFF, rand64(), 16'h0}, HDR_INVALID);
    push_frames(2);
    drain();
    chk(locked && n_unlock == 0, "3 invalid headers keep lock");
    for (int i = 0; i < 4; i++) push_frame({8'h00, rand64(), 16'h0}, HDR_INVALID);
    drain();
    chk(!locked && n_unlock == 1, "4 invalid headers drop lock");
    push_frames(8);
    drain();
    chk(locked, "relocked");
    // phase 4: the stream slips by one bit
    q.push_back('{b: 1'b0, last: 0, f: '0, k: HDR_INVALID, u: 1});
    pending_user++;
    misaligned = 1;
    for (int c = 0; c < 88 * 8 && n_unlock < 2; c++) @(posedge clk);
    misaligned = 0;
    push_frames(14);
    drain();
    chk(n_unlock == 2, "bit slip of the stream drops lock");
    chk(locked, "relocked after slip");
    frames_before = n_frames_ok;
    push_frames(5);
    drain();
    chk(n_frames_ok >= frames_before + 5, "frames delivered while locked");
    $display("frames checked %0d, slips %0d, unlocks %0d", n_frames_ok, n_slips, n_unlock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
