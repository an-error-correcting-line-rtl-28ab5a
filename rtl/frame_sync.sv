// frame_sync: serial-to-parallel conversion and frame synchronization.
//
// Received bits shift into a FRAME_BITS-wide window, newest bit at bit 0, so
// when the window holds a whole frame its header is at the top. Three states:
//   HUNT   - the header field of the window is tested on every clock, which
//            slides the frame boundary one bit per clock, until it holds a
//            header pattern exactly;
//   VERIFY - the boundary is kept and the header is tested once per frame;
//            LOCK_N exact headers in a row (counting the one found while
//            hunting) give lock, any other header returns to HUNT;
//   LOCKED - headers are tested with the upset-tolerant match; UNLOCK_N
//            invalid headers in a row drop lock and return to HUNT.
// Locking on repeated valid headers at a fixed place and unlocking on
// repeated invalid ones follows the design; the counts, the exact match while
// hunting and the sliding search are this implementation's choices.
//
// Interface: frame, kind and frame_valid are combinational from the window.
// frame_valid pulses for one clock at each frame boundary in VERIFY (exact
// headers only) and in LOCKED (every frame); frame[FRAME_BITS-1 -: 8] is the
// header. The boundary test happens on the clock after the last bit of the
// frame has been shifted in. slip pulses on each clock the search moves on.
module frame_sync #(
  parameter int unsigned FRAME_BITS = linecode_pkg::FRAME_BITS,
  parameter int unsigned LOCK_N     = 4,
  parameter int unsigned UNLOCK_N   = 4,
  parameter int unsigned HDR_TOL    = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rx_bit,
  output logic [FRAME_BITS-1:0] frame,
  output logic                  frame_valid,
  output linecode_pkg::hdr_kind_t kind,
  output logic                  locked,
  output logic                  slip
);

  typedef enum logic [1:0] {S_HUNT, S_VERIFY, S_LOCKED} sync_state_t;

  sync_state_t           state;
  logic [FRAME_BITS-1:0] win;
  logic [7:0]            bitcnt;
  logic [3:0]            good_cnt, bad_cnt;
  logic                  exact;
  logic                  boundary;

  header_detect #(.HDR_TOL(HDR_TOL)) u_hdr (
    .hdr  (win[FRAME_BITS-1 -: linecode_pkg::HDR_BITS]),
    .kind (kind),
    .exact(exact)
  );

  assign frame    = win;
  assign locked   = (state == S_LOCKED);
  assign boundary = (state != S_HUNT) && (32'(bitcnt) == FRAME_BITS - 1);
  assign slip     = (state == S_HUNT) && !exact;

  always_comb begin
    frame_valid = 1'b0;
    if (boundary) begin
      if (state == S_LOCKED)     frame_valid = 1'b1;
      else if (exact)            frame_valid = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win      <= '0;
      state    <= S_HUNT;
      bitcnt   <= '0;
      good_cnt <= '0;
      bad_cnt  <= '0;
    end else begin
      win <= {win[FRAME_BITS-2:0], rx_bit};
      if (state == S_HUNT || boundary) bitcnt <= '0;
      else                             bitcnt <= bitcnt + 8'd1;
      unique case (state)
        S_HUNT: begin
          if (exact) begin
            good_cnt <= 4'd1;
            state    <= (LOCK_N <= 1) ? S_LOCKED : S_VERIFY;
            bad_cnt  <= '0;
          end
        end
        S_VERIFY: begin
          if (boundary) begin
            if (exact) begin
              good_cnt <= good_cnt + 4'd1;
              if (32'(good_cnt) + 1 >= LOCK_N) begin
                state   <= S_LOCKED;
                bad_cnt <= '0;
              end
            end else begin
              state <= S_HUNT;
            end
          end
        end
        S_LOCKED: begin
          if (boundary) begin
            if (kind == linecode_pkg::HDR_INVALID) begin
              bad_cnt <= bad_cnt + 4'd1;
              if (32'(bad_cnt) + 1 >= UNLOCK_N) state <= S_HUNT;
            end else begin
              bad_cnt <= '0;
            end
          end
        end
        default: state <= S_HUNT;
      endcase
    end
  end

  initial begin
    assert (LOCK_N >= 1 && LOCK_N < 16 && UNLOCK_N >= 1 && UNLOCK_N < 16)
      else $error("frame_sync: lock counts out of range");
    assert (FRAME_BITS < 256) else $error("frame_sync: FRAME_BITS too large for the bit counter");
  end

endmodule
