// tb_bi_cdr: end-to-end test of the Bi-CDR at full frame size (1,244,160 line bits per frame).
//
// The testbench builds Bi-PON frames bit by bit: for every one of the 256 channels a header
// (sync pattern, channel ID, random reserved field, BW map) followed by a bit-interleaved payload.
// The ONU's own channel carries a BW map whose rate code walks through all eight decimation
// rates, with offsets 0, D-1 or random; the ONU sits on channel 255, whose BW map ends closest to
// the payload. Every other channel gets a random BW map and all other payload bits are random.
// BW map and payload bits are scrambled with a line-rate reference scrambler written here
// independently of the design (s[n] = s[n-18] ^ s[n-23], restarted with ones each frame).
// The stream starts in the middle of a frame, so the design must hunt, correct its channel and
// confirm lock. From the first configured frame on, every user bit is compared with the plain
// payload bit the ONU was sent, the user bits of a frame are counted (PAYLOAD_BITS / D), the
// spacing of consecutive user bits is checked against D line cycles, and the reserved field,
// rate and offset are checked. Mechanisms counted: channel correction, lock, sync found again
// while locked, end of frame, and each of the eight decimation rates.
module tb_bi_cdr;
  import bipon_pkg::*;

  localparam int unsigned N_FRAMES = 11;
  localparam logic [7:0]  ONU      = 8'd255;   // last channel: least time between BW map and payload
  localparam int unsigned MAXN     = PAYLOAD_BITS / 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic data_in = 1'b0;
  logic user_data, user_valid, ddr_clk, locked, cfg_valid, frame_done, sync_found, correct;
  logic [RES_BITS-1:0] reserved;
  logic [3:0] rate_log2;
  logic [9:0] offset;
  logic [7:0] chan_sel;
  sync_state_e sync_state;

  bi_cdr dut (.clk, .rst_n, .data_in, .onu_id(ONU), .user_data, .user_valid, .ddr_clk, .locked,
              .reserved, .rate_log2, .offset, .cfg_valid, .frame_done, .sync_found, .correct,
              .chan_sel, .sync_state);

  always #1 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  // expected payload of the last two frames
  bit          exp_bits [2][MAXN];
  int unsigned exp_k    [2];
  int unsigned exp_off  [2];
  logic [7:0]  exp_res  [2];

  // per-frame header contents of all channels
  logic [7:0]  res_ch [N_CHANNELS];
  logic [15:0] bw_ch  [N_CHANNELS];

  int unsigned n;          // line bit index within the frame
  int          frame;      // frame number, -1 for the partial first frame
  logic [22:0] sh;         // reference scrambler history, sh[i] = s[n-1-i]

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  task automatic new_frame(input int f);
    int unsigned p;
    p = (f < 0) ? 0 : f & 1;
    exp_k[p]   = (f < 0) ? 0 : f % 8;
    // offsets 0 and D-1 are the edge cases; the rest random
    exp_off[p] = (f % 3 == 0) ? 0 : (f % 3 == 1) ? (1 << (exp_k[p] + 3)) - 1
                                                 : $urandom % (1 << (exp_k[p] + 3));
    for (int c = 0; c < N_CHANNELS; c++) begin
      res_ch[c] = 8'($urandom);
      bw_ch[c]  = 16'($urandom);
    end
    bw_ch[ONU]  = {3'(exp_k[p]), 3'b000, 10'(exp_off[p])};
    exp_res[p]  = res_ch[ONU];
    for (int m = 0; m < MAXN; m++) exp_bits[p][m] = 1'($urandom);
  endtask

  function automatic bit line_bit(input int unsigned idx, input int f, input bit s);
    int unsigned c, h, d, p;
    c = idx % N_CHANNELS;
    h = idx / N_CHANNELS;
    p = (f < 0) ? 0 : f & 1;
    if (h < ID_WORD)  return SYNC_PATTERN[SYNC_BITS-1-h];
    if (h < RES_WORD) return c[ID_BITS-1-(h-ID_WORD)];
    if (h < BW_WORD)  return res_ch[c][RES_BITS-1-(h-RES_WORD)];
    if (h < HDR_WORDS) return bw_ch[c][BW_BITS-1-(h-BW_WORD)] ^ s;
    d = 1 << (exp_k[p] + 3);
    if ((idx - PAYLOAD_START) % d == exp_off[p] && f >= 0)
      return exp_bits[p][(idx - PAYLOAD_START) / d] ^ s;
    return 1'($urandom) ^ s;
  endfunction

  // stimulus: one line bit per clock
  initial begin
    bit s;
    frame = -1;
    n     = 700001;
    new_frame(-1);
    sh = '1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    forever begin
      if (n == FRAME_BITS) begin
        n = 0;
        frame++;
        new_frame(frame);
        if (frame == N_FRAMES) break;
      end
      s = (n < LFSR_LEN) ? 1'b1 : (sh[17] ^ sh[22]);
      sh = {sh[21:0], s};
      data_in <= line_bit(n, frame, s);
      n++;
      @(posedge clk);
    end
    repeat (100) @(posedge clk);
    // mechanism coverage
    check(n_correct >= 1, "no channel correction happened");
    check(n_lock >= 1, "never locked");
    check(n_resync >= 1, "sync never found again while locked");
    check(n_done >= N_FRAMES - 3, "too few frames completed");
    for (int k = 0; k < 8; k++) check(rate_seen[k] >= 1, $sformatf("rate code %0d never used", k));
    $display("mechanisms: corrections=%0d locks=%0d resyncs=%0d frames_done=%0d",
             n_correct, n_lock, n_resync, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // response checking
  int unsigned n_correct = 0, n_lock = 0, n_resync = 0, n_done = 0;
  int unsigned rate_seen [8];
  int          out_p = -1;
  int unsigned out_idx, out_n, out_d;
  longint      last_valid_t;
  bit          was_locked = 0;

  initial for (int k = 0; k < 8; k++) rate_seen[k] = 0;

  always @(posedge clk) if (rst_n) begin
    if (correct) n_correct++;
    if (sync_found && locked) n_resync++;
    if (locked && !was_locked) n_lock++;
    if (was_locked) check(locked, "lock lost");
    was_locked <= locked;
    if (cfg_valid) begin
      out_p   = frame & 1;
      out_idx = 0;
      out_d   = 1 << (exp_k[out_p] + 3);
      out_n   = PAYLOAD_BITS / out_d;
      rate_seen[exp_k[out_p]]++;
      check(rate_log2 == 4'(exp_k[out_p] + 3), "rate");
      check(offset == 10'(exp_off[out_p]), "offset");
      check(reserved == exp_res[out_p], "reserved field");
    end
    if (user_valid) begin
      if (out_p < 0) check(0, "user bit before configuration");
      else begin
        check(user_data == exp_bits[out_p][out_idx], $sformatf("user bit %0d", out_idx));
        if (out_idx > 0) check(($time - last_valid_t) == 2 * out_d, "user bit spacing");
        last_valid_t = $time;
        out_idx++;
      end
    end
    if (frame_done) begin
      n_done++;
      check(out_idx == out_n, $sformatf("frame length %0d of %0d", out_idx, out_n));
    end
  end

  // watchdog
  initial begin
    repeat ((N_FRAMES + 2) * FRAME_BITS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
