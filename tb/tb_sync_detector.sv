// tb_sync_detector: checks sync hunting, ID comparison, offset correction and lock confirmation.
// A header channel bit stream (one bit every 4 cycles) is built from the sync pattern, channel
// IDs and random reserved/BW bits, with zero filler between frames:
//   1. sync + foreign ID          -> one correct pulse with delta = ONU ID - ID, no lock
//   2. sync + ONU ID + 24 bits    -> align with the position of the last ID bit, lock, the 24
//                                    bits forwarded with word indices 24..47
//   3. sync + ID before end of frame -> ignored (waiting for the payload parser)
//   4. frame_done, sync + ONU ID  -> lock confirmed again (sync found while locked)
//   5. sync + foreign ID          -> correct pulse, lock dropped
// Every output pulse is compared with what the testbench expects at that point.
module tb_sync_detector;
  import bipon_pkg::*;
  localparam int unsigned PW = 12;
  localparam logic [7:0] ONU = 8'hA7;
  logic clk = 0, rst_n = 0;
  logic h_bit = 0, h_valid = 0, frame_done = 0;
  logic [PW-1:0] h_pos = 0;
  logic correct, locked, align, sync_found, f_bit, f_valid;
  logic [7:0] delta;
  logic [PW-1:0] align_pos;
  logic [5:0] f_word;
  sync_state_e state;
  int unsigned checks = 0, failures = 0;
  int unsigned n_corr = 0, n_align = 0, n_sync = 0, n_f = 0;
  logic [7:0] exp_delta;
  logic [PW-1:0] exp_align_pos;
  bit fq [$];

  sync_detector #(.PW(PW)) dut (.clk, .rst_n, .onu_id(ONU), .h_bit, .h_valid, .h_pos, .frame_done,
    .correct, .delta, .locked, .align, .align_pos, .sync_found, .f_bit, .f_valid, .f_word, .state);

  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", m, $time); end
  endtask

  task automatic send(input bit b);
    @(negedge clk);
    h_bit = b; h_valid = 1; h_pos = h_pos + 1'b1;
    @(negedge clk);
    h_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic send_sync_id(input logic [7:0] id);
    for (int i = SYNC_BITS - 1; i >= 0; i--) send(SYNC_PATTERN[i]);
    for (int i = 7; i >= 0; i--) begin
      if (i == 0) exp_align_pos = h_pos + 1'b1;
      send(id[i]);
    end
  endtask

  task automatic send_fields();
    for (int i = 0; i < HDR_WORDS - RES_WORD; i++) begin
      bit b;
      b = 1'($urandom);
      fq.push_back(b);
      send(b);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (correct)    begin n_corr++;  chk(delta == exp_delta, "delta"); end
    if (align)      begin n_align++; chk(align_pos == exp_align_pos, "align position"); end
    if (sync_found) n_sync++;
    if (f_valid) begin
      chk(fq.size() > 0, "unexpected header bit");
      if (fq.size() > 0) chk(f_bit == fq.pop_front(), "header bit");
      chk(f_word == 6'(RES_WORD + n_f % (HDR_WORDS - RES_WORD)), "word index");
      n_f++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (40) send(0);
    // 1. foreign channel
    exp_delta = ONU - 8'h12;
    send_sync_id(8'h12);
    repeat (3) @(negedge clk);
    chk(n_corr == 1 && n_align == 0 && !locked && n_sync == 1, "step 1");
    repeat (30) send(0);
    // 2. own channel
    send_sync_id(ONU);
    repeat (3) @(negedge clk);
    chk(n_corr == 1 && n_align == 1 && locked && state == SD_HEADER, "step 2 lock");
    send_fields();
    repeat (3) @(negedge clk);
    chk(n_f == 24 && fq.size() == 0 && state == SD_WAIT, "step 2 fields");
    // 3. sync while waiting for the end of frame
    send_sync_id(ONU);
    repeat (3) @(negedge clk);
    chk(n_sync == 2 && n_align == 1 && state == SD_WAIT, "step 3 ignored");
    // 4. end of frame, next frame
    @(negedge clk) frame_done = 1;
    @(negedge clk) frame_done = 0;
    repeat (10) send(0);
    send_sync_id(ONU);
    repeat (3) @(negedge clk);
    chk(n_sync == 3 && n_align == 2 && locked, "step 4 relock");
    send_fields();
    @(negedge clk) frame_done = 1;
    @(negedge clk) frame_done = 0;
    // 5. wrong channel while locked
    repeat (10) send(0);
    exp_delta = ONU - 8'h03;
    send_sync_id(8'h03);
    repeat (3) @(negedge clk);
    chk(n_corr == 2 && !locked && state == SD_HUNT, "step 5 lock lost");
    chk(n_f == 48, "all header bits forwarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
