// tb_payload_parser: checks frame alignment, payload configuration and the frame length monitor.
// For each decimation rate an align pulse (random sampling position of the last ID bit, random
// ONU ID) and a configuration (random offset) are given. The payload start phase and octet must
// equal (align_pos - ID_END_POS - onu_id + PAYLOAD_START + PL_DELAY + offset) mod FRAME_BITS,
// split into octet and phase. Then descrambled bits are fed: exactly PAYLOAD_BITS / D of them
// must reach the user output, ddr_clk must toggle with each, frame_done must pulse once after
// the last, and further bits must be blocked.
module tb_payload_parser;
  import bipon_pkg::*;
  localparam int unsigned PL_DELAY = 16;
  logic clk = 0, rst_n = 0;
  logic [7:0] onu_id = 0;
  logic align = 0, cfg_valid = 0, d_bit = 0, d_valid = 0;
  logic [POS_W-1:0] align_pos = 0;
  logic [3:0] rate_log2 = 3;
  logic [9:0] offset = 0;
  logic start, desc_init, enable, frame_done, user_data, user_valid, ddr_clk;
  logic [2:0] start_phase;
  logic [OCT_W-1:0] start_oct;
  logic [POS_W-1:0] frame_base;
  logic [20:0] bits_left;
  int unsigned checks = 0, failures = 0;

  payload_parser #(.PL_DELAY(PL_DELAY)) dut (.clk, .rst_n, .onu_id, .align, .align_pos, .cfg_valid,
    .rate_log2, .offset, .d_bit, .d_valid, .start, .start_phase, .start_oct, .desc_init, .enable,
    .frame_done, .user_data, .user_valid, .ddr_clk, .frame_base, .bits_left);
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", m, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int lg = 10; lg >= 3; lg--) begin
      longint unsigned exp_start;
      int unsigned nbits, nout, ndone;
      logic ddr_prev;
      onu_id = 8'($urandom);
      align_pos = POS_W'($urandom % FRAME_BITS);
      align = 1;
      @(negedge clk) align = 0;
      offset = 10'($urandom % (1 << lg));
      rate_log2 = 4'(lg);
      cfg_valid = 1;
      @(negedge clk) cfg_valid = 0;
      exp_start = (longint'(align_pos) + 2 * FRAME_BITS - ID_END_POS - onu_id + PAYLOAD_START
                   + PL_DELAY + offset) % FRAME_BITS;
      chk(start && desc_init && enable, "start pulses");
      chk(start_phase == 3'(exp_start % 8) && start_oct == OCT_W'(exp_start / 8), "start position");
      nbits = PAYLOAD_BITS >> lg;
      nout = 0; ndone = 0;
      ddr_prev = ddr_clk;
      for (int m = 0; m < nbits + 5; m++) begin
        bit b;
        b = 1'($urandom);
        d_bit = b; d_valid = 1;
        @(negedge clk);
        d_valid = 0;
        if (user_valid) begin
          nout++;
          chk(user_data == b, "user data");
          chk(ddr_clk != ddr_prev, "ddr clock toggle");
        end
        ddr_prev = ddr_clk;
        if (frame_done) begin
          ndone++;
          chk(m == nbits - 1, "frame_done position");
        end
        @(negedge clk);
      end
      chk(nout == nbits && ndone == 1 && !enable, "frame length");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
