// tb_payload_descrambler: checks the directly computed decimated and offset scrambling sequence.
// The full-frame reference sequence s[n] is computed at line rate in the testbench. For every
// decimation rate 8 .. 1024, with offsets 0, D-1 and random ones, the ONU's payload bits
// n = PAYLOAD_START + off + D*m (m up to 400) are sent scrambled; the block must return the plain
// bits, one cycle after each input.
module tb_payload_descrambler;
  import bipon_pkg::*;
  logic clk = 0, rst_n = 0;
  logic init = 0, i_bit = 0, i_valid = 0;
  logic [9:0] offset = 0;
  logic [3:0] rate_log2 = 3;
  logic o_bit, o_valid;
  int unsigned checks = 0, failures = 0;
  bit s [FRAME_BITS];
  bit plain;

  payload_descrambler dut (.clk, .rst_n, .init, .offset, .rate_log2, .i_bit, .i_valid, .o_bit,
                           .o_valid);
  always #1 clk = ~clk;

  initial begin
    for (int n = 0; n < FRAME_BITS; n++) s[n] = (n < LFSR_LEN) ? 1'b1 : s[n-18] ^ s[n-23];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int lg = 3; lg <= 10; lg++) begin
      for (int r = 0; r < 4; r++) begin
        int unsigned d;
        d = 1 << lg;
        @(negedge clk);
        rate_log2 = 4'(lg);
        offset = (r == 0) ? 10'd0 : (r == 1) ? 10'(d - 1) : 10'($urandom % d);
        init = 1;
        @(negedge clk);
        init = 0;
        for (int m = 0; m < 400; m++) begin
          plain = 1'($urandom);
          i_bit = plain ^ s[PAYLOAD_START + offset + d * m];
          i_valid = 1;
          @(negedge clk);
          i_valid = 0;
          checks++;
          if (!(o_valid && o_bit == plain)) begin
            failures++;
            if (failures < 10) $display("FAIL D=%0d off=%0d m=%0d", d, offset, m);
          end
          if (m % 3 == 0) @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
