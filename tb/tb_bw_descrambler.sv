// tb_bw_descrambler: checks descrambling of the BW map of one header channel.
// The reference scrambling sequence s[n] = s[n-18] ^ s[n-23] (s[0..22] = 1) is computed at full
// line rate in the testbench. For several ONU IDs the header words 24..47 of channel onu_id are
// sent, the BW map words (32..47) scrambled with s[256*word + onu_id]; the block must return the
// plain bits, leave the reserved words untouched and keep the word indices.
module tb_bw_descrambler;
  import bipon_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] onu_id = 0;
  logic init = 0, i_bit = 0, i_valid = 0;
  logic [5:0] i_word = 0;
  logic o_bit, o_valid;
  logic [5:0] o_word;
  int unsigned checks = 0, failures = 0;
  bit s [PAYLOAD_START];
  bit plain;

  bw_descrambler dut (.clk, .rst_n, .onu_id, .init, .i_bit, .i_valid, .i_word, .o_bit, .o_valid,
                      .o_word);
  always #1 clk = ~clk;

  initial begin
    for (int n = 0; n < PAYLOAD_START; n++) s[n] = (n < LFSR_LEN) ? 1'b1 : s[n-18] ^ s[n-23];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 12; r++) begin
      @(negedge clk);
      onu_id = (r == 0) ? 8'd0 : (r == 1) ? 8'd255 : 8'($urandom);
      init = 1;
      @(negedge clk);
      init = 0;
      for (int w = RES_WORD; w < HDR_WORDS; w++) begin
        plain = 1'($urandom);
        i_bit = (w >= BW_WORD) ? plain ^ s[w * N_CHANNELS + onu_id] : plain;
        i_word = 6'(w);
        i_valid = 1;
        @(negedge clk);
        i_valid = 0;
        checks++;
        if (!(o_valid && o_bit == plain && o_word == 6'(w))) begin
          failures++;
          if (failures < 10) $display("FAIL id=%0d word=%0d", onu_id, w);
        end
        repeat (3) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
