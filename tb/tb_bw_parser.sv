// tb_bw_parser: checks extraction of the reserved field, decimation rate and payload offset.
// Random reserved fields and BW maps (every rate code) are sent MSB first as header words 24..47;
// after the last word the block must pulse cfg_valid once with reserved, 3 + rate code and the
// offset reduced modulo the decimation rate. Bits with other word indices must be ignored.
module tb_bw_parser;
  import bipon_pkg::*;
  logic clk = 0, rst_n = 0;
  logic i_bit = 0, i_valid = 0;
  logic [5:0] i_word = 0;
  logic [7:0] reserved;
  logic [3:0] rate_log2;
  logic [9:0] offset;
  logic cfg_valid;
  int unsigned checks = 0, failures = 0, ncfg = 0;
  logic [7:0] res;
  logic [15:0] bw;

  bw_parser dut (.clk, .rst_n, .i_bit, .i_valid, .i_word, .reserved, .rate_log2, .offset,
                 .cfg_valid);
  always #1 clk = ~clk;
  always @(posedge clk) if (cfg_valid) ncfg++;

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  task automatic send(input bit b, input int w);
    @(negedge clk);
    i_bit = b; i_word = 6'(w); i_valid = 1;
    @(negedge clk);
    i_valid = 0;
    chk(cfg_valid == (w == HDR_WORDS - 1), "cfg_valid timing");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 64; r++) begin
      res = 8'($urandom);
      bw  = 16'($urandom);
      bw[15:13] = 3'(r % 8);
      send(1'($urandom), 20);           // ID bit: not part of the fields
      for (int i = 7; i >= 0; i--)  send(res[i], RES_WORD + 7 - i);
      for (int i = 15; i >= 0; i--) send(bw[i], BW_WORD + 15 - i);
      chk(reserved == res, "reserved");
      chk(rate_log2 == 4'(3 + r % 8), "rate");
      chk(offset == (bw[9:0] & 10'((1 << (3 + r % 8)) - 1)), "offset");
    end
    @(negedge clk);
    chk(ncfg == 64, "configuration count");
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
