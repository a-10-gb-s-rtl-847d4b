// tb_payload_decimator: checks the /2^(0..7) payload decimation, its start octet and frame wrap.
// A sampled stream (one random bit per 8 cycles, octet count wrapping after FRAME_OCT = 1000
// octets) is driven. For every rate 8 .. 1024 the block is started at a random octet; counting
// octets linearly from the start octet, the testbench expects exactly the bits at multiples of
// D/8 octets, none while enable is low, and the configured phase on phase_sel.
module tb_payload_decimator;
  localparam int unsigned FO = 1000;
  localparam int unsigned OW = 10;
  logic clk = 0, rst_n = 0;
  logic start = 0, enable = 0, s_bit = 0, s_valid = 0;
  logic [2:0] start_phase = 0;
  logic [OW-1:0] start_oct = 0, s_oct = 0;
  logic [3:0] rate_log2 = 3;
  logic [2:0] phase_sel;
  logic p_bit, p_valid;
  int unsigned checks = 0, failures = 0, npick = 0;

  payload_decimator #(.FRAME_OCT(FO), .OW(OW)) dut (.clk, .rst_n, .start, .start_phase, .start_oct,
    .rate_log2, .enable, .s_bit, .s_valid, .s_oct, .phase_sel, .p_bit, .p_valid);
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", m, $time); end
  endtask

  initial begin
    bit exp_v, exp_b;
    int lin;      // octets since the start octet, negative before it
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int lg = 3; lg <= 10; lg++) begin
      int unsigned step;
      step = 1 << (lg - 3);
      @(negedge clk);
      start = 1; enable = 1; rate_log2 = 4'(lg);
      start_phase = 3'($urandom);
      start_oct = OW'((s_oct + 3 + $urandom % 20) % FO);
      lin = -int'((start_oct + FO - s_oct) % FO);
      @(negedge clk);
      start = 0;
      chk(phase_sel == start_phase, "phase select");
      for (int t = 0; t < 8 * 2200; t++) begin
        s_valid = (t % 8 == 0);
        if (s_valid) begin
          s_oct = OW'((s_oct + 1) % FO);
          lin++;
          s_bit = 1'($urandom);
        end
        if (t == 8 * 1800) enable = 0;
        exp_v = s_valid && enable && lin >= 0 && (lin % step == 0);
        exp_b = s_bit;
        @(negedge clk);
        chk(p_valid == exp_v, "valid");
        if (exp_v) begin
          npick++;
          chk(p_bit == exp_b, "data");
        end
      end
      s_valid = 0;
    end
    chk(npick > 3000, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
