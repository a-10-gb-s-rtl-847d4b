// tb_header_decimator: checks the /32 selection and the offset correction of the header path.
// A sampled 1.25 Gb/s stream (one bit per 8 cycles, octet count incrementing) is driven with
// random bits. The testbench keeps its own channel select, advanced by every random correction
// delta, and checks that a bit is passed on exactly when the octet's low five bits equal the
// select's upper five bits, with the right data and line position, and that the phase select
// equals the select's low three bits.
module tb_header_decimator;
  localparam int unsigned OW = 10;
  logic clk = 0, rst_n = 0;
  logic s_bit = 0, s_valid = 0, correct = 0;
  logic [OW-1:0] s_oct = 0;
  logic [7:0] delta = 0;
  logic [2:0] phase_sel;
  logic [7:0] chan_sel;
  logic h_bit, h_valid;
  logic [OW+2:0] h_pos;
  int unsigned checks = 0, failures = 0, nout = 0, ncorr = 0;
  logic [7:0] ref_sel = 0;
  bit exp_valid = 0, exp_bit;
  logic [OW+2:0] exp_pos;

  header_decimator #(.OW(OW)) dut (.clk, .rst_n, .s_bit, .s_valid, .s_oct, .correct, .delta,
    .phase_sel, .chan_sel, .h_bit, .h_valid, .h_pos);

  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", m, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 40000; t++) begin
      @(negedge clk);
      // check the response to the inputs of the previous cycle
      chk(h_valid == exp_valid, "valid");
      if (exp_valid) begin
        nout++;
        chk(h_bit == exp_bit && h_pos == exp_pos, "data/position");
      end
      chk(chan_sel == ref_sel && phase_sel == ref_sel[2:0], "select");
      // new inputs
      s_valid = (t % 8 == 0);
      if (s_valid) begin
        s_oct = s_oct + 1'b1;
        s_bit = 1'($urandom);
      end
      correct = (t % 997 == 500);
      delta   = 8'($urandom);
      exp_valid = s_valid && (s_oct[4:0] == ref_sel[7:3]);
      exp_bit   = s_bit;
      exp_pos   = {s_oct, ref_sel[2:0]};
      if (correct) begin
        ref_sel = ref_sel + delta;
        ncorr++;
      end
    end
    chk(nout > 100 && ncorr > 10, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
