// tb_phase_sampler: checks phase selection and resampling.
// The testbench makes its own eight phases from a line-cycle counter and drives random line data.
// Instance A (one stage, no delay) must report, one cycle after the selected phase's edge, the
// line bit present at that edge and its octet. Instance B (two stages, 3-cycle line delay) must
// report the bit that was on the line 3 cycles before the edge one phase period earlier. After
// each change of the phase select no stale bit may be reported.
module tb_phase_sampler;
  localparam int unsigned OW = 6;
  logic clk = 0, rst_n = 0, din = 0;
  logic [7:0] ph_clk;
  logic [2:0] sel = 0;
  logic [OW-1:0] oct = 0;
  logic qa, qb, va, vb;
  logic [OW-1:0] oa, ob;
  int unsigned checks = 0, failures = 0, nva = 0, nvb = 0;
  int t = 0;
  logic hist [int];
  int sel_change_t = 0;

  phase_sampler #(.STAGES(1), .DELAY(0), .OW(OW)) dut_a (.clk, .rst_n, .din, .ph_clk, .sel, .oct,
    .q(qa), .q_oct(oa), .q_valid(va));
  phase_sampler #(.STAGES(2), .DELAY(3), .OW(OW)) dut_b (.clk, .rst_n, .din, .ph_clk, .sel, .oct,
    .q(qb), .q_oct(ob), .q_valid(vb));

  always #1 clk = ~clk;
  always_comb for (int i = 0; i < 8; i++) ph_clk[i] = (((t + 8 - i) % 8) < 4);

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0d", m, t); end
  endtask

  initial begin
    for (int i = -20; i <= 0; i++) hist[i] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // outputs now reflect the edge taken in line cycle t
      if (va) begin
        nva++;
        chk((t % 8) == sel, "A edge phase");
        chk(qa == hist[t], "A data");
        chk(oa == OW'(t / 8), "A octet");
      end
      if (vb) begin
        nvb++;
        chk((t % 8) == sel, "B edge phase");
        chk(t - 8 >= sel_change_t, "B stale bit after select change");
        chk(qb == hist[t-8-3], "B data");
        chk(ob == OW'((t - 8) / 8), "B octet");
      end
      t++;
      oct = OW'(t / 8);
      din = 1'($urandom);
      hist[t] = din;
      if (i % 500 == 499) begin
        sel = sel + 3'(1 + $urandom % 7);
        sel_change_t = t;
      end
    end
    chk(nva > 400 && nvb > 300, "too few samples");
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
