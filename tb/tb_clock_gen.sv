// tb_clock_gen: checks the divide-by-8 phase generator and the frame octet counter.
// A reference line-cycle count is kept in the testbench; every cycle the divider count, each of
// the eight phase waveforms (high for counts i..i+3) and the octet counter (wrapping after
// FRAME_OCT octets, shortened here to 7) are compared with values derived from that count.
module tb_clock_gen;
  import bipon_pkg::*;
  localparam int unsigned FO = 7;
  logic clk = 0, rst_n = 0;
  logic [2:0] cnt8;
  logic [7:0] ph_clk;
  logic [$clog2(FO)-1:0] oct;
  int unsigned checks = 0, failures = 0;
  int unsigned t = 0;

  clock_gen #(.FRAME_OCT(FO)) dut (.clk, .rst_n, .cnt8, .ph_clk, .oct);
  always #1 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    repeat (2000) begin
      checks++;
      if (cnt8 != 3'(t % 8) || oct != ($bits(oct))'((t / 8) % FO)) begin
        failures++;
        $display("FAIL t=%0d cnt8=%0d oct=%0d", t, cnt8, oct);
      end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (ph_clk[i] != (((t + 8 - i) % 8) < 4)) begin
          failures++;
          $display("FAIL t=%0d phase %0d", t, i);
        end
      end
      @(negedge clk);
      t++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
