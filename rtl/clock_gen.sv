// clock_gen: divide-by-8 clock generation for the Bi-CDR.
//
// The recovered 10 GHz line clock is divided by 8 into eight equidistant 1.25 GHz phases, as in
// the clock-generation block of the architecture. In this synchronous model the line clock is
// `clk` and each phase is a 50 % duty-cycle waveform: ph_clk[i] is high for line cycles
// i .. i+3 (mod 8) of every octet, so it rises when the divider count `cnt8` equals i.
// Besides the phases, the block keeps a count of 8-bit octets modulo one frame (`oct`); the header
// and payload decimators and the payload parser use it as their shared time base. A frame of
// FRAME_OCT octets is a multiple of 128 octets, so oct[4:0] and oct[6:0] act as the /32 and /128
// prescalers. The octet counter is this implementation's choice.
// Timing: all outputs are registered or decoded from registers; cnt8 and oct leave reset at 0.
module clock_gen
  import bipon_pkg::*;
#(
  parameter int unsigned FRAME_OCT = FRAME_OCTETS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  output logic [2:0]                 cnt8,
  output logic [PHASES-1:0]          ph_clk,
  output logic [$clog2(FRAME_OCT)-1:0] oct
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt8 <= '0;
      oct  <= '0;
    end else begin
      cnt8 <= cnt8 + 3'd1;
      if (cnt8 == 3'd7) oct <= (oct == $bits(oct)'(FRAME_OCT - 1)) ? '0 : oct + 1'b1;
    end
  end

  always_comb begin
    for (int i = 0; i < PHASES; i++) begin
      logic [2:0] d;
      d = cnt8 - 3'(i);
      ph_clk[i] = (d < 3'd4);
    end
  end

endmodule
