// payload_decimator: payload path /2^(0..7) decimation.
//
// The payload path's phase sampler delivers one bit per octet (decimation by 8), tagged with the
// octet in which it was taken. On `start` the block loads the ONU's payload phase (phase_sel,
// sent to the sampler), the octet of its first payload bit and the decimation rate
// D = 2^rate_log2 (8 .. 1024). While `enable` is high it passes on the bit whose octet equals the
// expected one and then advances the expectation by D/8 octets (modulo the frame), so it keeps one
// bit in every 2^(rate_log2-3) sampled bits: 1 to 128, the second decimation stage.
// Timing: p_valid follows the matching s_valid by one cycle.
module payload_decimator
  import bipon_pkg::*;
#(
  parameter int unsigned FRAME_OCT = FRAME_OCTETS,
  parameter int unsigned OW        = OCT_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [2:0]    start_phase,
  input  logic [OW-1:0] start_oct,
  input  logic [3:0]    rate_log2,
  input  logic          enable,
  input  logic          s_bit,
  input  logic          s_valid,
  input  logic [OW-1:0] s_oct,
  output logic [2:0]    phase_sel,
  output logic          p_bit,
  output logic          p_valid
);

  logic [OW-1:0] next_oct;
  logic [7:0]    step;
  logic [OW:0]   sum;

  assign sum = {1'b0, next_oct} + {{(OW-7){1'b0}}, step};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_oct  <= '0;
      step      <= 8'd1;
      phase_sel <= '0;
      p_bit     <= 1'b0;
      p_valid   <= 1'b0;
    end else begin
      p_valid <= 1'b0;
      if (start) begin
        next_oct  <= start_oct;
        phase_sel <= start_phase;
        step      <= 8'(9'd1 << (rate_log2 - 4'(MIN_RATE_LOG2)));
      end else if (enable && s_valid && s_oct == next_oct) begin
        p_bit    <= s_bit;
        p_valid  <= 1'b1;
        next_oct <= (sum >= (OW+1)'(FRAME_OCT)) ? OW'(sum - (OW+1)'(FRAME_OCT)) : OW'(sum);
      end
    end
  end

endmodule
