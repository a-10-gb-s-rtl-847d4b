// header_decimator: header path /32 decimation and header offset correction.
//
// The header path has already been decimated by 8 by its phase sampler. This block keeps the
// 8-bit channel select H = {hq, hp}: hp (3 bits) picks the clock phase of the sampler, hq (5 bits)
// picks one octet in 32. A sampled bit is passed on when the low five bits of the octet in which
// it was taken equal hq, so exactly one line bit in 256 (one channel of the 256) comes out.
// When the sync detector has read a channel ID that differs from the ONU ID it pulses `correct`
// with delta = ONU ID - read ID (mod 256); H is then advanced by delta, which moves the phase
// select and, with its carry, the /32 select, so the next bits come from the ONU's own channel.
// The reset value of H (channel 0 of the free-running counters) is arbitrary; the frame alignment
// is found by the sync detector.
// Outputs: h_bit/h_valid, one bit per 256 line cycles, and h_pos = 8*octet + hp, the free-running
// line position at which the bit was sampled (used to align the payload path).
// Timing: h_valid follows the sampler's q_valid by one cycle.
module header_decimator
  import bipon_pkg::*;
#(
  parameter int unsigned OW = OCT_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          s_bit,
  input  logic          s_valid,
  input  logic [OW-1:0] s_oct,
  input  logic          correct,
  input  logic [7:0]    delta,
  output logic [2:0]    phase_sel,
  output logic [7:0]    chan_sel,
  output logic          h_bit,
  output logic          h_valid,
  output logic [OW+2:0] h_pos
);

  logic [7:0] sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q   <= '0;
      h_bit   <= 1'b0;
      h_valid <= 1'b0;
      h_pos   <= '0;
    end else begin
      if (correct) sel_q <= sel_q + delta;
      h_valid <= s_valid && (s_oct[4:0] == sel_q[7:3]);
      if (s_valid && (s_oct[4:0] == sel_q[7:3])) begin
        h_bit <= s_bit;
        h_pos <= {s_oct, sel_q[2:0]};
      end
    end
  end

  assign phase_sel = sel_q[2:0];
  assign chan_sel  = sel_q;

endmodule
