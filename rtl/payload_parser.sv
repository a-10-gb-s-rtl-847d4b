// payload_parser: payload path configuration, frame length monitor and user-side output.
//
// Frame alignment: when the sync detector confirms the ONU's channel it pulses `align` with
// align_pos, the free-running line position (8*octet + phase) at which the last ID bit of channel
// onu_id was sampled. That bit is line bit ID_END_POS + onu_id of the frame, so the free-running
// position of frame bit 0 is base = align_pos - ID_END_POS - onu_id (mod FRAME_BITS).
// Configuration: when the BW parser delivers the frame's rate and offset (cfg_valid), the first
// payload bit of the ONU, frame bit PAYLOAD_START + offset, sits at free-running position
// start = base + PAYLOAD_START + offset (mod FRAME_BITS), plus PL_DELAY when the payload data
// reaches its phase multiplexer PL_DELAY line cycles late. The parser starts the payload decimator
// with phase start[2:0] and octet start/8, initialises the payload descrambler, and expects
// PAYLOAD_BITS / D user bits in this frame.
// Frame length monitor: it counts the descrambled user bits; after the last one it stops the
// decimator, gates the output and pulses `frame_done`, which sends the sync detector back to
// hunting for the next frame's sync pattern.
// User side: user_data/user_valid per payload bit, and ddr_clk, which toggles with every user bit
// so that both of its edges mark a new bit (double data rate clock at half the user rate).
// Timing: start/desc_init/frame_done are registered pulses one cycle after their cause.
module payload_parser
  import bipon_pkg::*;
#(
  parameter int unsigned FRAME_LEN = FRAME_BITS,
  parameter int unsigned PL_DELAY  = 16,
  parameter int unsigned PW        = POS_W,
  parameter int unsigned OW        = OCT_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [7:0]    onu_id,
  input  logic          align,
  input  logic [PW-1:0] align_pos,
  input  logic          cfg_valid,
  input  logic [3:0]    rate_log2,
  input  logic [9:0]    offset,
  input  logic          d_bit,
  input  logic          d_valid,
  output logic          start,
  output logic [2:0]    start_phase,
  output logic [OW-1:0] start_oct,
  output logic          desc_init,
  output logic          enable,
  output logic          frame_done,
  output logic          user_data,
  output logic          user_valid,
  output logic          ddr_clk,
  output logic [PW-1:0] frame_base,
  output logic [20:0]   bits_left
);

  localparam logic [PW:0] LEN = (PW+1)'(FRAME_LEN);

  logic [PW:0] base_diff;
  logic [PW:0] start_sum;
  logic [PW-1:0] start_pos;

  // base = align_pos - (ID_END_POS + onu_id) mod FRAME_LEN
  assign base_diff = {1'b0, align_pos} + LEN - (PW+1)'(ID_END_POS) - (PW+1)'(onu_id);
  // start = base + PAYLOAD_START + PL_DELAY + offset mod FRAME_LEN
  assign start_sum = {1'b0, frame_base} + (PW+1)'(PAYLOAD_START + PL_DELAY) + (PW+1)'(offset);
  assign start_pos = (start_sum >= LEN) ? PW'(start_sum - LEN) : PW'(start_sum);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_base  <= '0;
      start       <= 1'b0;
      start_phase <= '0;
      start_oct   <= '0;
      desc_init   <= 1'b0;
      enable      <= 1'b0;
      frame_done  <= 1'b0;
      user_data   <= 1'b0;
      user_valid  <= 1'b0;
      ddr_clk     <= 1'b0;
      bits_left   <= '0;
    end else begin
      start      <= 1'b0;
      desc_init  <= 1'b0;
      frame_done <= 1'b0;
      user_valid <= 1'b0;
      if (align) frame_base <= (base_diff >= LEN) ? PW'(base_diff - LEN) : PW'(base_diff);
      if (cfg_valid) begin
        start       <= 1'b1;
        desc_init   <= 1'b1;
        start_phase <= start_pos[2:0];
        start_oct   <= OW'(start_pos >> 3);
        enable      <= 1'b1;
        bits_left   <= 21'(PAYLOAD_BITS >> rate_log2);
      end else if (enable && d_valid) begin
        user_data  <= d_bit;
        user_valid <= 1'b1;
        ddr_clk    <= ~ddr_clk;
        bits_left  <= bits_left - 1'b1;
        if (bits_left == 21'd1) begin
          enable     <= 1'b0;
          frame_done <= 1'b1;
        end
      end
    end
  end

endmodule
