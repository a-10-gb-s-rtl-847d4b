// bi_cdr: digital part of a bit-interleaving clock and data recovery decimator for a 10G
// bit-interleaved PON (Bi-PON) optical network unit.
//
// In a Bi-PON frame the payload of each ONU is spread bit by bit over the frame, so an ONU need
// only sample its own bits. This block receives the recovered line clock and data (one bit per
// `clk` cycle) and produces the ONU's descrambled user bits at its user rate:
//   clock_gen          divide-by-8: eight 1.25 GHz phases and a frame-long octet count
//   header path        phase_sampler (/8) -> header_decimator (/32): one channel of 256
//   sync_detector      sync hunt, channel ID, offset correction, lock confirmation
//   bw_descrambler     descrambles the BW map of the ONU's channel
//   bw_parser          reserved field, payload decimation rate and offset of the frame
//   payload path       phase_sampler (/8, after PL_DELAY retiming flops) -> payload_decimator
//                      (/2^(0..7)) -> payload_descrambler
//   payload_parser     frame alignment, payload configuration, frame length, user output
// Lock sequence: the header path starts on an arbitrary channel; after the first sync and ID the
// channel select is corrected by (ONU ID - read ID); the next frame's sync and ID confirm lock.
// Then every frame: BW map -> payload configuration -> PAYLOAD_BITS/D user bits -> new hunt.
// The analog front end (pre-amplifier, PLL) and the LVDS output drivers are outside this block;
// the PLL's recovered clock and data are its inputs.
// Timing: user_valid pulses once per user bit (every D line cycles), ddr_clk toggles with each.
module bi_cdr
  import bipon_pkg::*;
#(
  parameter int unsigned PL_DELAY = 16
) (
  input  logic                clk,          // recovered line clock
  input  logic                rst_n,
  input  logic                data_in,      // recovered line data
  input  logic [7:0]          onu_id,
  output logic                user_data,
  output logic                user_valid,
  output logic                ddr_clk,
  output logic                locked,
  output logic [RES_BITS-1:0] reserved,
  output logic [3:0]          rate_log2,
  output logic [9:0]          offset,
  output logic                cfg_valid,
  output logic                frame_done,
  output logic                sync_found,
  output logic                correct,
  output logic [7:0]          chan_sel,
  output sync_state_e         sync_state
);

  logic [PHASES-1:0] ph_clk;
  logic [OCT_W-1:0]  oct;

  clock_gen u_clk (.clk, .rst_n, .cnt8(), .ph_clk, .oct);

  // header path
  logic             hs_bit, hs_valid;
  logic [OCT_W-1:0] hs_oct;
  logic [2:0]       h_phase;
  logic             h_bit, h_valid;
  logic [POS_W-1:0] h_pos;
  logic [7:0]       delta;

  phase_sampler #(.STAGES(1), .DELAY(0)) u_hdr_smp (
    .clk, .rst_n, .din(data_in), .ph_clk, .sel(h_phase), .oct,
    .q(hs_bit), .q_oct(hs_oct), .q_valid(hs_valid));

  header_decimator u_hdr_dec (
    .clk, .rst_n, .s_bit(hs_bit), .s_valid(hs_valid), .s_oct(hs_oct),
    .correct, .delta, .phase_sel(h_phase), .chan_sel, .h_bit, .h_valid, .h_pos);

  logic             align;
  logic [POS_W-1:0] align_pos;
  logic             f_bit, f_valid;
  logic [5:0]       f_word;

  sync_detector u_sync (
    .clk, .rst_n, .onu_id, .h_bit, .h_valid, .h_pos, .frame_done,
    .correct, .delta, .locked, .align, .align_pos, .sync_found,
    .f_bit, .f_valid, .f_word, .state(sync_state));

  logic       b_bit, b_valid;
  logic [5:0] b_word;

  bw_descrambler u_bw_desc (
    .clk, .rst_n, .onu_id, .init(align), .i_bit(f_bit), .i_valid(f_valid), .i_word(f_word),
    .o_bit(b_bit), .o_valid(b_valid), .o_word(b_word));

  bw_parser u_bw_parse (
    .clk, .rst_n, .i_bit(b_bit), .i_valid(b_valid), .i_word(b_word),
    .reserved, .rate_log2, .offset, .cfg_valid);

  // payload path
  logic             ps_bit, ps_valid;
  logic [OCT_W-1:0] ps_oct;
  logic [2:0]       p_phase;
  logic             p_bit, p_valid;
  logic             d_bit, d_valid;
  logic             start, desc_init, enable;
  logic [2:0]       start_phase;
  logic [OCT_W-1:0] start_oct;

  phase_sampler #(.STAGES(1), .DELAY(PL_DELAY)) u_pl_smp (
    .clk, .rst_n, .din(data_in), .ph_clk, .sel(p_phase), .oct,
    .q(ps_bit), .q_oct(ps_oct), .q_valid(ps_valid));

  payload_decimator u_pl_dec (
    .clk, .rst_n, .start, .start_phase, .start_oct, .rate_log2, .enable,
    .s_bit(ps_bit), .s_valid(ps_valid), .s_oct(ps_oct),
    .phase_sel(p_phase), .p_bit, .p_valid);

  payload_descrambler u_pl_desc (
    .clk, .rst_n, .init(desc_init), .offset, .rate_log2,
    .i_bit(p_bit), .i_valid(p_valid), .o_bit(d_bit), .o_valid(d_valid));

  payload_parser #(.PL_DELAY(PL_DELAY)) u_pl_parse (
    .clk, .rst_n, .onu_id, .align, .align_pos, .cfg_valid, .rate_log2, .offset,
    .d_bit, .d_valid, .start, .start_phase, .start_oct, .desc_init, .enable, .frame_done,
    .user_data, .user_valid, .ddr_clk, .frame_base(), .bits_left());

endmodule
