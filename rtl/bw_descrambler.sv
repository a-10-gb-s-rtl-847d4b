// bw_descrambler: descrambles the BW map field of the ONU's header channel.
//
// The BW map and the payload are scrambled with the frame-synchronous additive sequence
// s[n] (1 + x^-18 + x^-23, see bipon_pkg). The header channel holds only every 256th line bit,
// so this block never runs the scrambler at line rate. On `init` (the sync detector's lock pulse)
// it loads the scrambler state of the first BW map bit of the ONU's channel,
// S = A^(BW_WORD*256 + onu_id) * S_0, computed combinationally from the jump matrices; for every
// BW map bit it outputs bit ^ S[0] and advances S by A^256, the state 256 line bits later.
// Reserved-field bits pass unchanged (only the BW map and the payload are scrambled).
// Interface: the header bit stream of the sync detector (bit, valid, word index) in and out.
// Timing: one register stage; o_valid follows i_valid by one cycle.
module bw_descrambler
  import bipon_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] onu_id,
  input  logic       init,
  input  logic       i_bit,
  input  logic       i_valid,
  input  logic [5:0] i_word,
  output logic       o_bit,
  output logic       o_valid,
  output logic [5:0] o_word
);

  localparam jump_tab_t JT      = jump_table();
  localparam lfsr_t     BW_BASE = jump(JT, LFSR_SEED, N_JUMPS'(BW_WORD * N_CHANNELS));

  lfsr_t state;
  lfsr_t start_state;
  logic  is_bw;

  assign start_state = jump(JT, BW_BASE, N_JUMPS'(onu_id));
  assign is_bw       = (i_word >= 6'(BW_WORD)) && (i_word < 6'(HDR_WORDS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= LFSR_SEED;
      o_bit   <= 1'b0;
      o_valid <= 1'b0;
      o_word  <= '0;
    end else begin
      o_valid <= i_valid;
      if (init) state <= start_state;
      if (i_valid) begin
        o_word <= i_word;
        if (is_bw) begin
          o_bit <= i_bit ^ state[0];
          state <= mat_vec(JT[8], state);
        end else begin
          o_bit <= i_bit;
        end
      end
    end
  end

endmodule
