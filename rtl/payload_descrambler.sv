// payload_descrambler: descrambles the decimated payload directly.
//
// The ONU receives only the payload bits n = PAYLOAD_START + off + D*m. Instead of running the
// scrambler at line rate, the block computes the decimated, offset scrambling sequence: on `init`
// it loads S = A^off * (A^PAYLOAD_START * S_0), the scrambler state at the ONU's first payload
// bit (the second factor is a constant, the first is built from the binary digits of off with the
// jump matrices A^(2^j)); for every payload bit it outputs bit ^ S[0] and advances S by
// A^D = A^(2^rate_log2). See bipon_pkg for the scrambler definition.
// Timing: one register stage; o_valid follows i_valid by one cycle.
module payload_descrambler
  import bipon_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic [9:0] offset,
  input  logic [3:0] rate_log2,
  input  logic       i_bit,
  input  logic       i_valid,
  output logic       o_bit,
  output logic       o_valid
);

  localparam jump_tab_t JT     = jump_table();
  localparam lfsr_t     P_BASE = jump(JT, LFSR_SEED, N_JUMPS'(PAYLOAD_START));

  lfsr_t      state;
  lfsr_t      start_state;
  lfsr_mat_t  step_m;
  logic [3:0] lg_q;

  assign start_state = jump(JT, P_BASE, N_JUMPS'(offset));
  assign step_m      = JT[lg_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= LFSR_SEED;
      lg_q    <= 4'(MIN_RATE_LOG2);
      o_bit   <= 1'b0;
      o_valid <= 1'b0;
    end else begin
      o_valid <= i_valid;
      if (init) begin
        state <= start_state;
        lg_q  <= rate_log2;
      end else if (i_valid) begin
        o_bit <= i_bit ^ state[0];
        state <= mat_vec(step_m, state);
      end
    end
  end

endmodule
