// phase_sampler: phase multiplexer and resampling flip-flops (first decimation by 8).
//
// One of the eight 1.25 GHz clock phases is chosen by `sel`; on its rising edge the line data is
// taken into the first flip-flop, which yields one bit out of every eight line bits. STAGES
// flip-flops clocked by the same phase may follow each other (Q1, Q2 ... in the architecture).
// DELAY line-rate flip-flops can be placed ahead of the multiplexer: the payload path uses them
// so that the BW map of a frame is decoded, and the payload phase set, before the ONU's first
// payload bit reaches the multiplexer (this retiming delay is this implementation's choice).
// In this synchronous model the rising edge of phase i is the line cycle in which ph_clk[i] is
// high and ph_clk[i+1] is low. With each bit the sampler keeps the octet count at which the
// first stage took it (`q_oct`), so later stages know which line bit they hold.
// When `sel` changes, the bits held so far are marked invalid, so no bit taken with the old
// phase is reported; the first valid bit then appears STAGES phase edges later.
// Timing: q/q_oct/q_valid update one line cycle after the selected phase edge; q_valid is a
// one-cycle pulse per octet.
module phase_sampler
  import bipon_pkg::*;
#(
  parameter int unsigned STAGES = 1,
  parameter int unsigned DELAY  = 0,
  parameter int unsigned OW     = OCT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              din,
  input  logic [PHASES-1:0] ph_clk,
  input  logic [2:0]        sel,
  input  logic [OW-1:0]     oct,
  output logic              q,
  output logic [OW-1:0]     q_oct,
  output logic              q_valid
);

  logic            tick;
  logic            din_d;
  logic [2:0]      sel_q;
  logic [STAGES-1:0] bits;
  logic [STAGES-1:0] vld;
  logic [OW-1:0]   octs [STAGES];

  logic [STAGES-1:0] vld_in;   // validity of each stage after the next phase edge

  assign tick   = ph_clk[sel] & ~ph_clk[3'(sel + 3'd1)];
  assign vld_in = STAGES'({vld, 1'b1});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits    <= '0;
      vld     <= '0;
      sel_q   <= '0;
      for (int i = 0; i < STAGES; i++) octs[i] <= '0;
      q_valid <= 1'b0;
    end else begin
      sel_q   <= sel;
      q_valid <= tick && (sel == sel_q) && vld_in[STAGES-1];
      if (sel != sel_q) begin
        vld <= '0;
      end else if (tick) begin
        bits[0] <= din_d;
        octs[0] <= oct;
        vld[0]  <= 1'b1;
        for (int i = 1; i < STAGES; i++) begin
          bits[i] <= bits[i-1];
          octs[i] <= octs[i-1];
          vld[i]  <= vld[i-1];
        end
      end
    end
  end

  // optional line-rate retiming delay ahead of the phase multiplexer
  if (DELAY == 0) begin : g_nodelay
    assign din_d = din;
  end else begin : g_delay
    logic [DELAY-1:0] dl;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dl <= '0;
      else        dl <= DELAY'({dl, din});
    end
    assign din_d = dl[DELAY-1];
  end

  assign q     = bits[STAGES-1];
  assign q_oct = octs[STAGES-1];

endmodule
