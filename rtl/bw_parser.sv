// bw_parser: extracts the reserved field and the bandwidth map of the ONU's channel.
//
// Takes the (descrambled) header bits with their word index, most significant bit first, and
// assembles the RES_BITS reserved field and the BW_BITS bandwidth map. When the last BW map bit
// arrives it publishes, for the current frame:
//   rate_log2 = 3 + bw[15:13]   payload decimation D = 2^rate_log2, 8 .. 1024
//   offset    = bw[9:0] mod D   position of the ONU's first payload bit within D
//   reserved                    OLT-to-ONU instruction field, passed to the user side
// and pulses cfg_valid. The BW map bit layout is this implementation's choice.
// Timing: cfg_valid and the fields are registered one cycle after the last BW map bit.
module bw_parser
  import bipon_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                i_bit,
  input  logic                i_valid,
  input  logic [5:0]          i_word,
  output logic [RES_BITS-1:0] reserved,
  output logic [3:0]          rate_log2,
  output logic [9:0]          offset,
  output logic                cfg_valid
);

  logic [RES_BITS-1:0] res_sr;
  logic [BW_BITS-2:0]  bw_sr;
  logic [BW_BITS-1:0]  bw_next;
  logic [3:0]          lg;

  assign bw_next = {bw_sr, i_bit};
  assign lg      = 4'(MIN_RATE_LOG2) + {1'b0, bw_next[15:13]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_sr    <= '0;
      bw_sr     <= '0;
      reserved  <= '0;
      rate_log2 <= 4'(MIN_RATE_LOG2);
      offset    <= '0;
      cfg_valid <= 1'b0;
    end else begin
      cfg_valid <= 1'b0;
      if (i_valid) begin
        if (i_word >= 6'(RES_WORD) && i_word < 6'(BW_WORD)) res_sr <= {res_sr[RES_BITS-2:0], i_bit};
        if (i_word >= 6'(BW_WORD) && i_word < 6'(HDR_WORDS)) bw_sr <= bw_next[BW_BITS-2:0];
        if (i_word == 6'(HDR_WORDS - 1)) begin
          reserved  <= res_sr;
          rate_log2 <= lg;
          offset    <= bw_next[9:0] & 10'((32'd1 << lg) - 1);
          cfg_valid <= 1'b1;
        end
      end
    end
  end

endmodule
