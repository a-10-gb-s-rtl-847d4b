// sync_detector: synchronisation hunt, channel identification and lock confirmation.
//
// Works on the single header channel delivered by the header decimator (one bit per 256 line
// bits). In SD_HUNT it shifts every bit into a SYNC_BITS window and compares it with the sync
// pattern. On a match it reads the following ID_BITS bits as the channel ID (SD_READ_ID).
//  - ID differs from the ONU ID: it pulses `correct` with delta = ONU ID - channel ID (mod 256),
//    which re-points the header decimator at the ONU's channel, clears the window and hunts
//    again; the next frame's sync and ID then confirm the new channel.
//  - ID equals the ONU ID: the channel is confirmed. `locked` is set and `align` is pulsed with
//    `align_pos`, the free-running line position at which the last ID bit was sampled; the
//    payload parser derives the frame alignment from it. The block then forwards the remaining
//    header bits (reserved field and BW map, header words RES_WORD .. HDR_WORDS-1) with their
//    word index (SD_HEADER) and waits for the payload parser's end-of-frame pulse (SD_WAIT)
//    before hunting for the next frame's sync.
// The window keeps shifting while locked, so a sync that starts before the end-of-frame pulse
// is still found. After a confirmed lock, an ID mismatch in a later frame drops `locked` and
// starts a new correction. Sync pattern and field widths come from bipon_pkg.
// Timing: correct/align/f_valid are registered, one cycle after the h_valid that causes them.
module sync_detector
  import bipon_pkg::*;
#(
  parameter int unsigned PW = OCT_W + 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [7:0]    onu_id,
  input  logic          h_bit,
  input  logic          h_valid,
  input  logic [PW-1:0] h_pos,
  input  logic          frame_done,
  output logic          correct,
  output logic [7:0]    delta,
  output logic          locked,
  output logic          align,
  output logic [PW-1:0] align_pos,
  output logic          sync_found,
  output logic          f_bit,
  output logic          f_valid,
  output logic [5:0]    f_word,
  output sync_state_e   state
);

  logic [SYNC_BITS-2:0]       window;    // the last SYNC_BITS-1 bits; the new bit completes it
  logic [$clog2(SYNC_BITS):0] fill;
  logic [ID_BITS-2:0]         id_sr;
  logic [5:0]                 cnt;
  logic [SYNC_BITS-1:0]       next_window;
  logic [ID_BITS-1:0]         next_id;

  assign next_window = {window, h_bit};
  assign next_id     = {id_sr, h_bit};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= SD_HUNT;
      window     <= '0;
      fill       <= '0;
      id_sr      <= '0;
      cnt        <= '0;
      correct    <= 1'b0;
      delta      <= '0;
      locked     <= 1'b0;
      align      <= 1'b0;
      align_pos  <= '0;
      sync_found <= 1'b0;
      f_bit      <= 1'b0;
      f_valid    <= 1'b0;
      f_word     <= '0;
    end else begin
      correct    <= 1'b0;
      align      <= 1'b0;
      sync_found <= 1'b0;
      f_valid    <= 1'b0;
      if (h_valid) begin
        window <= next_window[SYNC_BITS-2:0];
        if (fill != ($bits(fill))'(SYNC_BITS)) fill <= fill + 1'b1;
      end
      unique case (state)
        SD_HUNT: begin
          if (h_valid && fill >= ($bits(fill))'(SYNC_BITS - 1) && next_window == SYNC_PATTERN) begin
            state      <= SD_READ_ID;
            sync_found <= 1'b1;
            cnt        <= '0;
          end
        end
        SD_READ_ID: begin
          if (h_valid) begin
            id_sr <= next_id[ID_BITS-2:0];
            cnt   <= cnt + 1'b1;
            if (cnt == 6'(ID_BITS - 1)) begin
              if (next_id == onu_id) begin
                locked    <= 1'b1;
                align     <= 1'b1;
                align_pos <= h_pos;
                cnt       <= 6'(RES_WORD);
                state     <= SD_HEADER;
              end else begin
                locked  <= 1'b0;
                correct <= 1'b1;
                delta   <= onu_id - next_id;
                fill    <= '0;
                state   <= SD_HUNT;
              end
            end
          end
        end
        SD_HEADER: begin
          if (h_valid) begin
            f_bit   <= h_bit;
            f_valid <= 1'b1;
            f_word  <= cnt;
            cnt     <= cnt + 1'b1;
            if (cnt == 6'(HDR_WORDS - 1)) state <= SD_WAIT;
          end
        end
        SD_WAIT: begin
          if (frame_done) state <= SD_HUNT;
        end
        default: state <= SD_HUNT;
      endcase
    end
  end

endmodule
