// bipon_pkg: frame layout, constants and scrambler arithmetic shared by the Bi-CDR blocks.
//
// A Bi-PON downstream frame lasts 125 us. At the 9.95328 Gb/s line rate this is 1,244,160 bits
// (this implementation's choice of the standard 10G PON line rate, which makes the frame a whole
// number of 256-bit header words). The frame is bit-interleaved over 256 channels: line bit n
// belongs to channel n mod 256. Each channel starts with a header of HDR_WORDS bits, one bit per
// 256-bit word:
//   words  0..15  sync pattern          (not scrambled)
//   words 16..23  channel ID, 0..255    (not scrambled)
//   words 24..31  reserved field        (not scrambled)
//   words 32..47  bandwidth (BW) map    (scrambled)
// The payload starts at line bit PAYLOAD_START = 48*256. An ONU with decimation rate D and offset
// `off` owns payload bits n = PAYLOAD_START + off + D*m. Field widths, the sync pattern and the
// BW map encoding are this implementation's choices; the field order follows the frame format.
// All fields are sent most significant bit first.
//
// BW map (16 bits): [15:13] rate code k, decimation D = 2^(k+3) (8 .. 1024);
//                   [12:10] unused; [9:0] payload offset, taken modulo D.
//
// Scrambling is frame-synchronous and additive with polynomial 1 + x^-18 + x^-23: the sequence
// s[n] obeys s[n] = s[n-18] ^ s[n-23] and is restarted every frame with s[0..22] = 1. The
// 23-bit state S_n = {s[n+22], ..., s[n]} (bit i holds s[n+i]) advances as S_{n+1} = A * S_n.
// A decimated sequence s[o + D*m] is produced without running the full-rate scrambler: the state
// jumps by the precomputed matrix A^D per decimated bit, and the starting state A^o * S_0 is built
// from the binary digits of o with the matrices A^(2^j).
package bipon_pkg;

  localparam int unsigned FRAME_BITS    = 1244160;
  localparam int unsigned N_CHANNELS    = 256;
  localparam int unsigned PHASES        = 8;
  localparam int unsigned FRAME_OCTETS  = FRAME_BITS / PHASES;
  localparam int unsigned OCT_W         = $clog2(FRAME_OCTETS);
  localparam int unsigned POS_W         = $clog2(FRAME_BITS);

  localparam int unsigned SYNC_BITS     = 16;
  localparam logic [15:0] SYNC_PATTERN  = 16'hF35A;
  localparam int unsigned ID_BITS       = 8;
  localparam int unsigned RES_BITS      = 8;
  localparam int unsigned BW_BITS       = 16;
  localparam int unsigned ID_WORD       = SYNC_BITS;
  localparam int unsigned RES_WORD      = ID_WORD + ID_BITS;
  localparam int unsigned BW_WORD       = RES_WORD + RES_BITS;
  localparam int unsigned HDR_WORDS     = BW_WORD + BW_BITS;
  localparam int unsigned PAYLOAD_START = HDR_WORDS * N_CHANNELS;
  localparam int unsigned PAYLOAD_BITS  = FRAME_BITS - PAYLOAD_START;
  // line index of the last ID bit of channel 0
  localparam int unsigned ID_END_POS    = (RES_WORD - 1) * N_CHANNELS;

  localparam int unsigned MIN_RATE_LOG2 = 3;   // decimation 8
  localparam int unsigned MAX_RATE_LOG2 = 10;  // decimation 1024

  // scrambler
  localparam int unsigned LFSR_LEN  = 23;
  localparam int unsigned LFSR_TAP  = 5;       // s[n+23] = s[n+5] ^ s[n]
  localparam int unsigned N_JUMPS   = 14;      // A^(2^j), j = 0..13, covers offsets below 16384

  typedef logic [LFSR_LEN-1:0] lfsr_t;
  typedef logic [LFSR_LEN-1:0][LFSR_LEN-1:0] lfsr_mat_t;          // row-major, [row][col]
  typedef logic [N_JUMPS-1:0][LFSR_LEN-1:0][LFSR_LEN-1:0] jump_tab_t;

  localparam lfsr_t LFSR_SEED = '1;

  typedef enum logic [2:0] {
    SD_HUNT    = 3'd0,   // looking for the sync pattern
    SD_READ_ID = 3'd1,   // reading the channel ID
    SD_HEADER  = 3'd2,   // locked: forwarding reserved and BW map bits
    SD_WAIT    = 3'd3    // locked: waiting for the payload parser's end of frame
  } sync_state_e;

  function automatic lfsr_t mat_vec(input lfsr_mat_t m, input lfsr_t v);
    lfsr_t r;
    for (int i = 0; i < LFSR_LEN; i++) r[i] = ^(m[i] & v);
    return r;
  endfunction

  function automatic lfsr_mat_t mat_mul(input lfsr_mat_t a, input lfsr_mat_t b);
    lfsr_mat_t r;
    for (int i = 0; i < LFSR_LEN; i++)
      for (int j = 0; j < LFSR_LEN; j++) begin
        logic acc;
        acc = 1'b0;
        for (int k = 0; k < LFSR_LEN; k++) acc ^= a[i][k] & b[k][j];
        r[i][j] = acc;
      end
    return r;
  endfunction

  // one-step transition matrix A
  function automatic lfsr_mat_t step_matrix();
    lfsr_mat_t a;
    a = '0;
    for (int i = 0; i < LFSR_LEN - 1; i++) a[i][i+1] = 1'b1;
    a[LFSR_LEN-1][0]        = 1'b1;
    a[LFSR_LEN-1][LFSR_TAP] = 1'b1;
    return a;
  endfunction

  // table of A^(2^j)
  function automatic jump_tab_t jump_table();
    jump_tab_t t;
    t[0] = step_matrix();
    for (int j = 1; j < N_JUMPS; j++) t[j] = mat_mul(t[j-1], t[j-1]);
    return t;
  endfunction

  // A^o * v for an offset o below 2^N_JUMPS
  function automatic lfsr_t jump(input jump_tab_t t, input lfsr_t v, input logic [N_JUMPS-1:0] o);
    lfsr_t r;
    r = v;
    for (int j = 0; j < N_JUMPS; j++) if (o[j]) r = mat_vec(t[j], r);
    return r;
  endfunction

endpackage
