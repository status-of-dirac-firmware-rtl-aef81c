// zs_pkg: constants and types shared by the zero-suppression channel
// pipeline and the event builder.
//
// The shift register has 21 positions (0..20). A sample enters at
// position 20 and leaves at position 0. A peak is looked for at position
// 17, which leaves 17 older samples (positions 0..16) to form the
// pre-peak part of a hit. The end of a hit needs four consecutive
// samples under threshold (positions 0..3). These numbers, the 12-bit
// sample width and the 21 x 12 = 252-bit row width come from the design
// description. The footer layout (hit time, peak position, number of
// samples, error word, end word 0xFFF) and the word format of the event
// stream are this implementation's choices.
package zs_pkg;

  localparam int unsigned SAMPLE_W   = 12;   // ADC sample width
  localparam int unsigned SR_LEN     = 21;   // shift register positions 0..20
  localparam int unsigned PEAK_POS   = 17;   // position where peaks are detected
  localparam int unsigned N_UNDER    = 4;    // samples under threshold that end a hit
  localparam int unsigned NBPEAKS    = 17;   // cycles the end condition stays disabled
  localparam int unsigned ROW_WORDS  = 21;   // 12-bit words per channel FIFO row
  localparam int unsigned ROW_W      = ROW_WORDS * SAMPLE_W;  // 252
  localparam int unsigned EVW_W      = 256;  // whole event FIFO word
  localparam int unsigned PAR_W      = EVW_W - ROW_W;         // 4 parity bits
  localparam int unsigned N_FOOTER   = 5;    // footer words per hit

  localparam logic [SAMPLE_W-1:0] ERR_WORD = 12'h555;  // error-flag word (quality criteria unspecified)
  localparam logic [SAMPLE_W-1:0] END_WORD = 12'hFFF;  // last word of every hit

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [ROW_W-1:0]    row_t;

  // Hit state machine (names as in the channel simulation).
  typedef enum logic [1:0] {
    WAIT_OT = 2'd0,   // waiting for a peak over threshold
    WRITING = 2'd1,   // samples from position 0 go to the FIFO
    FOOTER  = 2'd2    // footer words go to the FIFO
  } hit_state_t;

  // Pile-up state machine.
  typedef enum logic {
    WAIT_PEAK = 1'b0,
    BLIND_TH  = 1'b1
  } pil_state_t;

  // Even parity over four 63-bit slices of a 252-bit payload.
  function automatic logic [PAR_W-1:0] row_parity(input row_t r);
    logic [PAR_W-1:0] p;
    for (int i = 0; i < int'(PAR_W); i++) p[i] = ^r[i*63 +: 63];
    return p;
  endfunction

endpackage
