// hit_preproc: hit state machine, hit pre-processing, footer insertion
// and the 12-bit output multiplexer of one channel.
//
// WAIT_OT: a hit starts when start_en is high and a peak over threshold
//   sits at position 17 of the shift register. The sample then at
//   position 0 (17 samples before the peak) is the first sample of the
//   hit, so the hit carries the rising edge and the baseline.
// WRITING: every clock the sample at position 0 is written. The hit ends
//   when positions 0..3 are all under threshold and the pile-up logic is
//   not blind; that sample is not written. While writing, the block keeps
//   the number of samples, the largest sample and its index in the hit.
// FOOTER: five words follow the samples: hit time, peak position, number
//   of samples, error word (0x555) and end word (0xFFF).
// The fields and their meaning follow the design description; the
// footer order, the two constant words, and the 12-bit widths of the
// fields are this implementation's reading of a FIFO dump.
//
// Details of this implementation: the hit time is the value of the
// event-window clock counter (ew_time) in the cycle the first sample is
// written. A peak that arrives while the footer is being written starts
// a hit right after the footer, which then has fewer than 17 pre-peak
// samples. A hit that reaches 4095 samples is closed so that the count
// fits its 12-bit field.
//
// Timing: word/word_valid/word_last are registered, one clock after the
// sample left position 0. word_last marks the end word; hit_done pulses
// with it.
module hit_preproc
  import zs_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  sample_t    pipe_out,    // shift register position 0
  input  logic       peak_flag,
  input  logic       thr_flag,
  input  logic       thr_low,
  input  logic       blind,       // from zs_pileup
  input  logic       start_en,    // hits may start (inside the event window)
  input  sample_t    ew_time,     // clocks since the start of the event window
  output sample_t    word,
  output logic       word_valid,
  output logic       word_last,
  output logic       busy,        // a hit is being written (samples or footer)
  output hit_state_t fsm_state,
  output sample_t    hit_time,
  output sample_t    n_samples,
  output sample_t    peak_pos,
  output sample_t    max_peak
);

  localparam int unsigned FW = $clog2(N_FOOTER);

  logic          start_req, pending_start, hit_end;
  logic [FW-1:0] fidx;
  sample_t       footer_word;

  assign start_req = start_en && ((peak_flag && thr_flag) || pending_start);
  assign hit_end   = (thr_low && !blind) || (n_samples == '1);

  always_comb begin
    unique case (fidx)
      FW'(0):  footer_word = hit_time;
      FW'(1):  footer_word = peak_pos;
      FW'(2):  footer_word = n_samples;
      FW'(3):  footer_word = ERR_WORD;
      default: footer_word = END_WORD;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fsm_state     <= WAIT_OT;
      pending_start <= 1'b0;
      fidx          <= '0;
      word          <= '0;
      word_valid    <= 1'b0;
      word_last     <= 1'b0;
      hit_time      <= '0;
      n_samples     <= '0;
      peak_pos      <= '0;
      max_peak      <= '0;
    end else begin
      word_valid <= 1'b0;
      word_last  <= 1'b0;
      unique case (fsm_state)
        WAIT_OT: begin
          if (start_req) begin
            fsm_state     <= WRITING;
            pending_start <= 1'b0;
            word          <= pipe_out;
            word_valid    <= 1'b1;
            hit_time      <= ew_time;
            n_samples     <= sample_t'(1);
            peak_pos      <= '0;
            max_peak      <= pipe_out;
          end
        end
        WRITING: begin
          if (hit_end) begin
            fsm_state <= FOOTER;
            fidx      <= '0;
          end else begin
            word       <= pipe_out;
            word_valid <= 1'b1;
            n_samples  <= n_samples + 1'b1;
            if (pipe_out > max_peak) begin
              max_peak <= pipe_out;
              peak_pos <= n_samples;
            end
          end
        end
        default: begin  // FOOTER
          word       <= footer_word;
          word_valid <= 1'b1;
          if (start_en && peak_flag && thr_flag) pending_start <= 1'b1;
          if (fidx == FW'(N_FOOTER - 1)) begin
            word_last <= 1'b1;
            fsm_state <= WAIT_OT;
          end else begin
            fidx <= fidx + 1'b1;
          end
        end
      endcase
    end
  end

  assign busy = (fsm_state != WAIT_OT);

endmodule
