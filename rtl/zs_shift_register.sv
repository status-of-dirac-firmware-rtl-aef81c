// zs_shift_register: the 21-position sample pipeline of one channel and
// the three comparisons the hit logic needs.
//
// Each clock a new ADC sample enters at position 20 and every sample
// moves one position down; position 0 is the oldest. From the register
// contents it forms, combinationally:
//   peak_flag - position 17 is a local maximum: >= positions 16 and 18,
//               > positions 15 and 19 (ties on the near neighbours count,
//               on the far ones they do not), as the design specifies;
//   thr_flag  - position 17 is at or over the threshold (this design's
//               reading of "peak over threshold");
//   thr_low   - positions 0..3 are all under the threshold.
// pipe_out is position 0, the sample that may be written to the FIFO.
// The register has no reset: a hit cannot start before the register is
// full because hit_preproc is held idle while rst is high.
module zs_shift_register
  import zs_pkg::*;
(
  input  logic    clk,
  input  sample_t adc_in,      // new sample, one per clock
  input  sample_t thr,         // threshold (ADC counts)
  output sample_t pipe_out,    // position 0
  output logic    peak_flag,
  output logic    thr_flag,
  output logic    thr_low
);

  sample_t data_pipe [SR_LEN];

  always_ff @(posedge clk) begin
    data_pipe[SR_LEN-1] <= adc_in;
    for (int i = 0; i < int'(SR_LEN) - 1; i++) data_pipe[i] <= data_pipe[i+1];
  end

  always_comb begin
    peak_flag = (data_pipe[PEAK_POS] >= data_pipe[PEAK_POS+1]) &&
                (data_pipe[PEAK_POS] >= data_pipe[PEAK_POS-1]) &&
                (data_pipe[PEAK_POS] >  data_pipe[PEAK_POS-2]) &&
                (data_pipe[PEAK_POS] >  data_pipe[PEAK_POS+2]);
    thr_flag  = data_pipe[PEAK_POS] >= thr;
    thr_low   = 1'b1;
    for (int i = 0; i < int'(N_UNDER); i++) thr_low &= (data_pipe[i] < thr);
  end

  assign pipe_out = data_pipe[0];

endmodule
