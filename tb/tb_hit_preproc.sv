// tb_hit_preproc: the hit state machine fed by the real shift register
// and pile-up logic inside one long event window. Pulses include
// isolated hits, piled-up pairs that must merge into one hit, a pulse
// that arrives during a footer, and a hit long enough to hit the
// 4095-sample limit. Every 12-bit output word and, at each hit end, the
// hit time, sample count and peak position are compared with the
// reference model. The hit time of a pulse is also checked against the
// clock at which its first sample was written.
`timescale 1ns/1ps
module tb_hit_preproc;
  import zs_pkg::*;
  import zs_ref_pkg::*;

  localparam int N = 7000;
  localparam int EW0 = 50;

  logic clk = 0, rst = 1;
  sample_t adc = 100, thr = 12'd400;
  sample_t pipe_out, ew_time, word, hit_time, n_samples, peak_pos, max_peak;
  logic peak_flag, thr_flag, thr_low, blind, start_en, word_valid, word_last, busy;
  hit_state_t fsm_state;
  pil_state_t pil_state;

  zs_shift_register u_sr (.clk, .adc_in(adc), .thr, .pipe_out, .peak_flag, .thr_flag, .thr_low);
  zs_pileup u_pil (.clk, .rst, .peak_flag, .thr_flag, .pil_state, .blind);
  hit_preproc dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  bit rst_s[]; s_t adc_s[]; bit ew_s[];
  s_t got[$];
  int got_t[$], got_n[$], got_p[$];

  initial begin
    #(10 * (N + 100)); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic s_t stim(int k);
    int v = 100;
    int t0s[] = '{200, 400, 430, 545, 600, 700, 706, 900};
    int amp[] = '{900, 1500, 1200, 1400, 3000, 2000, 2500, 800};
    foreach (t0s[i]) v += pulse_at(k, t0s[i], amp[i], 0);
    // a very long hump: a hit that reaches the sample-count limit
    if (k >= 1500 && k < 6500) v += 3500 - (k - 1500) / 2;
    return s_t'((v > 4095) ? 4095 : v);
  endfunction

  assign start_en = (cyc >= EW0);
  assign ew_time  = (cyc >= EW0) ? sample_t'((cyc - EW0 > 4095) ? 4095 : cyc - EW0) : '0;

  always @(posedge clk) if (word_valid) begin
    got.push_back(word);
    if (word_last) begin got_t.push_back(hit_time); got_n.push_back(n_samples); got_p.push_back(peak_pos); end
  end

  initial begin
    rst_s = new[N]; adc_s = new[N]; ew_s = new[N];
    for (int k = 0; k < N; k++) begin
      cyc = k;
      rst = (k < 25);
      adc = stim(k);
      @(posedge clk);
      rst_s[k] = rst; adc_s[k] = adc; ew_s[k] = (k >= EW0);
      #1;
    end
    begin
      automatic ZsRef m = new();
      m.run(rst_s, adc_s, ew_s, thr, -1);
      $display("model: %0d words, %0d hits, merges=%0d footer starts=%0d", m.words.size(), m.hit_t.size(), m.n_merge, m.n_pending_start);
      checks++; if (m.n_merge == 0 || m.n_pending_start == 0) begin failures++; $display("FAIL coverage"); end
      checks++; if (m.hit_n.size() == 0 || m.hit_n[m.hit_n.size()-1] != 4095) begin failures++; $display("FAIL no hit at the sample limit"); end
      checks++; if (got.size() != m.words.size()) begin failures++; $display("FAIL %0d words, expected %0d", got.size(), m.words.size()); end
      for (int i = 0; i < got.size() && i < m.words.size(); i++) begin
        checks++; if (got[i] !== m.words[i]) begin failures++; $display("FAIL word %0d %h exp %h", i, got[i], m.words[i]); end
      end
      checks++; if (got_t.size() != m.hit_t.size()) begin failures++; $display("FAIL hit count"); end
      for (int i = 0; i < got_t.size() && i < m.hit_t.size(); i++) begin
        checks += 3;
        if (got_t[i] != m.hit_t[i]) begin failures++; $display("FAIL hit %0d time", i); end
        if (got_n[i] != m.hit_n[i]) begin failures++; $display("FAIL hit %0d n", i); end
        if (got_p[i] != m.hit_p[i]) begin failures++; $display("FAIL hit %0d peak", i); end
      end
      // first pulse: its peak (clock 204) reaches position 17 after edge
      // 207, so the first sample is written at edge 208, when ew_time = 208-50
      checks++; if (got_t.size() == 0 || got_t[0] != 158 || got_p[0] != 17) begin
        failures++; $display("FAIL first hit time/peak %0d %0d", got_t[0], got_p[0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
