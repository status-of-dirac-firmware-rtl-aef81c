// zs_ref_pkg: behavioural reference of one zero-suppression channel, used
// by the testbenches to compute expected rows independently of the RTL.
//
// The model works on recorded per-clock inputs (reset, ADC sample, event
// window level as seen by the channel) and replays the rules of the
// channel clock by clock: 21-sample window, peak at position 17, end of
// hit on four samples under threshold unless a peak was seen at position
// 17 within the last 17 clocks, five footer words, 21-word rows with
// stale unused slots, and event closing after the window falls. It
// returns the rows the channel FIFO should receive, grouped per event,
// plus one record per hit. cap limits how many rows the FIFO can take
// (nothing reads it while the model runs); -1 means unlimited.
package zs_ref_pkg;

  typedef logic [11:0]  s_t;
  typedef logic [251:0] r_t;

  class ZsRef;
    r_t rows[$];          // rows accepted by the FIFO, in order
    int ev_row_end[$];    // per closed event: index one past its last row
    int ev_hits[$];       // per closed event: hits
    bit ev_ovf[$];        // per closed event: a row was dropped
    s_t words[$];         // every 12-bit word produced
    int hit_t[$], hit_n[$], hit_p[$];   // per hit: time, samples, peak index
    int dropped;
    int n_pending_start;  // hits started from a peak seen during a footer
    int n_merge;          // peaks that re-armed the blind window during a hit
    int n_partial;        // rows flushed before slot 20

    function automatic bit lt(s_t a, s_t b); return a < b; endfunction

    function void run(bit rst_s[], s_t adc_s[], bit ew_s[], s_t thr, int cap);
      int n = adc_s.size();
      s_t p[21];
      int st = 0, fidx = 0, cnt = 0;
      bit pend = 0, pclose = 0, ew_d = 0;
      int hit_time = 0, nsamp = 0, ppos = 0, maxp = 0, time_cnt = 0;
      int rows_cnt = 0, hits_cnt = 0; bit ovf = 0;
      bit w_v = 0, w_l = 0; s_t w = 0;
      int idx = 0; s_t slots[21]; bit r_v = 0; int in_fifo = 0;
      for (int i = 0; i < 21; i++) slots[i] = 0;
      dropped = 0; n_pending_start = 0; n_merge = 0; n_partial = 0;
      for (int j = 1; j < n; j++) begin
        bit peak, thrf, low, blind, ew_in, rise, fall, start_en, hend, close;
        bit n_w_v, n_w_l; s_t n_w; s_t ewt;
        for (int q = 0; q < 21; q++) p[q] = (j - 1 - 20 + q >= 0) ? adc_s[j-1-20+q] : s_t'(0);
        peak = (p[17] >= p[18]) && (p[17] >= p[16]) && (p[17] > p[15]) && (p[17] > p[19]);
        thrf = p[17] >= thr;
        low  = lt(p[0], thr) && lt(p[1], thr) && lt(p[2], thr) && lt(p[3], thr);
        blind = (peak && thrf) || (cnt != 0);
        ew_in = ew_s[j];
        rise = ew_in && !ew_d; fall = !ew_in && ew_d;
        ewt = rise ? 0 : s_t'(time_cnt);
        start_en = ew_in && !pclose;
        close = pclose && (st == 0) && (idx == 0) && !r_v;
        if (rst_s[j]) begin
          st = 0; fidx = 0; cnt = 0; pend = 0; pclose = 0; ew_d = 0; time_cnt = 0;
          rows_cnt = 0; hits_cnt = 0; ovf = 0; w_v = 0; w_l = 0; w = 0; idx = 0; r_v = 0;
          hit_time = 0; nsamp = 0; ppos = 0; maxp = 0;
          for (int i = 0; i < 21; i++) slots[i] = 0;
          continue;
        end
        // row leaving the packer (registered) enters the FIFO at this edge
        if (r_v) begin
          r_t r;
          for (int i = 0; i < 21; i++) r[251 - 12*i -: 12] = slots[i];
          if (cap < 0 || in_fifo < cap) begin
            rows.push_back(r); in_fifo++;
            if (!close) rows_cnt++;
          end else begin
            dropped++;
            if (!close) ovf = 1;
          end
        end
        // packer takes the registered word
        r_v = 0;
        if (w_v) begin
          slots[idx] = w;
          if (w_l || idx == 20) begin
            if (idx != 20) n_partial++;
            idx = 0; r_v = 1;
          end else idx++;
        end
        // hit state machine
        n_w_v = 0; n_w_l = 0; n_w = w;
        hend = (low && !blind) || (nsamp == 4095);
        if (st == 0) begin
          if (start_en && ((peak && thrf) || pend)) begin
            if (pend && !(peak && thrf)) n_pending_start++;
            st = 1; pend = 0; n_w = p[0]; n_w_v = 1;
            hit_time = ewt; nsamp = 1; ppos = 0; maxp = p[0];
          end
        end else if (st == 1) begin
          if (hend) begin st = 2; fidx = 0; end
          else begin
            n_w = p[0]; n_w_v = 1;
            if (p[0] > maxp) begin maxp = p[0]; ppos = nsamp; end
            nsamp++;
          end
        end else begin
          case (fidx)
            0: n_w = s_t'(hit_time);
            1: n_w = s_t'(ppos);
            2: n_w = s_t'(nsamp);
            3: n_w = 12'h555;
            default: n_w = 12'hFFF;
          endcase
          n_w_v = 1;
          if (start_en && peak && thrf) pend = 1;
          if (fidx == 4) begin
            n_w_l = 1; st = 0;
            hit_t.push_back(hit_time); hit_n.push_back(nsamp); hit_p.push_back(ppos);
          end else fidx++;
        end
        if (n_w_v) words.push_back(n_w);
        // pile-up counter
        if (peak && thrf) begin
          if (st != 0 && cnt != 0) n_merge++;
          cnt = 17;
        end else if (cnt != 0) cnt--;
        // event bookkeeping
        if (close) begin
          ev_row_end.push_back(rows.size());
          ev_hits.push_back(hits_cnt); ev_ovf.push_back(ovf);
          pclose = 0; rows_cnt = 0; hits_cnt = 0; ovf = 0;
        end else begin
          if (fall) pclose = 1;
          if (n_w_l) hits_cnt++;
        end
        time_cnt = rise ? 1 : ((time_cnt == 4095) ? 4095 : time_cnt + 1);
        ew_d = ew_in;
        w = n_w; w_v = n_w_v; w_l = n_w_l;
      end
    endfunction
  endclass

  // A calorimeter-like pulse: fast rise, exponential-ish tail, on a baseline.
  function automatic s_t pulse_at(int t, int t0, int amp, int base);
    int v = base;
    if (t >= t0) begin
      int d = t - t0;
      if (d < 4) v = base + amp * d / 4;
      else       v = base + (amp * 12) / (12 + (d - 4) * (d - 4) / 2);
    end
    return s_t'((v > 4095) ? 4095 : v);
  endfunction

endpackage
