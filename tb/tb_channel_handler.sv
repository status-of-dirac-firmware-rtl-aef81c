// tb_channel_handler: self-checking test of one complete channel.
//
// Plays a stream of calorimeter-like pulses (single pulses, a hit still
// running when its window closes, piled-up
// pairs that must merge, a pulse right after a hit so that it starts
// during the footer, a long hit spanning several rows) through three
// event windows, records the inputs clock by clock, and compares the
// rows in the channel FIFO and the per-event row/hit counts with the
// reference model. Nothing reads the FIFO until the end, and the last
// window carries enough hits to overflow the small FIFO used here, so
// the dropped-row flag is checked as well. Finally the FIFO is drained
// and every row compared.
`timescale 1ns/1ps
module tb_channel_handler;
  import zs_pkg::*;
  import zs_ref_pkg::*;

  localparam int DEPTH = 12;
  localparam int N = 3000;

  logic clk = 0, rst = 1;
  sample_t adc = 12'd100, thr = 12'd400;
  logic ew = 0;
  logic rd_en = 0, empty, ev_ready, ev_ovf, ev_pop = 0, hit_done, row_drop;
  row_t rd_data;
  logic [$clog2(DEPTH+1)-1:0] ev_rows;
  logic [7:0] ev_hits;
  hit_state_t fsm_state;
  pil_state_t pil_state;

  channel_handler #(.FIFO_DEPTH(DEPTH)) dut (.adc_in(adc), .*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit rst_s[]; s_t adc_s[]; bit ew_s[];
  int cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(10 * (N + 400));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus value for clock k
  function automatic s_t stim(int k);
    int v = 100;
    int t0s[] = '{200, 400, 430, 460, 545, 685, 800, 1300, 1700, 1900, 2100, 2300, 2500};
    int amp[] = '{900, 1500, 1200, 600, 1400, 2000, 3000, 700, 800, 900, 1000, 1100, 1200};
    foreach (t0s[i]) begin
      s_t s = pulse_at(k, t0s[i], amp[i], 0);
      v += s;
    end
    // a slow broad bump: one hit of several rows
    if (k >= 1000 && k < 1150) v += 1200 - 16 * ((k > 1075) ? k - 1075 : 1075 - k);
    return s_t'((v > 4095) ? 4095 : v);
  endfunction

  function automatic bit ew_at(int k);
    return (k >= 150 && k < 700) || (k >= 750 && k < 1250) || (k >= 1280 && k < 2700);
  endfunction

  initial begin
    rst_s = new[N]; adc_s = new[N]; ew_s = new[N];
    for (int k = 0; k < N; k++) begin
      rst = (k < 30);
      adc = stim(k);
      ew = ew_at(k);
      @(posedge clk);
      rst_s[k] = rst; adc_s[k] = adc; ew_s[k] = ew;
      #1;
    end
    begin
      automatic ZsRef m = new();
      int ev = 0, row_i = 0, nev;
      m.run(rst_s, adc_s, ew_s, thr, DEPTH);
      nev = m.ev_row_end.size();
      $display("model: %0d events, %0d rows, %0d dropped, merges=%0d pending_starts=%0d partial=%0d",
               nev, m.rows.size(), m.dropped, m.n_merge, m.n_pending_start, m.n_partial);
      check(nev == 3, "three events closed");
      check(m.n_merge > 0 && m.n_pending_start > 0 && m.dropped > 0, "stimulus covers merge, footer start, overflow");
      // hit records: peak position and sample count of the first pulse
      check(m.hit_p.size() > 0 && m.hit_p[0] == 17, "first hit: peak after 17 pre-peak samples");
      for (ev = 0; ev < nev; ev++) begin
        int first;
        first = (ev == 0) ? 0 : m.ev_row_end[ev-1];
        check(ev_ready === 1'b1, $sformatf("event %0d ready", ev));
        check(int'(ev_rows) == m.ev_row_end[ev] - first,
              $sformatf("event %0d rows %0d exp %0d", ev, ev_rows, m.ev_row_end[ev] - first));
        check(int'(ev_hits) == m.ev_hits[ev], $sformatf("event %0d hits %0d exp %0d", ev, ev_hits, m.ev_hits[ev]));
        check(ev_ovf == m.ev_ovf[ev], $sformatf("event %0d ovf", ev));
        @(negedge clk); ev_pop = 1; @(negedge clk); ev_pop = 0;
      end
      check(ev_ready === 1'b0, "no extra events");
      for (row_i = 0; row_i < m.rows.size(); row_i++) begin
        check(!empty, $sformatf("row %0d present", row_i));
        check(rd_data == m.rows[row_i], $sformatf("row %0d data %h exp %h", row_i, rd_data, m.rows[row_i]));
        @(negedge clk); rd_en = 1; @(negedge clk); rd_en = 0;
      end
      check(empty, "FIFO empty after all rows");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
