// tb_stress: long-run load test of the whole design at its default sizes,
// with the behavioural DDR behind the event store.
//
// Part A: 100 event windows at high occupancy. Every channel gets 3 to 6
// calorimeter pulses per window, and a third of them are followed closely
// by a second one (pile-up).
// Part B: 128 event windows of two-level square waves, the kind of
// stimulus a pattern generator board can apply to the ADC inputs: a short
// high level (2 samples) followed by a lower level of 8 to 30 samples.
// Windows follow each other without pause for the design. The DDR takes a
// write on 5 clocks out of 6 throughout, a memory clocked at 166 MHz behind
// a 200 MHz sample clock. The test requires that no channel FIFO row and
// no tag is lost at this load. After the run, every one of the 228 events
// is fetched from the DDR by a data request for its tag. Each event is
// compared word by word with the reference model of the channels: the
// header fields, the rows in channel order, and the parity.
// The test reports the peak fill of the whole event FIFO.
`timescale 1ns/1ps
module tb_stress;
  import zs_pkg::*;
  import zs_ref_pkg::*;

  localparam int NC = 20, NA = 100, NB = 128, NEV = NA + NB;
  localparam int WIN = 420, GAP = 120, PER = WIN + GAP, T0 = 200;
  localparam int N = T0 + NEV * PER + 1000;

  logic clk = 0, rst = 1, ew = 0, evf_full, tag_drop;
  sample_t adc[NC], thr = 12'd400;
  logic [47:0] event_tag = 0;
  logic [9:0] evf_count;
  logic [7:0] hit_map[NC];
  logic hit_done[NC], row_drop[NC];
  logic [31:0] events_built, events_stored;
  logic mem_wr_valid, mem_wr_ready, mem_rd_valid, mem_rd_ready, mem_rdata_valid;
  logic [23:0] mem_wr_addr, mem_rd_addr;
  logic [255:0] mem_wr_data, mem_rdata, resp_data;
  logic req_valid = 0, req_ready, resp_valid, resp_last, resp_miss;
  logic [47:0] req_tag = 0;
  logic stall_wr = 0, stall_rd = 0;

  dirac_top dut (.*);
  ddr_model #(.ADDR_W(24), .LAT(8)) u_mem (
    .clk, .stall_wr, .stall_rd,
    .wr_valid(mem_wr_valid), .wr_ready(mem_wr_ready), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .rd_valid(mem_rd_valid), .rd_ready(mem_rd_ready), .rd_addr(mem_rd_addr),
    .rdata_valid(mem_rdata_valid), .rdata(mem_rdata));
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_hits = 0, n_drop = 0, n_tagdrop = 0, max_evf = 0, cyc = 0;
  s_t samp[NC][];
  bit rst_s[], ew_s[], ewc_s[];
  logic [255:0] out_q[$], got_q[$];
  bit got_miss, got_done;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [47:0] tag_of(int e);
    return {16'h5735, 32'(e)};
  endfunction

  task automatic fetch(input logic [47:0] tag, output bit miss);
    while (!req_ready) @(posedge clk);
    #1;
    got_q.delete(); got_miss = 0; got_done = 0;
    req_valid = 1; req_tag = tag;
    @(posedge clk); #1 req_valid = 0;
    while (!got_done) @(posedge clk);
    #1 miss = got_miss;
  endtask

  initial begin
    #(10 * (N + 60000)); failures++; $display("watchdog expired: built=%0d stored=%0d", events_built, events_stored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic add_pulse(int c, int t0, int amp);
    for (int d = 0; d < 160 && t0 + d < N; d++) begin
      automatic int v = int'(samp[c][t0 + d]) + int'(pulse_at(t0 + d, t0, amp, 0));
      samp[c][t0 + d] = s_t'((v > 4095) ? 4095 : v);
    end
  endtask

  task automatic add_square(int c, int t0, int hi, int lo, int len);
    for (int d = 0; d < 2 + len && t0 + d < N; d++)
      samp[c][t0 + d] = s_t'((d < 2) ? hi : lo);
  endtask

  initial begin
    rst_s = new[N]; ew_s = new[N]; ewc_s = new[N];
    for (int c = 0; c < NC; c++) begin
      samp[c] = new[N];
      for (int k = 0; k < N; k++) samp[c][k] = s_t'(100 + $urandom_range(0, 6));
    end
    for (int e = 0; e < NEV; e++) begin
      automatic int ws = T0 + e * PER + 25;          // window start as the channels see it
      for (int c = 0; c < NC; c++) begin
        if (e < NA) begin
          automatic int np = $urandom_range(3, 6);
          for (int p = 0; p < np; p++) begin
            automatic int t = ws + $urandom_range(10, WIN - 120);
            add_pulse(c, t, $urandom_range(500, 3500));
            if ($urandom_range(0, 2) == 0) add_pulse(c, t + $urandom_range(12, 40), $urandom_range(600, 3000));
          end
        end else begin
          // square pulses on a grid, so they do not overlap
          automatic int np = $urandom_range(2, 6);
          for (int p = 0; p < np; p++)
            add_square(c, ws + 10 + 60 * p + $urandom_range(0, 10), $urandom_range(2500, 3800),
                       $urandom_range(600, 1800), $urandom_range(8, 30));
        end
      end
    end
  end

  // drive inputs and record them
  initial begin
    #1;
    for (int k = 0; k < N; k++) begin
      automatic int rel = k - T0;
      rst = (k < 40);
      ew = (rel >= 0) && (rel % PER < WIN) && (rel / PER < NEV);
      if (rel >= 0 && rel % PER == 0) event_tag = tag_of(rel / PER);
      for (int c = 0; c < NC; c++) adc[c] = samp[c][k];
      @(posedge clk);
      rst_s[k] = rst; ew_s[k] = ew;
      #1;
    end
  end

  // the memory takes no write on every sixth clock
  always @(negedge clk) begin
    cyc++;
    stall_wr <= (cyc % 6 == 0);
    stall_rd <= ($urandom_range(0, 9) < 2);
  end

  always @(posedge clk) if (!rst) begin
    if (resp_valid) begin
      got_q.push_back(resp_data);
      if (resp_miss) got_miss = 1;
      if (resp_last) got_done = 1;
    end
    for (int c = 0; c < NC; c++) begin n_hits += hit_done[c]; n_drop += row_drop[c]; end
    n_tagdrop += tag_drop;
    if (int'(evf_count) > max_evf) max_evf = int'(evf_count);
  end

  initial begin
    wait (rst == 0);
    wait (events_stored == NEV);
    repeat (5) @(posedge clk);
    for (int e = 0; e < NEV; e++) begin
      automatic bit miss;
      fetch(tag_of(e), miss);
      check(!miss, $sformatf("event %0d found in store", e));
      foreach (got_q[i]) out_q.push_back(got_q[i]);
    end
    check(u_mem.n_writes == out_q.size(), $sformatf("%0d DDR writes for %0d event words", u_mem.n_writes, out_q.size()));
    begin
      automatic ZsRef m[NC];
      automatic int pos = 0, merges = 0;
      for (int k = 0; k < N; k++) ewc_s[k] = (k >= 25) ? ew_s[k-25] : 1'b0;
      for (int c = 0; c < NC; c++) begin
        m[c] = new();
        m[c].run(rst_s, samp[c], ewc_s, thr, -1);
        merges += m[c].n_merge;
        check(m[c].ev_row_end.size() == NEV, $sformatf("model closed %0d events on ch%0d", m[c].ev_row_end.size(), c));
      end
      for (int e = 0; e < NEV && pos < out_q.size(); e++) begin
        automatic logic [255:0] h = out_q[pos++];
        automatic int sum = 0;
        check(h[251:204] == tag_of(e), $sformatf("event %0d tag %h", e, h[251:204]));
        check(h[255:252] == row_parity(h[251:0]), "header parity");
        for (int c = 0; c < NC; c++) begin
          automatic int first = (e == 0) ? 0 : m[c].ev_row_end[e-1];
          automatic int nr = m[c].ev_row_end[e] - first;
          sum += nr;
          check(int'(h[187 - 6*c -: 6]) == nr, $sformatf("event %0d ch%0d rows %0d exp %0d", e, c, h[187 - 6*c -: 6], nr));
          check(h[67 - c] == 1'b0, $sformatf("event %0d ch%0d no overflow", e, c));
          for (int r = 0; r < nr && pos < out_q.size(); r++) begin
            automatic logic [255:0] w = out_q[pos++];
            check(w[251:0] == m[c].rows[first + r], $sformatf("event %0d ch%0d row %0d", e, c, r));
            check(w[255:252] == row_parity(w[251:0]), "row parity");
          end
        end
        check(int'(h[203:188]) == sum, $sformatf("event %0d total rows", e));
      end
      check(pos == out_q.size(), $sformatf("all words accounted for (%0d of %0d)", pos, out_q.size()));
      $display("events %0d, words %0d, hits %0d, pile-up merges %0d, peak whole event FIFO fill %0d of 500",
               NEV, out_q.size(), n_hits, merges, max_evf);
      check(n_hits > 0, "hits seen");
      check(merges > 0, "pile-up merges seen");
      check(n_drop == 0, $sformatf("no channel FIFO row lost (%0d lost)", n_drop));
      check(n_tagdrop == 0, "no tag lost");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
