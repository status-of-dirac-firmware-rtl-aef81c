// tb_dirac_top: end-to-end test of the 20-channel design at its default
// sizes (48-row channel FIFOs, 500-word whole event FIFO, 25-clock event
// window delay).
//
// Phase 1: eight event windows of random calorimeter pulses on all
// channels, including piled-up pairs and a pulse that arrives during a
// footer. The whole event FIFO is not read until it has been full for a
// while, so the event builder stalls. The events go through the event
// store into a behavioural DDR and are then fetched back by data requests
// for their tags, in order; a request for a tag never sent must be
// answered with a miss. Every fetched word of these events is compared with the reference model of each channel: header (tag,
// total rows, rows and overflow flag per channel), rows in channel
// order, and the parity bits of every word.
// The DDR accepts writes on 70% of the clocks once the whole event FIFO
// has been full for 40 clocks, and stalls reads at random.
// Phase 2: one more window, written to the DDR only after it is built, in which
// channel 3 gets one hit far longer than its FIFO holds. The header must report exactly 48 rows and the overflow
// flag for that channel, and the event must still be well formed.
// The test counts each mechanism it exercises and fails if one never
// happened.
`timescale 1ns/1ps
module tb_dirac_top;
  import zs_pkg::*;
  import zs_ref_pkg::*;

  localparam int NC = 20, NEV1 = 8, WIN = 420, GAP = 120, PER = WIN + GAP, T0 = 200;
  localparam int N = T0 + (NEV1 + 1) * PER + 2200;

  logic clk = 0, rst = 1, ew = 0, evf_full, tag_drop;
  sample_t adc[NC], thr = 12'd400;
  logic [47:0] event_tag = 0;
  logic [9:0] evf_count;
  logic mem_wr_valid, mem_wr_ready, mem_rd_valid, mem_rd_ready, mem_rdata_valid;
  logic [23:0] mem_wr_addr, mem_rd_addr;
  logic [255:0] mem_wr_data, mem_rdata, resp_data;
  logic req_valid = 0, req_ready, resp_valid, resp_last, resp_miss;
  logic [47:0] req_tag = 0;
  logic stall_wr = 1, stall_rd = 0;
  logic [31:0] events_stored;
  logic [7:0] hit_map[NC];
  logic hit_done[NC], row_drop[NC];
  logic [31:0] events_built;

  dirac_top dut (.*);
  ddr_model #(.ADDR_W(24), .LAT(8)) u_mem (
    .clk, .stall_wr, .stall_rd,
    .wr_valid(mem_wr_valid), .wr_ready(mem_wr_ready), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .rd_valid(mem_rd_valid), .rd_ready(mem_rd_ready), .rd_addr(mem_rd_addr),
    .rdata_valid(mem_rdata_valid), .rdata(mem_rdata));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hits = 0, n_drop = 0, n_full = 0, n_stall = 0, n_ovf_hdr = 0, n_multirow = 0;
  s_t samp[NC][];
  bit rst_s[], ew_s[], ewc_s[];
  logic [255:0] out_q[$], got_q[$];
  bit got_miss, got_done;

  // fetch one event by its tag; returns the words and whether it missed
  task automatic fetch(input logic [47:0] tag, output bit miss);
    while (!req_ready) @(posedge clk);
    #1;
    got_q.delete(); got_miss = 0; got_done = 0;
    req_valid = 1; req_tag = tag;
    @(posedge clk); #1 req_valid = 0;
    while (!got_done) @(posedge clk);
    #1 miss = got_miss;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [47:0] tag_of(int e);
    return {16'hD1AC, 32'(1000 + e)};
  endfunction

  initial begin
    #(10 * (N + 20000)); failures++; $display("watchdog expired: built=%0d evf_count=%0d started=%0d", events_built, evf_count, started);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // stimulus: pulses added into per-channel sample arrays
  task automatic add_pulse(int c, int t0, int amp);
    for (int d = 0; d < 160 && t0 + d < N; d++) begin
      int v = int'(samp[c][t0 + d]) + int'(pulse_at(t0 + d, t0, amp, 0));
      samp[c][t0 + d] = s_t'((v > 4095) ? 4095 : v);
    end
  endtask

  initial begin
    rst_s = new[N]; ew_s = new[N]; ewc_s = new[N];
    for (int c = 0; c < NC; c++) begin
      samp[c] = new[N];
      for (int k = 0; k < N; k++) samp[c][k] = s_t'(100 + $urandom_range(0, 6));
    end
    for (int e = 0; e < NEV1; e++) begin
      automatic int ws = T0 + e * PER + 25;          // window start as the channels see it
      for (int c = 0; c < NC; c++) begin
        automatic int np = $urandom_range(2, 5);
        for (int p = 0; p < np; p++) begin
          automatic int t = ws + $urandom_range(10, WIN - 120);
          add_pulse(c, t, $urandom_range(400, 3500));
          if ($urandom_range(0, 3) == 0) add_pulse(c, t + $urandom_range(12, 40), $urandom_range(600, 3000));
        end
      end
    end
    // a pulse starting during the footer of the previous hit (channel 0, event 0)
    add_pulse(0, T0 + 25 + 100, 1400);
    add_pulse(0, T0 + 25 + 155, 3000);
    // overflow window: channel 3 gets one very long hit (a sharp rise, then
    // a slow decay over about 1500 clocks, some 70 rows)
    for (int t = T0 + NEV1 * PER + 60; t < T0 + NEV1 * PER + 1660; t++)
      samp[3][t] = s_t'(3600 - 2 * (t - (T0 + NEV1 * PER + 60)));
  end

  // drive inputs, record them
  initial begin
    #1;
    for (int k = 0; k < N; k++) begin
      automatic int rel = k - T0;
      rst = (k < 40);
      ew = (rel >= 0) && (rel % PER < WIN) && (rel / PER <= NEV1);
      if (rel >= 0 && rel % PER == 0) event_tag = tag_of(rel / PER);
      for (int c = 0; c < NC; c++) adc[c] = samp[c][k];
      @(posedge clk);
      rst_s[k] = rst; ew_s[k] = ew;
      #1;
      // the overflow window starts only after every earlier event is out
      if (k == T0 + NEV1 * PER - 5) begin
        while (events_stored != NEV1) begin
          @(posedge clk); #1;
        end
        hold = 1;
      end
    end
  end

  // DDR side: hold off writes until the FIFO has been full for 40 clocks,
  // then accept 70% of the clocks; during the overflow window accept none
  int full_run = 0; bit started = 0, hold = 0;
  always @(negedge clk) begin
    if (evf_full) full_run++; else full_run = 0;
    if (full_run >= 40) started = 1;
    stall_wr <= !(started && !hold && ($urandom_range(0, 9) < 7));
    stall_rd <= ($urandom_range(0, 9) < 3);
  end

  always @(posedge clk) if (!rst) begin
    if (resp_valid) begin
      got_q.push_back(resp_data);
      if (resp_miss) got_miss = 1;
      if (resp_last) got_done = 1;
    end
    for (int c = 0; c < NC; c++) begin n_hits += hit_done[c]; n_drop += row_drop[c]; end
    n_full += evf_full;
    if (evf_full && (dut.u_eb.state == 2'd1 || (dut.u_eb.state == 2'd2 && dut.u_eb.remaining != 0))) n_stall++;
    check(!tag_drop, "no tag dropped");
  end

  initial begin
    wait (rst == 0);
    wait (events_built == NEV1 + 1);
    repeat (20) @(posedge clk);
    // let everything reach the DDR, then fetch every event by its tag
    started = 1; hold = 0;
    wait (events_stored == NEV1 + 1);
    repeat (5) @(posedge clk);
    for (int e = 0; e <= NEV1; e++) begin
      automatic bit miss;
      fetch(tag_of(e), miss);
      check(!miss, $sformatf("event %0d found in store", e));
      foreach (got_q[i]) out_q.push_back(got_q[i]);
    end
    begin
      automatic bit miss;
      fetch(tag_of(77), miss);
      check(miss && got_q.size() == 1, "unknown tag answered with a miss");
    end
    check(u_mem.n_writes == out_q.size(), $sformatf("%0d DDR writes for %0d event words", u_mem.n_writes, out_q.size()));
    begin
      automatic ZsRef m[NC];
      automatic int pos = 0;
      for (int k = 0; k < N; k++) ewc_s[k] = (k >= 25) ? ew_s[k-25] : 1'b0;
      for (int c = 0; c < NC; c++) begin
        m[c] = new();
        m[c].run(rst_s, samp[c], ewc_s, thr, -1);
        n_multirow += m[c].n_partial < m[c].rows.size();
      end
      $display("output words %0d; ch0 merges=%0d footer starts=%0d", out_q.size(), m[0].n_merge, m[0].n_pending_start);
      for (int e = 0; e <= NEV1; e++) begin
        automatic logic [255:0] h;
        automatic int tot;
        check(pos < out_q.size(), $sformatf("event %0d present", e));
        if (pos >= out_q.size()) break;
        h = out_q[pos++];
        tot = int'(h[203:188]);
        check(h[251:204] == tag_of(e), $sformatf("event %0d tag %h", e, h[251:204]));
        check(h[255:252] == row_parity(h[251:0]), "header parity");
        if (e < NEV1) begin
          automatic int sum = 0;
          for (int c = 0; c < NC; c++) begin
            automatic int first = (e == 0) ? 0 : m[c].ev_row_end[e-1];
            automatic int nr = m[c].ev_row_end[e] - first;
            sum += nr;
            check(int'(h[187 - 6*c -: 6]) == nr, $sformatf("event %0d ch%0d rows %0d exp %0d", e, c, h[187 - 6*c -: 6], nr));
            check(h[67 - c] == 1'b0, "no overflow in phase 1");
            for (int r = 0; r < nr; r++) begin
              automatic logic [255:0] w = out_q[pos++];
              check(w[251:0] == m[c].rows[first + r], $sformatf("event %0d ch%0d row %0d", e, c, r));
              check(w[255:252] == row_parity(w[251:0]), "row parity");
            end
          end
          check(tot == sum, $sformatf("event %0d total rows", e));
        end else begin
          automatic int sum = 0;
          for (int c = 0; c < NC; c++) sum += int'(h[187 - 6*c -: 6]);
          check(tot == sum, "overflow event total rows");
          check(h[187 - 18 -: 6] == 6'd48, $sformatf("channel 3 rows %0d, FIFO capacity 48", h[187 - 18 -: 6]));
          check(h[67 - 3] == 1'b1, "channel 3 overflow flag");
          n_ovf_hdr += h[67 - 3];
          for (int r = 0; r < tot; r++) begin
            automatic logic [255:0] w = out_q[pos++];
            check(w[255:252] == row_parity(w[251:0]), "row parity");
          end
        end
      end
      check(pos == out_q.size(), $sformatf("no extra words (%0d of %0d)", pos, out_q.size()));
      $display("mechanisms: hits=%0d merges=%0d footer_starts=%0d multirow_channels=%0d evf_full=%0d stall=%0d row_drops=%0d ovf_headers=%0d",
               n_hits, m[0].n_merge, m[0].n_pending_start, n_multirow, n_full, n_stall, n_drop, n_ovf_hdr);
      check(n_hits > 0, "hits seen");
      check(m[0].n_merge > 0, "pile-up merge seen");
      check(m[0].n_pending_start > 0, "hit started during a footer");
      check(n_multirow > 0, "multi-row hits seen");
      check(n_stall > 0, "builder stalled on a full event FIFO");
      check(n_drop > 0, "channel FIFO overflow seen");
      check(n_ovf_hdr > 0, "overflow reported in header");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
