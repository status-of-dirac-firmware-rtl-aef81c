// tb_event_store: the event store against a behavioural DDR with a small
// address space (256 words, so the ring wraps) and a 64-entry index (so
// tags collide). 160 events of 0..12 rows, some with repeated tags, come
// from a source that empties at random; the memory stalls writes and reads
// at random. While events are still being written, one of the three newest
// stored events is requested now and then, and an event that crosses the
// end of the address range is requested as soon as it is stored. Afterwards every tag is requested, plus tags
// never sent. The expected answer is worked out here: a hit only if the
// newest event sharing the low tag bits carries that tag and no more than
// 256 words have been written since its first word, with the words found
// at its addresses; otherwise one miss word. Events overwritten by the
// wrapping ring must be among those answered with a miss.
`timescale 1ns/1ps
module tb_event_store;
  localparam int AW = 8, IB = 6, NEV = 160, MSZ = 1 << AW;
  logic clk = 0, rst = 1;
  logic [255:0] in_data;
  logic in_empty, in_rd;
  logic mem_wr_valid, mem_wr_ready, mem_rd_valid, mem_rd_ready, mem_rdata_valid;
  logic [AW-1:0] mem_wr_addr, mem_rd_addr;
  logic [255:0] mem_wr_data, mem_rdata, resp_data;
  logic req_valid = 0, req_ready, resp_valid, resp_last, resp_miss;
  logic [47:0] req_tag = 0;
  logic [31:0] events_stored;
  logic src_gap = 0, stall_wr = 0, stall_rd = 0;

  event_store #(.ADDR_W(AW), .IDX_BITS(IB)) dut (.*);
  ddr_model #(.ADDR_W(AW), .LAT(5)) u_mem (
    .clk, .stall_wr, .stall_rd,
    .wr_valid(mem_wr_valid), .wr_ready(mem_wr_ready), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .rd_valid(mem_rd_valid), .rd_ready(mem_rd_ready), .rd_addr(mem_rd_addr),
    .rdata_valid(mem_rdata_valid), .rdata(mem_rdata));
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_wrap = 0, n_early = 0, n_stale = 0;
  logic [255:0] src[$];
  logic [255:0] ev_words[NEV][$];
  logic [47:0]  ev_tag[NEV];
  int           ev_start[NEV];
  logic [255:0] shadow[MSZ];
  logic [255:0] got[$];
  bit           got_miss, got_done;

  initial begin
    #3000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  assign in_empty = (src.size() == 0) || src_gap;
  assign in_data  = (src.size() == 0) ? '0 : src[0];

  always @(posedge clk) if (!rst) begin
    if (in_rd) begin
      checks++;
      if (in_empty) begin failures++; $display("FAIL read from empty source"); end
      else void'(src.pop_front());
    end
    if (resp_valid) begin
      got.push_back(resp_data);
      if (resp_miss) got_miss = 1;
      if (resp_last) got_done = 1;
    end
  end

  always @(negedge clk) begin
    src_gap  <= ($urandom_range(0, 9) < 2);
    stall_wr <= ($urandom_range(0, 9) < 3);
    stall_rd <= ($urandom_range(0, 9) < 3);
  end

  // send a request and compare the answer
  task automatic ask(input logic [47:0] tag, input bit exp_hit, input logic [255:0] exp[$]);
    while (!req_ready) @(posedge clk);
    #1;
    got.delete(); got_miss = 0; got_done = 0;
    req_valid = 1; req_tag = tag;
    @(posedge clk); #1 req_valid = 0;
    while (!got_done) @(posedge clk);
    #1;
    checks++;
    if (exp_hit) begin
      n_hit++;
      if (got_miss || got.size() != exp.size()) begin
        failures++; $display("FAIL tag %h: %0d words miss=%0b, exp %0d", tag, got.size(), got_miss, exp.size());
      end else foreach (exp[i]) begin
        checks++;
        if (got[i] !== exp[i]) begin failures++; $display("FAIL tag %h word %0d", tag, i); end
      end
    end else begin
      n_miss++;
      if (!got_miss || got.size() != 1) begin failures++; $display("FAIL tag %h: expected miss", tag); end
    end
  endtask

  function automatic bit spans(int e);
    return ev_start[e] / MSZ != (ev_start[e] + ev_words[e].size() - 1) / MSZ;
  endfunction

  function automatic logic [255:0] rnd256();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    automatic int wp = 0;
    for (int e = 0; e < NEV; e++) begin
      automatic int nr = $urandom_range(0, 12);
      automatic logic [255:0] h = rnd256();
      // every tenth event repeats the tag of an earlier one
      ev_tag[e] = (e % 10 == 9) ? ev_tag[e - 4] : {16'h7A60, 32'(e * 13 + 5)};
      h[251:204] = ev_tag[e];
      h[203:188] = 16'(nr);
      ev_start[e] = wp;
      ev_words[e].push_back(h);
      for (int r = 0; r < nr; r++) ev_words[e].push_back(rnd256());
      foreach (ev_words[e][i]) begin
        src.push_back(ev_words[e][i]);
        shadow[wp % MSZ] = ev_words[e][i];
        wp++;
      end
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // requests for recently stored events while writing goes on; an event
    // that crosses the end of the address range is asked for at once
    begin
      automatic int gap = 30, span_asked = -1;
      while (events_stored < NEV) begin
        @(posedge clk); #1;
        gap--;
        if (req_ready && events_stored > 0 && events_stored < NEV &&
            (gap <= 0 || (spans(int'(events_stored) - 1) && span_asked != int'(events_stored) - 1))) begin
          automatic int ns = int'(events_stored);
          automatic int e = (gap <= 0) ? ns - 1 - $urandom_range(0, 2) : ns - 1;
          automatic int newest;
          automatic logic [255:0] none[$];
          if (e < 0) e = ns - 1;
          if (spans(ns - 1)) begin e = ns - 1; span_asked = e; end
          newest = e;
          for (int k = e + 1; k < ns; k++) if (ev_tag[k][IB-1:0] == ev_tag[e][IB-1:0]) newest = k;
          if (spans(newest) && ev_tag[newest] == ev_tag[e]) n_wrap++;
          if (ev_tag[newest] == ev_tag[e] && int'(u_mem.n_writes) - ev_start[newest] <= MSZ)
            ask(ev_tag[e], 1, ev_words[newest]);
          else ask(ev_tag[e], 0, none);
          n_early++;
          gap = $urandom_range(20, 60);
        end
      end
    end
    repeat (20) @(posedge clk);
    checks++; if (src.size() != 0) begin failures++; $display("FAIL %0d words left", src.size()); end
    checks++; if (u_mem.n_writes != wp) begin failures++; $display("FAIL %0d writes, exp %0d", u_mem.n_writes, wp); end
    // every event after all writes
    for (int e = 0; e < NEV; e++) begin
      automatic int newest = e;
      automatic logic [255:0] exp[$];
      for (int k = e + 1; k < NEV; k++) if (ev_tag[k][IB-1:0] == ev_tag[e][IB-1:0]) newest = k;
      if (ev_tag[newest] == ev_tag[e] && wp - ev_start[newest] <= MSZ) begin
        for (int i = 0; i < ev_words[newest].size(); i++) exp.push_back(shadow[(ev_start[newest] + i) % MSZ]);
        if (spans(newest)) n_wrap++;
        ask(ev_tag[e], 1, exp);
      end else begin
        if (ev_tag[newest] == ev_tag[e]) n_stale++;
        ask(ev_tag[e], 0, exp);
      end
    end
    // tags never sent
    for (int k = 0; k < 8; k++) begin
      automatic logic [255:0] none[$];
      ask({16'h7A61, 32'(k)}, 0, none);
    end
    checks++; if (n_hit < 10 || n_miss < 20) begin failures++; $display("FAIL coverage hit %0d miss %0d", n_hit, n_miss); end
    checks++; if (n_wrap == 0) begin failures++; $display("FAIL no wrapping event requested"); end
    checks++; if (n_stale == 0) begin failures++; $display("FAIL no overwritten event requested"); end
    checks++; if (n_early < 5) begin failures++; $display("FAIL only %0d early requests", n_early); end
    checks++; if (events_stored != NEV) begin failures++; $display("FAIL events_stored %0d", events_stored); end
    $display("hits %0d misses %0d (overwritten %0d) wrapped %0d early %0d", n_hit, n_miss, n_stale, n_wrap, n_early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
