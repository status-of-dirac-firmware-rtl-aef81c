// tb_event_list: capacity test of the event store at its default sizes
// (2**24-word memory, 8192-entry tag index) for a list of 7000 events, the
// length of the high-occupancy event list the design is meant to hold.
// Events carry consecutive tags and 0 to 200 rows each (about 100 words on
// average, about 700,000 words in all), and arrive from a source that
// empties at random, while the memory stalls writes at random. Every word
// is a function of (event, word index), so nothing needs to be kept. Once all
// are stored, all 7000 events are requested in a shuffled order, and each
// answer must be a hit with exactly the event's words. A tag beyond the
// list must miss.
`timescale 1ns/1ps
module tb_event_list;
  localparam int NEV = 7000;
  logic clk = 0, rst = 1;
  logic [255:0] in_data;
  logic in_empty, in_rd;
  logic mem_wr_valid, mem_wr_ready, mem_rd_valid, mem_rd_ready, mem_rdata_valid;
  logic [23:0] mem_wr_addr, mem_rd_addr;
  logic [255:0] mem_wr_data, mem_rdata, resp_data;
  logic req_valid = 0, req_ready, resp_valid, resp_last, resp_miss;
  logic [47:0] req_tag = 0;
  logic [31:0] events_stored;
  logic src_gap = 0, stall_wr = 0, stall_rd = 0;

  event_store dut (.*);
  ddr_model #(.ADDR_W(24), .LAT(8)) u_mem (
    .clk, .stall_wr, .stall_rd,
    .wr_valid(mem_wr_valid), .wr_ready(mem_wr_ready), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .rd_valid(mem_rd_valid), .rd_ready(mem_rd_ready), .rd_addr(mem_rd_addr),
    .rdata_valid(mem_rdata_valid), .rdata(mem_rdata));
  always #5 clk = ~clk;

  int checks = 0, failures = 0, total_words = 0;
  int nrows[NEV];
  int src_ev = 0, src_w = 0;          // next word to offer
  int got_n;
  bit got_miss, got_done, got_bad;
  int cur_ev;

  function automatic logic [47:0] tag_of(int e);
    return {16'hE7E7, 32'(e)};
  endfunction

  function automatic logic [255:0] word_of(int e, int i);
    logic [255:0] w;
    if (i == 0) begin
      w = {4'hA, 252'(0)};
      w[251:204] = tag_of(e);
      w[203:188] = 16'(nrows[e]);
      w[31:0] = 32'(e * 2654435761);
    end else
      w = {32'(e), 32'(i), 32'(e * 40503 + i * 7919), 32'(i * 2654435761 ^ e),
           32'(e ^ 32'hC0FFEE00), 32'(i + 1), 32'(e + i), 32'(e * i)};
    return w;
  endfunction

  initial begin
    #100000000; failures++; $display("watchdog expired: stored %0d", events_stored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  assign in_empty = (src_ev >= NEV) || src_gap;
  assign in_data  = (src_ev >= NEV) ? '0 : word_of(src_ev, src_w);

  always @(posedge clk) if (!rst) begin
    if (in_rd) begin
      if (src_w == nrows[src_ev]) begin src_ev <= src_ev + 1; src_w <= 0; end
      else src_w <= src_w + 1;
    end
    if (resp_valid) begin
      if (resp_miss) got_miss = 1;
      else if (got_n > nrows[cur_ev] || resp_data !== word_of(cur_ev, got_n)) got_bad = 1;
      got_n++;
      if (resp_last) got_done = 1;
    end
  end

  always @(negedge clk) begin
    src_gap  <= ($urandom_range(0, 9) < 1);
    stall_wr <= ($urandom_range(0, 9) < 2);
    stall_rd <= ($urandom_range(0, 9) < 2);
  end

  task automatic ask(input int e, input logic [47:0] tag);
    while (!req_ready) @(posedge clk);
    #1;
    got_n = 0; got_miss = 0; got_done = 0; got_bad = 0; cur_ev = e;
    req_valid = 1; req_tag = tag;
    @(posedge clk); #1 req_valid = 0;
    while (!got_done) @(posedge clk);
    #1;
  endtask

  initial begin
    automatic int order[NEV];
    automatic int misses = 0, bad = 0;
    for (int e = 0; e < NEV; e++) begin
      nrows[e] = $urandom_range(0, 200);
      total_words += nrows[e] + 1;
      order[e] = e;
    end
    for (int e = NEV - 1; e > 0; e--) begin
      automatic int j = $urandom_range(0, e);
      automatic int t = order[e];
      order[e] = order[j]; order[j] = t;
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (events_stored == NEV);
    repeat (5) @(posedge clk);
    checks++; if (u_mem.n_writes != total_words) begin failures++; $display("FAIL %0d writes, exp %0d", u_mem.n_writes, total_words); end
    for (int k = 0; k < NEV; k++) begin
      automatic int e = order[k];
      ask(e, tag_of(e));
      checks++;
      if (got_miss || got_bad || got_n != nrows[e] + 1) begin
        failures++;
        if (failures < 10) $display("FAIL event %0d: miss=%0b bad=%0b words %0d exp %0d", e, got_miss, got_bad, got_n, nrows[e] + 1);
      end
    end
    ask(0, tag_of(NEV));
    checks++; if (!got_miss || got_n != 1) begin failures++; $display("FAIL tag beyond the list did not miss"); end
    $display("events %0d, words stored %0d, all fetched back", NEV, total_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
