// tb_event_builder: the 20-channel multiplexer against channel FIFOs and
// event queues modelled in the testbench. Each event gives every channel
// 0..5 random rows (some flagged as overflowed); channels close their
// events at random times and tags arrive separately. The whole event
// FIFO randomly reports full, and no word may be written then. Every
// output word is checked: the header fields, the rows in channel order
// and the four parity bits.
`timescale 1ns/1ps
module tb_event_builder;
  import zs_pkg::*;
  localparam int NC = 20, NEV = 40;
  logic clk = 0, rst = 1, ew_start = 0, evf_wr, evf_full = 0, tag_drop;
  logic [47:0] event_tag = 0;
  logic ch_ev_ready[NC], ch_ovf[NC], ch_ev_pop[NC], ch_rd[NC];
  logic [5:0] ch_rows[NC];
  logic [7:0] ch_hits[NC], hit_map[NC];
  row_t ch_data[NC];
  logic [255:0] evf_data;
  logic [31:0] events_built;

  event_builder dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, stalls = 0;
  // testbench channels: per channel a row queue and an event queue
  row_t rq[NC][$];
  int   erows[NC][$], ehits[NC][$];
  bit   eovf[NC][$];
  int   closed[NC];              // events closed so far per channel
  logic [255:0] expq[$];         // expected output words

  function automatic logic [3:0] par(row_t r);
    logic [3:0] p;
    for (int i = 0; i < 4; i++) p[i] = ^r[i*63 +: 63];
    return p;
  endfunction

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always_comb for (int c = 0; c < NC; c++) begin
    ch_ev_ready[c] = erows[c].size() > 0;
    ch_rows[c] = ch_ev_ready[c] ? 6'(erows[c][0]) : '0;
    ch_hits[c] = ch_ev_ready[c] ? 8'(ehits[c][0]) : '0;
    ch_ovf[c]  = ch_ev_ready[c] ? eovf[c][0] : 1'b0;
    ch_data[c] = (rq[c].size() > 0) ? rq[c][0] : '0;
  end

  // consume pops and reads, check written words
  always @(posedge clk) if (!rst) begin
    if (evf_wr) begin
      checks++;
      if (evf_full) begin failures++; $display("FAIL write while full"); end
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected word"); end
      else begin
        automatic logic [255:0] e = expq.pop_front();
        if (evf_data !== e) begin failures++; $display("FAIL word %h exp %h", evf_data, e); end
      end
    end
    if (evf_full) stalls++;
    for (int c = 0; c < NC; c++) begin
      if (ch_rd[c]) void'(rq[c].pop_front());
      if (ch_ev_pop[c]) begin void'(erows[c].pop_front()); void'(ehits[c].pop_front()); void'(eovf[c].pop_front()); end
    end
  end

  // random full
  always @(negedge clk) evf_full <= ($urandom_range(0, 9) < 3);

  // event data generation: all rows of event e are queued up front; a channel
  // "closes" event e (pushes its counts) at a random later time
  int pend_rows[NEV][NC], pend_hits[NEV][NC]; bit pend_ovf[NEV][NC];

  initial begin
    for (int e = 0; e < NEV; e++) begin
      automatic row_t hdr = '0;
      automatic int tot = 0;
      automatic logic [47:0] tag = {16'hCA10, 32'(e * 7 + 3)};
      automatic row_t rows[NC][$];
      for (int c = 0; c < NC; c++) begin
        pend_rows[e][c] = $urandom_range(0, 5);
        pend_hits[e][c] = $urandom_range(0, 3);
        pend_ovf[e][c]  = ($urandom_range(0, 15) == 0);
        tot += pend_rows[e][c];
        for (int r = 0; r < pend_rows[e][c]; r++) begin
          automatic row_t x = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
          rows[c].push_back(x);
          rq[c].push_back(x);
        end
      end
      hdr[251:204] = tag;
      hdr[203:188] = 16'(tot);
      for (int c = 0; c < NC; c++) begin
        hdr[187 - 6*c -: 6] = 6'(pend_rows[e][c]);
        hdr[67 - c] = pend_ovf[e][c];
      end
      expq.push_back({par(hdr), hdr});
      for (int c = 0; c < NC; c++) foreach (rows[c][r]) expq.push_back({par(rows[c][r]), rows[c][r]});
    end
    foreach (closed[c]) closed[c] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // tags arrive every 60 clocks, at most four events ahead; channels close events at random clocks
    fork
      for (int e = 0; e < NEV; e++) begin
        repeat (60) @(posedge clk);
        while (e - int'(events_built) >= 4) @(posedge clk);
        #1 event_tag = {16'hCA10, 32'(e * 7 + 3)}; ew_start = 1;
        @(posedge clk); #1 ew_start = 0;
      end
      for (int k = 0; k < 4000; k++) begin
        @(posedge clk); #2;
        for (int c = 0; c < NC; c++)
          if (closed[c] < NEV && erows[c].size() < 4 && $urandom_range(0, 29) == 0) begin
            erows[c].push_back(pend_rows[closed[c]][c]);
            ehits[c].push_back(pend_hits[closed[c]][c]);
            eovf[c].push_back(pend_ovf[closed[c]][c]);
            closed[c]++;
          end
      end
    join
    repeat (400) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL %0d words not written", expq.size()); end
    checks++; if (events_built != NEV) begin failures++; $display("FAIL events_built %0d", events_built); end
    checks++; if (stalls == 0) begin failures++; $display("FAIL no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
