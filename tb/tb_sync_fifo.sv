// tb_sync_fifo: random pushes and pops on a 48-deep, 252-bit FIFO and on
// a 500-deep, 256-bit FIFO (the channel and whole-event sizes), compared
// with a queue; checks data order, full/empty, count, and that writes on
// full are dropped and reported.
`timescale 1ns/1ps
module tb_sync_fifo;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic a_wr = 0, a_rd = 0, a_full, a_empty, a_drop, a_rderr;
  logic [251:0] a_wd = 0, a_rdat;
  logic [5:0] a_cnt;
  sync_fifo #(.WIDTH(252), .DEPTH(48)) dut_a (.clk, .rst, .wr_en(a_wr), .wr_data(a_wd), .full(a_full),
    .rd_en(a_rd), .rd_data(a_rdat), .empty(a_empty), .count(a_cnt), .wr_drop(a_drop), .rd_err(a_rderr));

  logic b_wr = 0, b_rd = 0, b_full, b_empty, b_drop, b_rderr;
  logic [255:0] b_wd = 0, b_rdat;
  logic [8:0] b_cnt;
  sync_fifo #(.WIDTH(256), .DEPTH(500)) dut_b (.clk, .rst, .wr_en(b_wr), .wr_data(b_wd), .full(b_full),
    .rd_en(b_rd), .rd_data(b_rdat), .empty(b_empty), .count(b_cnt), .wr_drop(b_drop), .rd_err(b_rderr));

  logic [255:0] qa[$], qb[$];
  int fulls_a = 0, fulls_b = 0, drops = 0;
  logic was_full;

  function automatic logic [255:0] rnd256();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 6000; k++) begin
      automatic int bias = (k / 1000) % 2;   // alternate fill-heavy and drain-heavy phases
      a_wr = ($urandom_range(0, 9) < (bias ? 7 : 3)); a_rd = ($urandom_range(0, 9) < (bias ? 3 : 7));
      b_wr = ($urandom_range(0, 9) < (bias ? 8 : 2)); b_rd = ($urandom_range(0, 9) < (bias ? 2 : 8));
      a_wd = rnd256(); b_wd = rnd256();
      #1;
      checks += 4;
      if (a_empty !== (qa.size() == 0) || a_full !== (qa.size() == 48) || a_cnt != qa.size()) begin failures++; $display("FAIL a flags %0d", k); end
      if (b_empty !== (qb.size() == 0) || b_full !== (qb.size() == 500) || b_cnt != qb.size()) begin failures++; $display("FAIL b flags %0d", k); end
      if (qa.size() > 0 && a_rdat !== qa[0][251:0]) begin failures++; $display("FAIL a data %0d", k); end
      if (qb.size() > 0 && b_rdat !== qb[0]) begin failures++; $display("FAIL b data %0d", k); end
      fulls_a += a_full; fulls_b += b_full;
      was_full = a_full;
      @(posedge clk);
      if (a_rd && qa.size() > 0) void'(qa.pop_front());
      if (a_wr && !was_full) qa.push_back({4'h0, a_wd});
      if (b_rd && qb.size() > 0) void'(qb.pop_front());
      if (b_wr && !b_full) qb.push_back(b_wd);
      #1;
      if (a_wr && was_full) begin checks++; drops++; if (!a_drop) begin failures++; $display("FAIL drop flag"); end end
    end
    checks++; if (fulls_a == 0 || fulls_b == 0 || drops == 0) begin failures++; $display("FAIL coverage %0d %0d %0d", fulls_a, fulls_b, drops); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
