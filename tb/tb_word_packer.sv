// tb_word_packer: random 12-bit words with random gaps and random hit
// ends; an independent slot model predicts every 252-bit row (slot 0 in
// the top bits, stale slots kept after a flush) and the clock it leaves.
`timescale 1ns/1ps
module tb_word_packer;
  import zs_pkg::*;
  logic clk = 0, rst = 1, word_valid = 0, word_last = 0, row_valid, busy;
  sample_t word = 0;
  row_t row;
  int checks = 0, failures = 0, nfull = 0, npart = 0;
  sample_t slots[21];
  int idx = 0;
  row_t exp_q[$];

  word_packer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // compare every emitted row with the expected one
  always @(posedge clk) if (!rst && row_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected row"); end
    else begin
      automatic row_t e = exp_q.pop_front();
      if (row !== e) begin failures++; $display("FAIL row %h exp %h", row, e); end
    end
  end

  initial begin
    foreach (slots[i]) slots[i] = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 4000; k++) begin
      word_valid = ($urandom_range(0, 3) != 0);
      word_last  = word_valid && ($urandom_range(0, 29) == 0);
      word = sample_t'($urandom);
      if (word_valid) begin
        slots[idx] = word;
        if (word_last || idx == 20) begin
          row_t r;
          for (int i = 0; i < 21; i++) r[251 - 12*i -: 12] = slots[i];
          exp_q.push_back(r);
          if (idx == 20) nfull++; else npart++;
          idx = 0;
        end else idx++;
      end
      @(posedge clk); #1;
    end
    word_valid = 0; word_last = 0;
    repeat (3) @(posedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d rows missing", exp_q.size()); end
    checks++; if (nfull == 0 || npart == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
