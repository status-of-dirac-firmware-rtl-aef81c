// tb_zs_pileup: drives random peak / over-threshold patterns and checks
// that blind is high exactly when a qualified peak was present in the
// current clock or in one of the previous 17, and that the state is
// BLIND_TH in the 17 clocks after the last qualified peak.
`timescale 1ns/1ps
module tb_zs_pileup;
  import zs_pkg::*;
  logic clk = 0, rst = 1, peak_flag = 0, thr_flag = 0, blind;
  pil_state_t pil_state;
  int checks = 0, failures = 0, last = -1000, reloads = 0;

  zs_pileup dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 5000; k++) begin
      automatic int r = $urandom_range(0, 99);
      peak_flag = (r < 6); thr_flag = (r < 4) || (r > 90);
      #1;
      checks++;
      if (blind !== ((peak_flag && thr_flag) || (k - last <= 17))) begin
        failures++; $display("FAIL blind at %0d (last peak %0d)", k, last);
      end
      checks++;
      if ((pil_state == BLIND_TH) !== (k - last <= 17 && k != last)) begin
        failures++; $display("FAIL state at %0d (last peak %0d)", k, last);
      end
      if (peak_flag && thr_flag) begin
        if (k - last <= 17) reloads++;
        last = k;
      end
      @(posedge clk); #1;
    end
    checks++; if (reloads == 0) begin failures++; $display("FAIL no reload seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
