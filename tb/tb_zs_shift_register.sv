// tb_zs_shift_register: random and shaped samples through the 21-stage
// register; checks position 0 (the sample of 20 clocks earlier) and the
// peak, over-threshold and under-threshold flags against a history kept
// by the testbench.
`timescale 1ns/1ps
module tb_zs_shift_register;
  import zs_pkg::*;
  logic clk = 0;
  sample_t adc_in = 0, thr = 12'd300, pipe_out;
  logic peak_flag, thr_flag, thr_low;
  int checks = 0, failures = 0, npeaks = 0, nlow = 0;
  sample_t hist[$];

  zs_shift_register dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      // mixture of baseline, ramps, plateaus (ties) and random values
      case ((k / 50) % 4)
        0: adc_in = sample_t'(100 + $urandom_range(0, 20));
        1: adc_in = sample_t'(200 + 40 * ((k % 25 < 12) ? k % 25 : 25 - k % 25));
        2: adc_in = sample_t'((k % 7 < 3) ? 500 : 250);
        default: adc_in = sample_t'($urandom_range(0, 4095));
      endcase
      @(posedge clk);
      hist.push_front(adc_in);      // hist[0] = position 20
      if (hist.size() > 21) void'(hist.pop_back());
      #1;
      if (hist.size() == 21) begin
        // position p holds hist[20-p]
        automatic bit exp_peak = (hist[3] >= hist[2]) && (hist[3] >= hist[4]) && (hist[3] > hist[5]) && (hist[3] > hist[1]);
        automatic bit exp_thr  = hist[3] >= thr;
        automatic bit exp_low  = (hist[20] < thr) && (hist[19] < thr) && (hist[18] < thr) && (hist[17] < thr);
        checks++; if (pipe_out !== hist[20]) begin failures++; $display("FAIL pos0 at %0d", k); end
        checks++; if (peak_flag !== exp_peak) begin failures++; $display("FAIL peak at %0d", k); end
        checks++; if (thr_flag !== exp_thr) begin failures++; $display("FAIL thr at %0d", k); end
        checks++; if (thr_low !== exp_low) begin failures++; $display("FAIL low at %0d", k); end
        npeaks += exp_peak; nlow += exp_low;
      end
    end
    checks++; if (npeaks == 0 || nlow == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
