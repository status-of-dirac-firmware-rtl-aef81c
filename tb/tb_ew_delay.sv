// tb_ew_delay: random event-window levels; the output must equal the
// input of 25 clocks earlier (0 during the first 25 clocks after reset).
`timescale 1ns/1ps
module tb_ew_delay;
  logic clk = 0, rst = 1, ew_in = 0, ew_out;
  bit hist[$];
  int checks = 0, failures = 0;
  ew_delay dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 2000; k++) begin
      ew_in = ($urandom_range(0, 9) < 5) ? ~ew_in : ew_in;
      @(posedge clk); hist.push_back(ew_in); #1;
      checks++;
      if (ew_out !== ((hist.size() >= 25) ? hist[hist.size()-25] : 1'b0)) begin
        failures++; $display("FAIL at %0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
