// tb_adc_handler: two channels with different pulse trains and a shared
// threshold and event window. For each channel the closed events (rows,
// hits) and all FIFO rows are compared with the reference model, which
// also shows that the two channels do not disturb each other.
`timescale 1ns/1ps
module tb_adc_handler;
  import zs_pkg::*;
  import zs_ref_pkg::*;

  localparam int N = 2500;
  logic clk = 0, rst = 1, ew = 0;
  sample_t adc_in[2], thr = 12'd350;
  logic rd_en[2], empty[2], ev_ready[2], ev_ovf[2], ev_pop[2], hit_done[2], row_drop[2];
  row_t rd_data[2];
  logic [5:0] ev_rows[2];
  logic [7:0] ev_hits[2];

  adc_handler dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit rst_s[]; s_t a0[], a1[]; bit ew_s[];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(10 * (N + 2000)); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic s_t stim(int ch, int k);
    int v = 120;
    for (int i = 0; i < 12; i++) v += pulse_at(k, 180 + i * 170 + ch * (37 + 11 * i), 500 + 211 * ((i + ch) % 7), 0);
    return s_t'((v > 4095) ? 4095 : v);
  endfunction

  initial begin
    rst_s = new[N]; a0 = new[N]; a1 = new[N]; ew_s = new[N];
    rd_en = '{0, 0}; ev_pop = '{0, 0};
    for (int k = 0; k < N; k++) begin
      rst = (k < 30);
      adc_in[0] = stim(0, k); adc_in[1] = stim(1, k);
      ew = (k >= 100 && k < 900) || (k >= 1000 && k < 2300);
      @(posedge clk);
      rst_s[k] = rst; a0[k] = adc_in[0]; a1[k] = adc_in[1]; ew_s[k] = ew;
      #1;
    end
    for (int c = 0; c < 2; c++) begin
      automatic ZsRef m = new();
      if (c == 0) m.run(rst_s, a0, ew_s, thr, -1); else m.run(rst_s, a1, ew_s, thr, -1);
      check(m.ev_row_end.size() == 2, $sformatf("ch%0d two events", c));
      for (int ev = 0; ev < m.ev_row_end.size(); ev++) begin
        automatic int first = (ev == 0) ? 0 : m.ev_row_end[ev-1];
        check(ev_ready[c] === 1'b1, "event ready");
        check(int'(ev_rows[c]) == m.ev_row_end[ev] - first, $sformatf("ch%0d ev%0d rows %0d", c, ev, ev_rows[c]));
        check(int'(ev_hits[c]) == m.ev_hits[ev], $sformatf("ch%0d ev%0d hits %0d exp %0d", c, ev, ev_hits[c], m.ev_hits[ev]));
        check(ev_ovf[c] === 1'b0, "no overflow");
        @(negedge clk); ev_pop[c] = 1; @(negedge clk); ev_pop[c] = 0;
      end
      for (int r = 0; r < m.rows.size(); r++) begin
        check(!empty[c] && rd_data[c] == m.rows[r], $sformatf("ch%0d row %0d", c, r));
        @(negedge clk); rd_en[c] = 1; @(negedge clk); rd_en[c] = 0;
      end
      check(empty[c] === 1'b1, "FIFO drained");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
