// zs_pileup: pile-up state machine of one channel.
//
// When a peak over threshold sits at position 17 the machine enters
// BLIND_TH and loads a counter with NBPEAKS (17); it counts down once per
// clock and returns to WAIT_PEAK at zero. blind is high while the peak
// travels from position 17 to position 0, including the cycle the peak is
// detected, so the end-of-hit condition cannot fire before the peak
// itself has been written. A second peak reloads the counter, which is
// what merges piled-up hits. The state names, the reload value and the
// countdown follow the design description; the exact cycle alignment of
// blind is this implementation's choice.
module zs_pileup
  import zs_pkg::*;
#(
  parameter int unsigned NB = NBPEAKS
) (
  input  logic clk,
  input  logic rst,
  input  logic peak_flag,
  input  logic thr_flag,
  output pil_state_t pil_state,
  output logic blind          // end-of-hit condition disabled
);

  logic [$clog2(NB+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      pil_state <= WAIT_PEAK;
    end else if (peak_flag && thr_flag) begin
      cnt       <= ($clog2(NB+1))'(NB);
      pil_state <= BLIND_TH;
    end else if (cnt == 0) begin
      pil_state <= WAIT_PEAK;
    end else begin
      cnt       <= cnt - 1'b1;
      pil_state <= (cnt == 1) ? WAIT_PEAK : BLIND_TH;
    end
  end

  assign blind = (peak_flag && thr_flag) || (cnt != 0);

endmodule
