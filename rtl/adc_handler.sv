// adc_handler: a group of CH channel handlers that share clock, reset
// and threshold. The 20-channel design instantiates ten of them with two
// channels each, matching the ten handler instances of the design's
// 20-channel firmware; the grouping has no logic of its own.
module adc_handler
  import zs_pkg::*;
#(
  parameter int unsigned CH         = 2,
  parameter int unsigned FIFO_DEPTH = 48,
  parameter int unsigned EVQ_DEPTH  = 4,
  localparam int unsigned RW = $clog2(FIFO_DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  sample_t       adc_in   [CH],
  input  sample_t       thr,
  input  logic          ew,
  input  logic          rd_en    [CH],
  output row_t          rd_data  [CH],
  output logic          empty    [CH],
  output logic          ev_ready [CH],
  output logic [RW-1:0] ev_rows  [CH],
  output logic [7:0]    ev_hits  [CH],
  output logic          ev_ovf   [CH],
  input  logic          ev_pop   [CH],
  output logic          hit_done [CH],
  output logic          row_drop [CH]
);

  for (genvar c = 0; c < int'(CH); c++) begin : g_ch
    hit_state_t fsm_state;
    pil_state_t pil_state;
    channel_handler #(.FIFO_DEPTH(FIFO_DEPTH), .EVQ_DEPTH(EVQ_DEPTH)) u_ch (
      .clk, .rst, .adc_in(adc_in[c]), .thr, .ew,
      .rd_en(rd_en[c]), .rd_data(rd_data[c]), .empty(empty[c]),
      .ev_ready(ev_ready[c]), .ev_rows(ev_rows[c]), .ev_hits(ev_hits[c]),
      .ev_ovf(ev_ovf[c]), .ev_pop(ev_pop[c]),
      .fsm_state, .pil_state, .hit_done(hit_done[c]), .row_drop(row_drop[c])
    );
  end

endmodule
