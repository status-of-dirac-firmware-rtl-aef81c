// channel_handler: the complete zero-suppression pipeline of one ADC
// channel, from samples to 252-bit rows in the channel FIFO.
//
//   adc_in -> zs_shift_register -> hit_preproc (12-bit mux) -> word_packer
//          -> channel FIFO (252 x 48)
//                 zs_pileup ----^
//
// Event windows: ew is the (delayed) event-window level. Its rising edge
// restarts the hit-time counter. Hits may start only while ew is high.
// After ew falls the channel waits until the hit in progress and its last
// row are in the FIFO, then closes the event: it pushes the number of
// rows, the number of hits and an overflow flag of that event into a
// small queue (EVQ_DEPTH entries) that the event builder reads through
// ev_ready / ev_pop. If that queue is full the close waits, and no new
// hit starts meanwhile. The FIFO sizes follow the design; the event
// bookkeeping is this implementation's way of telling the event builder
// how many rows belong to each event.
//
// A row that finds the channel FIFO full is dropped and the event's
// overflow flag is set.
module channel_handler
  import zs_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 48,
  parameter int unsigned EVQ_DEPTH  = 4,
  localparam int unsigned RW = $clog2(FIFO_DEPTH + 1)   // row count width
) (
  input  logic          clk,
  input  logic          rst,
  input  sample_t       adc_in,
  input  sample_t       thr,
  input  logic          ew,
  // channel FIFO read side (first word fall through)
  input  logic          rd_en,
  output row_t          rd_data,
  output logic          empty,
  // closed events
  output logic          ev_ready,
  output logic [RW-1:0] ev_rows,
  output logic [7:0]    ev_hits,
  output logic          ev_ovf,
  input  logic          ev_pop,
  // observation
  output hit_state_t    fsm_state,
  output pil_state_t    pil_state,
  output logic          hit_done,
  output logic          row_drop
);

  sample_t pipe_out, ew_time, time_cnt, word;
  sample_t hit_time, n_samples, peak_pos, max_peak;
  logic    peak_flag, thr_flag, thr_low, blind;
  logic    word_valid, word_last, pre_busy, pack_busy;
  row_t    row;
  logic    row_valid, fifo_full, fifo_drop, fifo_rderr;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  logic          ew_d, ew_rise, ew_fall, pending_close, close_ev, start_en;
  logic [RW-1:0] rows_cnt;
  logic [7:0]    hits_cnt;
  logic          ovf_evt;
  logic          evq_full, evq_empty, evq_drop, evq_rderr;
  logic [$clog2(EVQ_DEPTH+1)-1:0] evq_count;

  zs_shift_register u_sr (
    .clk, .adc_in, .thr, .pipe_out, .peak_flag, .thr_flag, .thr_low
  );

  zs_pileup u_pil (
    .clk, .rst, .peak_flag, .thr_flag, .pil_state, .blind
  );

  hit_preproc u_pre (
    .clk, .rst, .pipe_out, .peak_flag, .thr_flag, .thr_low, .blind,
    .start_en, .ew_time, .word, .word_valid, .word_last, .busy(pre_busy),
    .fsm_state, .hit_time, .n_samples, .peak_pos, .max_peak
  );

  word_packer u_pack (
    .clk, .rst, .word, .word_valid, .word_last, .row, .row_valid, .busy(pack_busy)
  );

  sync_fifo #(.WIDTH(ROW_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .wr_en(row_valid), .wr_data(row), .full(fifo_full),
    .rd_en, .rd_data, .empty, .count(fifo_count), .wr_drop(fifo_drop), .rd_err(fifo_rderr)
  );

  // ---- event window bookkeeping ----
  assign ew_rise  = ew && !ew_d;
  assign ew_fall  = !ew && ew_d;
  assign ew_time  = ew_rise ? '0 : time_cnt;
  assign start_en = ew && !pending_close;
  assign close_ev = pending_close && !pre_busy && !pack_busy && !evq_full;
  assign row_drop = row_valid && fifo_full;
  assign hit_done = word_last;

  always_ff @(posedge clk) begin
    if (rst) begin
      ew_d          <= 1'b0;
      time_cnt      <= '0;
      pending_close <= 1'b0;
      rows_cnt      <= '0;
      hits_cnt      <= '0;
      ovf_evt       <= 1'b0;
    end else begin
      ew_d <= ew;
      if (ew_rise)             time_cnt <= sample_t'(1);
      else if (time_cnt != '1) time_cnt <= time_cnt + 1'b1;

      if (close_ev) begin
        pending_close <= 1'b0;
        rows_cnt      <= '0;
        hits_cnt      <= '0;
        ovf_evt       <= 1'b0;
      end else begin
        if (ew_fall) pending_close <= 1'b1;
        if (row_valid && !fifo_full) rows_cnt <= rows_cnt + 1'b1;
        if (row_drop)                ovf_evt  <= 1'b1;
        if (word_last && hits_cnt != '1) hits_cnt <= hits_cnt + 1'b1;
      end
    end
  end

  logic [RW+8:0] evq_out;

  sync_fifo #(.WIDTH(RW + 9), .DEPTH(EVQ_DEPTH)) u_evq (
    .clk, .rst, .wr_en(close_ev), .wr_data({rows_cnt, hits_cnt, ovf_evt}), .full(evq_full),
    .rd_en(ev_pop), .rd_data(evq_out), .empty(evq_empty), .count(evq_count),
    .wr_drop(evq_drop), .rd_err(evq_rderr)
  );

  assign ev_ready = !evq_empty;
  assign {ev_rows, ev_hits, ev_ovf} = evq_out;

endmodule
