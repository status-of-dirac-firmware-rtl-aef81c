// dirac_top: data packaging firmware of a 20-channel calorimeter
// digitiser board, from ADC samples to the event store in the external
// DDR, and back out on a data request.
//
//   adc[0..19] -> 10 x adc_handler (2 x channel_handler each:
//                 shift register, pile-up logic, hit pre-processing,
//                 21 x 12-bit packer, 252 x 48 channel FIFO)
//              -> event_builder (252-bit mux, header, parity)
//              -> whole event FIFO (256 x 500)
//              -> event_store (DDR writes, tag index, data requests)
//              -> mem_* ports (DDR controller) and req_*/resp_* ports
//
// The event window ew and the event tag come from the link interface
// with each heartbeat: the tag is queued on the rising edge of ew, and
// the channels see ew through a 25-clock delay line. The threshold thr is
// a static setting. The DDR controller, the DDR and the link interface
// are outside this module: the event store talks to the controller over
// valid/ready write and read request ports with in-order read data, and
// to the link interface over a tag request port and a word stream with a
// last flag and a miss flag (see event_store). All logic runs on one
// clock, the ADC sample clock.
// Sizes follow the design; the event bookkeeping between channels and
// builder, the header layout, the parity split and the event store's
// ring buffer and tag index are this implementation's choices.
module dirac_top
  import zs_pkg::*;
#(
  parameter int unsigned N_CH       = 20,
  parameter int unsigned CH_PER_HDL = 2,
  parameter int unsigned CH_DEPTH   = 48,
  parameter int unsigned EVF_DEPTH  = 500,
  parameter int unsigned EW_DELAY   = 25,
  parameter int unsigned TAG_W      = 48,
  parameter int unsigned EVQ_DEPTH  = 4,
  parameter int unsigned ADDR_W     = 24,
  parameter int unsigned IDX_BITS   = 13,
  localparam int unsigned RW = $clog2(CH_DEPTH + 1)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  sample_t                adc      [N_CH],
  input  sample_t                thr,
  input  logic                   ew,
  input  logic [TAG_W-1:0]       event_tag,
  // DDR controller side
  output logic                   mem_wr_valid,
  input  logic                   mem_wr_ready,
  output logic [ADDR_W-1:0]      mem_wr_addr,
  output logic [EVW_W-1:0]       mem_wr_data,
  output logic                   mem_rd_valid,
  input  logic                   mem_rd_ready,
  output logic [ADDR_W-1:0]      mem_rd_addr,
  input  logic                   mem_rdata_valid,
  input  logic [EVW_W-1:0]       mem_rdata,
  // data requests from the link interface
  input  logic                   req_valid,
  output logic                   req_ready,
  input  logic [TAG_W-1:0]       req_tag,
  output logic                   resp_valid,
  output logic [EVW_W-1:0]       resp_data,
  output logic                   resp_last,
  output logic                   resp_miss,
  // status
  output logic [$clog2(EVF_DEPTH+1)-1:0] evf_count,
  // status
  output logic [7:0]             hit_map  [N_CH],
  output logic                   hit_done [N_CH],
  output logic                   row_drop [N_CH],
  output logic                   evf_full,
  output logic [31:0]            events_built,
  output logic [31:0]            events_stored,
  output logic                   tag_drop
);

  localparam int unsigned N_HDL = N_CH / CH_PER_HDL;

  initial assert (N_HDL * CH_PER_HDL == N_CH)
    else $error("N_CH must be a multiple of CH_PER_HDL");

  logic          ew_del, ew_q, ew_start;
  logic          ch_rd    [N_CH];
  row_t          ch_data  [N_CH];
  logic          ch_empty [N_CH];
  logic          ev_ready [N_CH];
  logic [RW-1:0] ev_rows  [N_CH];
  logic [7:0]    ev_hits  [N_CH];
  logic          ev_ovf   [N_CH];
  logic          ev_pop   [N_CH];
  logic          evf_wr, evf_drop, evf_rderr, evf_rd, evf_empty;
  logic [EVW_W-1:0] evf_wdata, evf_data;

  ew_delay #(.DELAY(EW_DELAY)) u_ewdel (.clk, .rst, .ew_in(ew), .ew_out(ew_del));

  always_ff @(posedge clk) begin
    if (rst) ew_q <= 1'b0;
    else     ew_q <= ew;
  end
  assign ew_start = ew && !ew_q;

  for (genvar h = 0; h < int'(N_HDL); h++) begin : g_hdl
    sample_t       a_in  [CH_PER_HDL];
    logic          rd    [CH_PER_HDL];
    row_t          dat   [CH_PER_HDL];
    logic          emp   [CH_PER_HDL];
    logic          rdy   [CH_PER_HDL];
    logic [RW-1:0] rows  [CH_PER_HDL];
    logic [7:0]    hits  [CH_PER_HDL];
    logic          ovf   [CH_PER_HDL];
    logic          pop   [CH_PER_HDL];
    logic          hd    [CH_PER_HDL];
    logic          rdrop [CH_PER_HDL];
    for (genvar k = 0; k < int'(CH_PER_HDL); k++) begin : g_map
      localparam int C = h * CH_PER_HDL + k;
      assign a_in[k]     = adc[C];
      assign rd[k]       = ch_rd[C];
      assign pop[k]      = ev_pop[C];
      assign ch_data[C]  = dat[k];
      assign ch_empty[C] = emp[k];
      assign ev_ready[C] = rdy[k];
      assign ev_rows[C]  = rows[k];
      assign ev_hits[C]  = hits[k];
      assign ev_ovf[C]   = ovf[k];
      assign hit_done[C] = hd[k];
      assign row_drop[C] = rdrop[k];
    end
    adc_handler #(.CH(CH_PER_HDL), .FIFO_DEPTH(CH_DEPTH), .EVQ_DEPTH(EVQ_DEPTH)) u_hdl (
      .clk, .rst, .adc_in(a_in), .thr, .ew(ew_del),
      .rd_en(rd), .rd_data(dat), .empty(emp),
      .ev_ready(rdy), .ev_rows(rows), .ev_hits(hits), .ev_ovf(ovf), .ev_pop(pop),
      .hit_done(hd), .row_drop(rdrop)
    );
  end

  event_builder #(.N_CH(N_CH), .FIFO_DEPTH(CH_DEPTH), .TAG_W(TAG_W), .TAGQ_DEPTH(EVQ_DEPTH + 4)) u_eb (
    .clk, .rst, .ew_start, .event_tag,
    .ch_ev_ready(ev_ready), .ch_rows(ev_rows), .ch_hits(ev_hits), .ch_ovf(ev_ovf),
    .ch_ev_pop(ev_pop), .ch_data, .ch_rd,
    .evf_wr, .evf_data(evf_wdata), .evf_full,
    .hit_map, .tag_drop, .events_built
  );

  sync_fifo #(.WIDTH(EVW_W), .DEPTH(EVF_DEPTH)) u_evf (
    .clk, .rst, .wr_en(evf_wr), .wr_data(evf_wdata), .full(evf_full),
    .rd_en(evf_rd), .rd_data(evf_data), .empty(evf_empty), .count(evf_count),
    .wr_drop(evf_drop), .rd_err(evf_rderr)
  );

  event_store #(.ADDR_W(ADDR_W), .IDX_BITS(IDX_BITS), .TAG_W(TAG_W)) u_store (
    .clk, .rst, .in_data(evf_data), .in_empty(evf_empty), .in_rd(evf_rd),
    .mem_wr_valid, .mem_wr_ready, .mem_wr_addr, .mem_wr_data,
    .mem_rd_valid, .mem_rd_ready, .mem_rd_addr, .mem_rdata_valid, .mem_rdata,
    .req_valid, .req_ready, .req_tag, .resp_valid, .resp_data, .resp_last, .resp_miss,
    .events_stored
  );

endmodule
