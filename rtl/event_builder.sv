// event_builder: the 252-bit channel multiplexer with event header
// insertion and parity generation, feeding the whole event FIFO.
//
// The event tag arrives with each event window; ew_start pushes it into a
// small tag queue. When every channel has closed its oldest event and a
// tag is queued, the builder writes
//   1 header word:  payload[251 -: TAG_W]  event tag
//                   next 16 bits           total data rows of the event
//                   next N_CH x RW bits    rows of channel 0, 1, ... N_CH-1
//                   next N_CH bits         row-overflow flag of channel 0..N_CH-1
//                   remaining low bits     zero
//   then the rows of channel 0, channel 1, ... in FIFO order,
// and finally removes the event from every channel's queue and the tag
// queue. Every 256-bit output word is {parity[3:0], payload[251:0]}, with
// parity[i] the even parity of payload[63*i +: 63]. One word moves per
// clock; the builder stalls while the whole event FIFO is full.
// The multiplexer, the header and the parity come from the design; the
// header layout, the parity split and the channel order are this
// implementation's choices.
//
// hit_map shows, per channel, the hits of the event being built.
module event_builder
  import zs_pkg::*;
#(
  parameter int unsigned N_CH       = 20,
  parameter int unsigned FIFO_DEPTH = 48,
  parameter int unsigned TAG_W      = 48,
  parameter int unsigned TAGQ_DEPTH = 4,
  localparam int unsigned RW = $clog2(FIFO_DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               ew_start,
  input  logic [TAG_W-1:0]   event_tag,
  // channel side
  input  logic               ch_ev_ready [N_CH],
  input  logic [RW-1:0]      ch_rows     [N_CH],
  input  logic [7:0]         ch_hits     [N_CH],
  input  logic               ch_ovf      [N_CH],
  output logic               ch_ev_pop   [N_CH],
  input  row_t               ch_data     [N_CH],
  output logic               ch_rd       [N_CH],
  // whole event FIFO side
  output logic               evf_wr,
  output logic [EVW_W-1:0]   evf_data,
  input  logic               evf_full,
  // status
  output logic [7:0]         hit_map     [N_CH],
  output logic               tag_drop,
  output logic [31:0]        events_built
);

  localparam int unsigned CW = $clog2(N_CH);

  initial assert (TAG_W + 16 + N_CH * (RW + 1) <= ROW_W)
    else $error("event header does not fit in %0d bits", ROW_W);

  typedef enum logic [1:0] {IDLE, HEADER, DATA, DONE} eb_state_t;
  eb_state_t state;

  logic [CW-1:0]    ch;
  logic [RW-1:0]    remaining;
  logic             tagq_empty, tagq_full, tagq_rderr;
  logic [TAG_W-1:0] tag;
  logic [$clog2(TAGQ_DEPTH+1)-1:0] tagq_count;
  logic             all_ready;
  logic [15:0]      total_rows;
  row_t             header, payload;

  sync_fifo #(.WIDTH(TAG_W), .DEPTH(TAGQ_DEPTH)) u_tagq (
    .clk, .rst, .wr_en(ew_start), .wr_data(event_tag), .full(tagq_full),
    .rd_en(state == DONE), .rd_data(tag), .empty(tagq_empty), .count(tagq_count),
    .wr_drop(tag_drop), .rd_err(tagq_rderr)
  );

  always_comb begin
    all_ready  = 1'b1;
    total_rows = '0;
    for (int c = 0; c < int'(N_CH); c++) begin
      all_ready  &= ch_ev_ready[c];
      total_rows += 16'(ch_rows[c]);
    end
    header = '0;
    header[ROW_W-1 -: TAG_W] = tag;
    header[ROW_W-TAG_W-1 -: 16] = total_rows;
    for (int c = 0; c < int'(N_CH); c++) begin
      header[ROW_W-TAG_W-16-RW*c-1 -: RW] = ch_rows[c];
      header[ROW_W-TAG_W-16-RW*int'(N_CH)-c-1] = ch_ovf[c];
    end
  end

  // Output word and channel read strobes.
  always_comb begin
    evf_wr  = 1'b0;
    payload = header;
    for (int c = 0; c < int'(N_CH); c++) begin
      ch_rd[c]     = 1'b0;
      ch_ev_pop[c] = (state == DONE);
      hit_map[c]   = ch_ev_ready[c] ? ch_hits[c] : '0;
    end
    unique case (state)
      HEADER: evf_wr = !evf_full;
      DATA: begin
        payload = ch_data[ch];
        if (remaining != '0 && !evf_full) begin
          evf_wr    = 1'b1;
          ch_rd[ch] = 1'b1;
        end
      end
      default: ;
    endcase
    evf_data = {row_parity(payload), payload};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= IDLE;
      ch           <= '0;
      remaining    <= '0;
      events_built <= '0;
    end else begin
      unique case (state)
        IDLE:   if (all_ready && !tagq_empty) state <= HEADER;
        HEADER: if (!evf_full) begin
                  state     <= DATA;
                  ch        <= '0;
                  remaining <= ch_rows[0];
                end
        DATA: begin
          if (remaining == '0) begin
            if (ch == CW'(N_CH - 1)) begin
              state <= DONE;
            end else begin
              ch        <= ch + 1'b1;
              remaining <= ch_rows[ch + 1'b1];
            end
          end else if (!evf_full) begin
            remaining <= remaining - 1'b1;
          end
        end
        default: begin  // DONE: queues are popped this cycle
          state        <= IDLE;
          events_built <= events_built + 1'b1;
        end
      endcase
    end
  end

endmodule
