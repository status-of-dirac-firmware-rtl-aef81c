// event_store: writes complete events from the whole event FIFO into the
// external DDR and reads an event back when the link interface requests
// it by its tag.
//
// Write side: words are taken from the whole event FIFO (first word fall
// through) and written to consecutive DDR word addresses, wrapping at
// 2**ADDR_W (a ring buffer, so the oldest events are overwritten
// eventually). The write pointer carries LAP_W extra bits that count the
// laps, so the store can tell whether an indexed event is still intact. The first word of each event is its header; its total-row
// field tells how many words follow. When the last word of an event has
// been accepted by the memory, an index entry {tag, start address,
// length} is written into a direct-mapped table addressed by the low
// IDX_BITS bits of the tag; a later event with the same low bits replaces
// it. Only the valid bits of the table are reset, so the table itself can
// sit in block RAM.
// Read side: a request carries a tag. If the index entry for it is valid
// and holds that tag, the block issues one read per word of the event and
// forwards the returned words on resp_*, marking the last one; otherwise
// it answers with a single word flagged resp_miss. An event is also
// answered with a miss once more than 2**ADDR_W words have been written
// since its first word, because its start has then been overwritten.
// (A lap count that wraps, after 2**LAP_W laps, could make a very old
// entry look intact; writes that overtake an event while it is being
// read are not detected.) One request is served
// at a time; req_ready is high when the next may be given.
// Memory ports are valid/ready requests; read data return on
// mem_rdata_valid in request order, at least one clock after the request.
// Writes are held off during reset. mem_wr_data is the FIFO's output word
// itself: the FIFO holds it steady until the memory takes it.
// The store-then-retrieve-by-tag function and the 4 Gbit memory size
// (2**24 words of 256 bits) follow the design description; the ring
// buffer, the index table and the handshakes are this implementation's.
module event_store
  import zs_pkg::*;
#(
  parameter int unsigned ADDR_W   = 24,   // 4 Gbit / 256 bit
  parameter int unsigned IDX_BITS = 13,
  parameter int unsigned TAG_W    = 48,
  parameter int unsigned LAP_W    = 8
) (
  input  logic              clk,
  input  logic              rst,
  // whole event FIFO read side
  input  logic [EVW_W-1:0]  in_data,
  input  logic              in_empty,
  output logic              in_rd,
  // memory write channel
  output logic              mem_wr_valid,
  input  logic              mem_wr_ready,
  output logic [ADDR_W-1:0] mem_wr_addr,
  output logic [EVW_W-1:0]  mem_wr_data,
  // memory read channel
  output logic              mem_rd_valid,
  input  logic              mem_rd_ready,
  output logic [ADDR_W-1:0] mem_rd_addr,
  input  logic              mem_rdata_valid,
  input  logic [EVW_W-1:0]  mem_rdata,
  // data requests
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [TAG_W-1:0]  req_tag,
  output logic              resp_valid,
  output logic [EVW_W-1:0]  resp_data,
  output logic              resp_last,
  output logic              resp_miss,
  // status
  output logic [31:0]       events_stored
);

  localparam int unsigned NIDX = 1 << IDX_BITS;
  localparam int unsigned PW   = ADDR_W + LAP_W;   // write pointer with lap count

  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic [PW-1:0]     start;
    logic [16:0]       len;      // header + up to 65535 rows
  } idx_t;

  idx_t            idx_tab [NIDX];   // no reset: may map to block RAM
  logic [NIDX-1:0] idx_valid;

  // ---------------- write side ----------------
  logic              expect_hdr;
  logic [15:0]       left;
  logic [TAG_W-1:0]  cur_tag;
  logic [PW-1:0]     cur_start, wptr;
  logic [16:0]       cur_len;
  logic              wr_fire, ev_done;
  logic [15:0]       hdr_rows;

  assign mem_wr_valid = !in_empty && !rst;
  assign mem_wr_addr  = wptr[ADDR_W-1:0];
  assign mem_wr_data  = in_data;
  assign wr_fire      = mem_wr_valid && mem_wr_ready;
  assign in_rd        = wr_fire;
  assign hdr_rows     = in_data[ROW_W-TAG_W-1 -: 16];
  assign ev_done      = wr_fire && (expect_hdr ? (hdr_rows == '0) : (left == 16'd1));

  // index entry of the event being completed
  logic [IDX_BITS-1:0] wr_slot;
  idx_t                wr_entry;
  assign wr_slot  = expect_hdr ? in_data[ROW_W-TAG_W +: IDX_BITS] : cur_tag[IDX_BITS-1:0];
  assign wr_entry = expect_hdr ? '{in_data[ROW_W-1 -: TAG_W], wptr, 17'd1}
                               : '{cur_tag, cur_start, cur_len};

  always_ff @(posedge clk) begin
    if (rst) begin
      expect_hdr    <= 1'b1;
      left          <= '0;
      cur_tag       <= '0;
      cur_start     <= '0;
      cur_len       <= '0;
      wptr          <= '0;
      events_stored <= '0;
      idx_valid     <= '0;
    end else if (wr_fire) begin
      wptr <= wptr + 1'b1;
      if (expect_hdr) begin
        cur_tag    <= in_data[ROW_W-1 -: TAG_W];
        cur_start  <= wptr;
        cur_len    <= 17'(hdr_rows) + 17'd1;
        left       <= hdr_rows;
        expect_hdr <= (hdr_rows == '0);
      end else begin
        left       <= left - 1'b1;
        expect_hdr <= (left == 16'd1);
      end
      if (ev_done) begin
        events_stored <= events_stored + 1'b1;
        idx_valid[wr_slot] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk)
    if (!rst && ev_done) idx_tab[wr_slot] <= wr_entry;

  // ---------------- read side ----------------
  typedef enum logic [1:0] {R_IDLE, R_ISSUE, R_WAIT, R_MISS} rd_state_t;
  rd_state_t         rstate;
  idx_t              hit_e;
  logic              hit_v, intact;
  logic [PW-1:0]     age;
  logic [ADDR_W-1:0] raddr;
  logic [16:0]       to_issue, to_recv;

  assign hit_e        = idx_tab[req_tag[IDX_BITS-1:0]];
  assign hit_v        = idx_valid[req_tag[IDX_BITS-1:0]];
  assign age          = wptr - hit_e.start;           // words written since
  assign intact       = age <= PW'({1'b1, {ADDR_W{1'b0}}});
  assign req_ready    = (rstate == R_IDLE);
  assign mem_rd_valid = (rstate == R_ISSUE);
  assign mem_rd_addr  = raddr;

  always_ff @(posedge clk) begin
    if (rst) begin
      rstate   <= R_IDLE;
      raddr    <= '0;
      to_issue <= '0;
      to_recv  <= '0;
    end else begin
      unique case (rstate)
        R_IDLE: if (req_valid) begin
          if (hit_v && hit_e.tag == req_tag && intact) begin
            raddr    <= hit_e.start[ADDR_W-1:0];
            to_issue <= hit_e.len;
            to_recv  <= hit_e.len;
            rstate   <= R_ISSUE;
          end else begin
            rstate <= R_MISS;
          end
        end
        R_ISSUE: begin
          if (mem_rd_ready) begin
            raddr    <= raddr + 1'b1;
            to_issue <= to_issue - 1'b1;
            if (to_issue == 17'd1) rstate <= R_WAIT;
          end
          if (mem_rdata_valid) to_recv <= to_recv - 1'b1;
        end
        R_WAIT: if (mem_rdata_valid) begin
          to_recv <= to_recv - 1'b1;
          if (to_recv == 17'd1) rstate <= R_IDLE;
        end
        default: rstate <= R_IDLE;   // R_MISS: answer sent this cycle
      endcase
    end
  end

  // Returned words go straight out; the miss answer is one empty word.
  always_comb begin
    resp_miss = (rstate == R_MISS);
    resp_valid = resp_miss || (mem_rdata_valid && (rstate == R_ISSUE || rstate == R_WAIT));
    resp_data  = resp_miss ? '0 : mem_rdata;
    resp_last  = resp_miss || (resp_valid && to_recv == 17'd1);
  end

endmodule
