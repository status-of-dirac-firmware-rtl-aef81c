// sync_fifo: single-clock first-word-fall-through FIFO of any depth.
//
// rd_data shows the oldest entry whenever empty is low; rd_en removes it.
// A write when full and a read when empty are ignored and reported on
// wr_drop / rd_err for one clock. Depth need not be a power of two (the
// whole event FIFO is 500 deep). count is the number of entries held.
// The storage is a plain array, which synthesis maps to block RAM with
// a read-through output register or to distributed RAM.
module sync_fifo #(
  parameter int unsigned WIDTH = 252,
  parameter int unsigned DEPTH = 48
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  output logic                       full,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       wr_drop,
  output logic                       rd_err
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr    <= '0;
      rptr    <= '0;
      count   <= '0;
      wr_drop <= 1'b0;
      rd_err  <= 1'b0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      count   <= count + CW'(do_wr) - CW'(do_rd);
      wr_drop <= wr_en && full;
      rd_err  <= rd_en && empty;
    end
  end

  assign rd_data = mem[rptr];

endmodule
