// ddr_model: behavioural stand-in for the external DDR memory, used only
// by testbenches. Words are 256 bits wide and held in a sparse array, so
// the full 2**24-word address space costs nothing. Writes take effect on
// the clock edge where wr_valid and wr_ready are both high. A read request
// accepted on an edge returns its word LAT clocks later on rdata_valid,
// in request order. wr_ready and rd_ready drop when the stall inputs are
// high, which lets a testbench apply back-pressure.
module ddr_model #(
  parameter int unsigned ADDR_W = 24,
  parameter int unsigned LAT    = 6
) (
  input  logic              clk,
  input  logic              stall_wr,
  input  logic              stall_rd,
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [255:0]      wr_data,
  input  logic              rd_valid,
  output logic              rd_ready,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rdata_valid,
  output logic [255:0]      rdata
);
  logic [255:0] mem [int unsigned];
  logic         pv [LAT];
  logic [255:0] pd [LAT];
  int unsigned  n_writes = 0;
  int unsigned  n_reads  = 0;

  assign wr_ready    = !stall_wr;
  assign rd_ready    = !stall_rd;
  assign rdata_valid = pv[LAT-1];
  assign rdata       = pd[LAT-1];

  initial for (int i = 0; i < int'(LAT); i++) begin pv[i] = 1'b0; pd[i] = '0; end

  always @(posedge clk) begin
    for (int i = int'(LAT) - 1; i > 0; i--) begin
      pv[i] <= pv[i-1];
      pd[i] <= pd[i-1];
    end
    pv[0] <= rd_valid && rd_ready;
    pd[0] <= mem.exists(int'(rd_addr)) ? mem[int'(rd_addr)] : '0;
    if (rd_valid && rd_ready) n_reads++;
    if (wr_valid && wr_ready) begin
      mem[int'(wr_addr)] = wr_data;
      n_writes++;
    end
  end
endmodule
