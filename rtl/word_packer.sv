// word_packer: the 21 twelve-bit registers in front of a channel FIFO.
//
// Incoming 12-bit words fill slots 0..20 of a 252-bit row; slot 0 is the
// most significant 12 bits, so a row printed in hex reads in arrival
// order. A row is emitted when slot 20 is filled or when a word marked
// last (the end of a hit) arrives; then the next hit starts in slot 0.
// Slots not written in a partial row keep the words they held before,
// as in the FIFO dumps of the design; the end word of the hit marks
// where valid data stop. The 21 x 12-bit layout follows the design; the
// slot order and the flush of a partial row are this implementation's.
//
// Timing: row/row_valid are registered, one clock after the word that
// completes the row. busy is high while a row is being assembled or is
// leaving, so an event is not closed under it.
module word_packer
  import zs_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t word,
  input  logic    word_valid,
  input  logic    word_last,
  output row_t    row,
  output logic    row_valid,
  output logic    busy
);

  localparam int unsigned IW = $clog2(ROW_WORDS);

  sample_t       slots [ROW_WORDS];
  logic [IW-1:0] idx;

  always_ff @(posedge clk) begin
    if (rst) begin
      idx       <= '0;
      row_valid <= 1'b0;
      for (int i = 0; i < int'(ROW_WORDS); i++) slots[i] <= '0;
    end else begin
      row_valid <= 1'b0;
      if (word_valid) begin
        slots[idx] <= word;
        if (word_last || idx == IW'(ROW_WORDS - 1)) begin
          idx       <= '0;
          row_valid <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  // The emitted row is the slot registers one clock after the last write.
  always_comb begin
    for (int i = 0; i < int'(ROW_WORDS); i++)
      row[ROW_W - SAMPLE_W*(i+1) +: SAMPLE_W] = slots[i];
  end

  assign busy = (idx != '0) || row_valid;

endmodule
