// sg_buffer: the shadow engine's one-line scatter/gather buffer.
//
// Gathered objects are packed densely into this 128-byte line as they return
// from memory, in whatever order they return: each write names a word of the
// line and a byte mask. When the line is complete the engine presents the whole
// line to the system bus. For a scatter (write-back into a data region) the
// buffer is first loaded with the whole line and then read word by word.
//
// Interface: byte-masked word write, whole-line write (takes priority),
// combinational word read and whole-line read. Held in flip-flops, one line.
module sg_buffer
  import dca_pkg::*;
(
  input  logic              clk,
  input  logic              line_we,
  input  line_t             line_wdata,
  input  logic              word_we,
  input  logic [WIDX_W-1:0] word_idx,
  input  word_t             word_wdata,
  input  logic [7:0]        word_strb,
  input  logic [WIDX_W-1:0] rd_idx,
  output word_t             rd_word,
  output line_t             line
);

  word_t mem [LINE_WORDS];

  always_ff @(posedge clk) begin
    if (line_we) begin
      for (int w = 0; w < LINE_WORDS; w++) mem[w] <= line_wdata[w*WORD_W +: WORD_W];
    end else if (word_we) begin
      for (int b = 0; b < WORD_BYTES; b++)
        if (word_strb[b]) mem[word_idx][b*8 +: 8] <= word_wdata[b*8 +: 8];
    end
  end

  assign rd_word = mem[rd_idx];

  always_comb
    for (int w = 0; w < LINE_WORDS; w++) line[w*WORD_W +: WORD_W] = mem[w];

endmodule
