// iv_buffer: small SRAM buffer that holds indirection-vector cache lines.
//
// IV_LINES lines of 128 bytes, each tagged with the real physical line address
// of the IV data it holds. Two lines are the default so that software can
// flush one line of addresses while the controller is still gathering through
// the other (unroll-and-jam). The buffer offers:
//  * a tag lookup (combinational) that also proposes a victim line: the line
//    that already holds the tag, else the first invalid line, else a
//    round-robin pointer (replacement policy is this design's choice);
//  * alloc: claims the victim for a tag and marks it valid;
//  * a whole-line write, used when a DCA write-back is captured;
//  * a word write, used while an IV line is loaded from memory;
//  * a registered word read (one cycle, like a synchronous SRAM);
//  * invalidation of a line by tag (a normal write to the IV's memory) and of
//    all lines (flush).
module iv_buffer
  import dca_pkg::*;
#(
  parameter int IV_LINES = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // lookup
  input  logic [PA_W-LINE_OFS-1:0]    lk_tag,
  output logic                        lk_hit,
  output logic [$clog2(IV_LINES)-1:0] lk_line,     // hit line, or victim on a miss
  // allocation of lk_line to lk_tag
  input  logic                        alloc,
  // whole-line write
  input  logic                        line_we,
  input  logic [$clog2(IV_LINES)-1:0] line_idx,
  input  line_t                       line_data,
  // word write
  input  logic                        word_we,
  input  logic [$clog2(IV_LINES)-1:0] word_line,
  input  logic [WIDX_W-1:0]           word_idx,
  input  word_t                       word_data,
  // registered word read
  input  logic                        rd_en,
  input  logic [$clog2(IV_LINES)-1:0] rd_line,
  input  logic [WIDX_W-1:0]           rd_idx,
  output word_t                       rd_data,
  // invalidation
  input  logic                        inv_en,
  input  logic [PA_W-LINE_OFS-1:0]    inv_tag,
  input  logic                        flush
);

  localparam int LW = $clog2(IV_LINES);

  word_t                    mem   [IV_LINES][LINE_WORDS];
  logic [PA_W-LINE_OFS-1:0] tag   [IV_LINES];
  logic [IV_LINES-1:0]      valid;
  logic [LW-1:0]            rr_ptr;

  always_comb begin
    logic found_inv;
    lk_hit    = 1'b0;
    lk_line   = rr_ptr;
    found_inv = 1'b0;
    for (int i = IV_LINES - 1; i >= 0; i--) begin
      if (!valid[i]) begin
        found_inv = 1'b1;
        if (!lk_hit) lk_line = i[LW-1:0];
      end
    end
    for (int i = 0; i < IV_LINES; i++) begin
      if (valid[i] && tag[i] == lk_tag) begin
        lk_hit  = 1'b1;
        lk_line = i[LW-1:0];
      end
    end
    if (!lk_hit && !found_inv) lk_line = rr_ptr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= '0;
      rr_ptr <= '0;
      for (int i = 0; i < IV_LINES; i++) tag[i] <= '0;
    end else begin
      if (inv_en) begin
        for (int i = 0; i < IV_LINES; i++)
          if (tag[i] == inv_tag) valid[i] <= 1'b0;
      end
      if (alloc) begin
        tag[lk_line]   <= lk_tag;
        valid[lk_line] <= 1'b1;
        if (!lk_hit)
          rr_ptr <= (32'(rr_ptr) == IV_LINES - 1) ? '0 : rr_ptr + 1'b1;
      end
      if (flush) valid <= '0;
    end
  end

  always_ff @(posedge clk) begin
    if (line_we)
      for (int w = 0; w < LINE_WORDS; w++)
        mem[line_idx][w] <= line_data[w*WORD_W +: WORD_W];
    else if (word_we)
      mem[word_line][word_idx] <= word_data;
    if (rd_en) rd_data <= mem[rd_line][rd_idx];
  end

endmodule
