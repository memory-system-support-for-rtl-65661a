// tb_iv_buffer: fills IV lines by whole-line writes and by word writes, reads
// every word back (one-cycle read latency), and checks tag lookup, victim
// choice (same tag, then an invalid line, then round robin), invalidation by
// tag and flush against a model kept by the test.
module tb_iv_buffer;
  import dca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [24:0] lk_tag, inv_tag;
  logic lk_hit, alloc, line_we, word_we, rd_en, inv_en, flush;
  logic line_idx, word_line, rd_line, lk_line;
  line_t line_data;
  logic [3:0] word_idx, rd_idx;
  word_t word_data, rd_data;
  iv_buffer #(.IV_LINES(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t  m_data [2][16];
  logic [24:0] m_tag [2];
  bit     m_valid [2];
  int     m_rr;

  task automatic idle();
    alloc = 0; line_we = 0; word_we = 0; rd_en = 0; inv_en = 0; flush = 0;
  endtask

  function automatic int exp_line(logic [24:0] t, output bit h);
    h = 0;
    for (int i = 0; i < 2; i++) if (m_valid[i] && m_tag[i] == t) begin h = 1; return i; end
    for (int i = 0; i < 2; i++) if (!m_valid[i]) return i;
    return m_rr;
  endfunction

  // capture a line of addresses under tag t (lookup, alloc, line write)
  task automatic capture(logic [24:0] t);
    bit h; int l;
    @(negedge clk);
    lk_tag = t;
    #1;
    l = exp_line(t, h);
    check(lk_hit == h, "lookup hit");
    check(int'(lk_line) == l, "victim / hit line");
    alloc = 1; line_we = 1; line_idx = lk_line;
    for (int w = 0; w < 16; w++) begin
      m_data[l][w] = {$urandom, $urandom};
      line_data[w*64 +: 64] = m_data[l][w];
    end
    m_tag[l] = t; m_valid[l] = 1;
    if (!h) m_rr = (m_rr + 1) % 2;
    @(negedge clk);
    idle();
  endtask

  // load a line word by word under tag t (as from memory)
  task automatic load(logic [24:0] t);
    bit h; int l;
    @(negedge clk);
    lk_tag = t;
    #1;
    l = exp_line(t, h);
    check(int'(lk_line) == l, "victim line for load");
    alloc = 1;
    m_tag[l] = t; m_valid[l] = 1;
    if (!h) m_rr = (m_rr + 1) % 2;
    @(negedge clk);
    idle();
    for (int w = 15; w >= 0; w--) begin
      word_we = 1; word_line = 1'(l); word_idx = 4'(w);
      m_data[l][w] = {$urandom, $urandom};
      word_data = m_data[l][w];
      @(negedge clk);
    end
    idle();
  endtask

  task automatic read_all();
    for (int l = 0; l < 2; l++) if (m_valid[l])
      for (int w = 0; w < 16; w++) begin
        @(negedge clk);
        rd_en = 1; rd_line = 1'(l); rd_idx = 4'(w);
        @(negedge clk);
        rd_en = 0;
        check(rd_data == m_data[l][w], $sformatf("read line %0d word %0d", l, w));
      end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle(); lk_tag = 0; inv_tag = 0; line_idx = 0; word_line = 0; rd_line = 0;
    word_idx = 0; rd_idx = 0; line_data = '0; word_data = '0;
    m_valid = '{0, 0}; m_rr = 0; m_tag = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    capture(25'h100);
    capture(25'h101);
    read_all();
    capture(25'h100);           // same tag: overwritten in place
    read_all();
    load(25'h102);              // replaces by round robin
    read_all();
    capture(25'h103);
    read_all();
    // invalidation of one tag
    @(negedge clk);
    inv_en = 1; inv_tag = m_tag[0];
    m_valid[0] = 0;
    @(negedge clk);
    idle();
    lk_tag = m_tag[0];
    #1;
    check(!lk_hit, "invalidated line misses");
    check(lk_line == 1'b0, "invalid line chosen as victim");
    lk_tag = m_tag[1];
    #1;
    check(lk_hit && lk_line == 1'b1, "other line still hits");
    for (int r = 0; r < 20; r++) begin
      if ($urandom_range(1)) capture(25'($urandom_range(200, 203)));
      else                   load(25'($urandom_range(200, 203)));
      read_all();
    end
    @(negedge clk);
    flush = 1;
    @(negedge clk);
    idle();
    m_valid = '{0, 0};
    for (int t = 200; t < 204; t++) begin
      lk_tag = 25'(t);
      #1;
      check(!lk_hit, "flush empties the buffer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
