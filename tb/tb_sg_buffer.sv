// tb_sg_buffer: random byte-masked word writes and whole-line loads against a
// byte-level model of the line; checks the word read port and the line output
// after every write.
module tb_sg_buffer;
  import dca_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic line_we, word_we;
  line_t line_wdata, line;
  logic [3:0] word_idx, rd_idx;
  word_t word_wdata, rd_word;
  logic [7:0] word_strb;
  sg_buffer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  line_t m;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line_we = 0; word_we = 0; word_idx = 0; rd_idx = 0; word_wdata = 0; word_strb = 0;
    for (int w = 0; w < 32; w++) line_wdata[w*32 +: 32] = $urandom;
    @(negedge clk);
    line_we = 1; m = line_wdata;
    @(negedge clk);
    line_we = 0;
    check(line == m, "whole-line load");
    for (int r = 0; r < 1000; r++) begin
      if ($urandom_range(19) == 0) begin
        for (int w = 0; w < 32; w++) line_wdata[w*32 +: 32] = $urandom;
        line_we = 1; m = line_wdata;
      end else begin
        word_we = 1; word_idx = 4'($urandom); word_wdata = {$urandom, $urandom};
        word_strb = 8'($urandom);
        for (int b = 0; b < 8; b++)
          if (word_strb[b]) m[word_idx*64 + b*8 +: 8] = word_wdata[b*8 +: 8];
      end
      @(negedge clk);
      line_we = 0; word_we = 0;
      check(line == m, "line after write");
      rd_idx = 4'($urandom);
      #1;
      check(rd_word == m[rd_idx*64 +: 64], "word read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
