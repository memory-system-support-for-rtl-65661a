// tb_normal_path: random line write-backs and fills through the normal path
// into a behavioural DRAM that withholds ready at random. Checks every filled
// line against a line-level model of memory, the snoop pulse of each
// write-back, and the request count (sixteen word requests per line).
module tb_normal_path;
  import dca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, rsp_valid, snoop_valid;
  bus_req_t req;
  line_t rsp_line;
  addr_t snoop_addr;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  normal_path dut (.*);
  dram_model #(.LAT(16), .STALL_PCT(30), .REORDER(1)) dram (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp(mem_rsp)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  line_t model [8];
  int n_snoop = 0;
  addr_t last_snoop;
  always @(posedge clk) if (rst_n && snoop_valid) begin n_snoop++; last_snoop = snoop_addr; end

  function automatic line_t fill_line(addr_t a);
    line_t l;
    for (int w = 0; w < 16; w++) l[w*64 +: 64] = dram.fill(a + addr_t'(w * 8));
    return l;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 0; req = '0;
    for (int i = 0; i < 8; i++) model[i] = fill_line(32'h0123_0000 + addr_t'(i * 128));
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 200; r++) begin
      automatic int i = $urandom_range(7);
      automatic addr_t a = 32'h0123_0000 + addr_t'(i * 128);
      automatic bit we = $urandom_range(1);
      automatic int s0 = n_snoop;
      automatic int rd0 = dram.n_reads, wr0 = dram.n_writes;
      @(negedge clk);
      req_valid = 1; req.we = we; req.addr = a;
      for (int w = 0; w < 32; w++) req.wline[w*32 +: 32] = $urandom;
      if (we) model[i] = req.wline;
      while (!req_ready) @(negedge clk);
      @(negedge clk);
      req_valid = 0;
      while (!rsp_valid) @(negedge clk);
      if (!we) check(rsp_line == model[i], $sformatf("fill of line %0d", i));
      else     check(n_snoop == s0 + 1 && last_snoop == a, "snoop on write-back");
      check(we ? (dram.n_writes - wr0 == 16) : (dram.n_reads - rd0 == 16), "16 word requests");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
