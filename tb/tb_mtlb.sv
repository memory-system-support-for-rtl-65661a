// tb_mtlb: drives pseudo-virtual addresses into the MTLB stage and plays the
// memory controller page table (PTE = physical page number in bits [31:12],
// answered after a few cycles). A reference model of a 64-set, 4-way TLB with
// per-set round-robin replacement predicts every hit and miss; the test checks
// each translated address, the number of page-table reads, that hits stream at
// one per cycle after a one-cycle lookup, that bypass requests pass through
// untranslated, and that flush empties the TLB.
module tb_mtlb;
  import dca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush, in_valid, in_ready, in_bypass, out_valid, out_ready;
  logic pte_req_valid, pte_req_ready, pte_rsp_valid, miss_pulse;
  addr_t pt_base, in_addr, out_pa, pte_req_addr;
  logic [7:0] in_tag, out_tag;
  word_t pte_rsp_data;
  mtlb #(.ENTRIES(256), .WAYS(4), .TAG_W(8)) dut (.*);

  localparam addr_t PT = 32'h0080_0000;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [19:0] ppn_of(logic [19:0] vpn);
    return vpn ^ 20'h5A5A5;
  endfunction

  // page-table responder
  int pte_reads = 0;
  initial begin
    pte_rsp_valid = 0; pte_rsp_data = '0;
    forever begin
      @(posedge clk);
      if (rst_n && pte_req_valid && pte_req_ready) begin
        automatic addr_t a = pte_req_addr;
        pte_reads++;
        repeat (4) @(posedge clk);
        @(negedge clk);
        pte_rsp_valid = 1;
        // the two 32-bit PTEs in this word
        pte_rsp_data = {ppn_of(20'(((a - PT) >> 2) + 1)), 12'h001,
                        ppn_of(20'((a - PT) >> 2)), 12'h001};
        @(negedge clk);
        pte_rsp_valid = 0;
      end
    end
  end
  assign pte_req_ready = 1'b1;

  // reference TLB
  logic [19:0] r_vpn [64][4];
  bit          r_vld [64][4];
  int          r_rr  [64];
  int          exp_miss = 0;
  function automatic void ref_access(logic [19:0] vpn);
    int s = int'(vpn[5:0]);
    for (int w = 0; w < 4; w++) if (r_vld[s][w] && r_vpn[s][w] == vpn) return;
    exp_miss++;
    r_vpn[s][r_rr[s]] = vpn; r_vld[s][r_rr[s]] = 1; r_rr[s] = (r_rr[s] + 1) % 4;
  endfunction

  typedef struct { addr_t pa; logic [7:0] t; } exp_t;
  exp_t q[$];
  int n_miss = 0, n_out = 0;
  longint cyc = 0, t_out_first = 0, t_out_last = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) begin
    if (miss_pulse) n_miss++;
    if (in_valid && in_ready) begin
      exp_t e;
      if (in_bypass) e.pa = in_addr;
      else begin
        ref_access(in_addr[31:12]);
        e.pa = {ppn_of(in_addr[31:12]), in_addr[11:0]};
      end
      e.t = in_tag;
      q.push_back(e);
    end
    if (out_valid && out_ready) begin
      automatic exp_t e = q.pop_front();
      check(out_pa == e.pa && out_tag == e.t, $sformatf("translation of tag %0d at %0d: %h %h exp %h %h q=%0d", e.t, cyc, out_pa, out_tag, e.pa, e.t, q.size()));
      if (n_out == 0) t_out_first = cyc;
      t_out_last = cyc;
      n_out++;
    end
  end

  bit rand_bp = 0;
  always @(negedge clk) if (rand_bp) out_ready = ($urandom_range(3) != 0);

  task automatic send(addr_t a, bit byp);
    @(negedge clk);
    in_valid = 1; in_addr = a; in_bypass = byp; in_tag = 8'($urandom);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; in_valid = 0; in_addr = 0; in_bypass = 0; in_tag = 0; out_ready = 1; pt_base = PT;
    for (int s = 0; s < 64; s++) begin r_rr[s] = 0; for (int w = 0; w < 4; w++) r_vld[s][w] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 16 pages: misses, then a streamed pass of hits
    for (int p = 0; p < 16; p++) send({20'(p), 12'(p * 8)}, 0);
    repeat (10) @(negedge clk);
    n_out = 0;
    for (int p = 0; p < 16; p++) begin
      @(negedge clk);
      in_valid = 1; in_addr = {20'(p), 12'h7F8}; in_bypass = 0; in_tag = 8'(p);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(negedge clk);
    check(n_out == 16 && t_out_last - t_out_first == 15, "hits stream at one per cycle");
    // bypass
    begin
      automatic int m0 = n_miss;
      send(32'hDEAD_BEE0, 1);
      repeat (3) @(negedge clk);
      check(n_miss == m0, "bypass does not miss");
    end
    // random pages, conflicts in few sets, random back-pressure
    rand_bp = 1;
    for (int r = 0; r < 400; r++) begin
      automatic logic [19:0] vpn = {14'($urandom_range(0, 5)), 6'($urandom_range(0, 3))};
      send({vpn, 12'($urandom) & 12'hFFC}, 0);
    end
    rand_bp = 0;
    @(negedge clk);
    out_ready = 1;
    repeat (20) @(negedge clk);
    check(q.size() == 0, "all requests answered");
    check(n_miss == exp_miss, $sformatf("misses %0d, expected %0d", n_miss, exp_miss));
    check(pte_reads == exp_miss, "one page-table read per miss");
    // flush
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    for (int s = 0; s < 64; s++) for (int w = 0; w < 4; w++) r_vld[s][w] = 0;
    for (int p = 0; p < 4; p++) send({20'(p), 12'h0}, 0);
    repeat (20) @(negedge clk);
    check(n_miss == exp_miss, "flush: every page misses again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
