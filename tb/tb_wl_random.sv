// tb_wl_random: the random-access microbenchmark, sum += A[random() % SIZE],
// run through the memory controller at its default parameters in its
// unroll-and-jam form: two 32-entry lines of the indirection vector are in
// flight, one being filled while the other's gathered data line is read.
//
// A[] has one million 4-byte floats (4 MB, 1024 pages of 4 KB), so the
// 256-entry MTLB (1 MB reach) misses often, as intended. The test plays the
// operating system (page table, remapping registers: 64-element DCA region,
// virtual-address vector, 4-byte objects) and the program: for each line it
// writes 32 random element addresses to the address region, reads the
// matching data line, checks every packed value against the DRAM model's
// content at the translated address, and accumulates the sum, which must
// equal the sum computed here directly. A[] is never preloaded: the DRAM
// model's untouched words read as a known function of their address.
// NACC accesses are made: two million, the size of the evaluated run (a
// multiple of 64). It reports cycles per gathered line and the MTLB miss rate.
// Then NACC5 more accesses run in the simple, not unrolled form: a
// 32-element region in another register set, whose one vector line is
// rewritten and gathered in turn.
module tb_wl_random;
  import dca_pkg::*;

  localparam int    NACC   = 2000000;         // random accesses, as evaluated
  localparam int    NACC5  = 65536;           // accesses in the simple form
  localparam int    NA     = 1 << 20;         // A[] elements
  localparam int    NPAGES = NA * 4 / 4096;
  localparam addr_t VBASE  = 32'h1000_0000;   // A[] in the special virtual region
  localparam addr_t PT     = 32'h0010_0000;   // memory controller page table
  localparam addr_t DREG   = 32'h8000_0000;   // aliasarray (data region)
  localparam addr_t AREG   = 32'h9000_0000;   // idxvector (address region)
  localparam addr_t IVPA   = 32'h0020_0000;   // memory behind idxvector

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       bus_req_valid, bus_req_ready, bus_rsp_valid;
  bus_req_t   bus_req;
  line_t      bus_rsp_line;
  logic       cfg_we;
  logic [2:0] cfg_set;
  cfg_field_e cfg_field;
  logic [31:0] cfg_wdata;
  logic       mem_req_valid [4], mem_req_ready [4], mem_rsp_valid [4], mem_rsp_ready [4];
  mem_req_t   mem_req [4];
  mem_rsp_t   mem_rsp [4];
  logic       shadow_access;
  shadow_ev_t ev;

  mmc dut (.*);
  dram_channels #(.LAT(16)) dram (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_ready(mem_rsp_ready), .rsp(mem_rsp)
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_capture, n_gather, n_mtlbmiss, n_ivhit;
  always @(posedge clk) if (rst_n) begin
    if (ev.iv_capture) n_capture++;
    if (ev.gather)     n_gather++;
    if (ev.mtlb_miss)  n_mtlbmiss++;
    if (ev.iv_hit)     n_ivhit++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic cfg(int s, cfg_field_e f, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_set = 3'(s); cfg_field = f; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic bus(bit we, addr_t a, line_t wl, output line_t rl);
    @(negedge clk);
    bus_req_valid = 1; bus_req.we = we; bus_req.addr = a; bus_req.wline = wl;
    do @(posedge clk); while (!bus_req_ready);
    @(negedge clk);
    bus_req_valid = 0;
    while (!bus_rsp_valid) @(posedge clk);
    rl = bus_rsp_line;
    #1;
  endtask

  // physical page behind each virtual page of A[] (scattered, not contiguous)
  function automatic addr_t ppage(int vpn);
    return addr_t'(32'h0100_0000 + ((vpn * 389) % NPAGES) * 4096);
  endfunction
  function automatic logic [31:0] a_val(int i);   // A[i] as DRAM holds it
    automatic addr_t pa = ppage(i >> 10) | addr_t'((i & 1023) * 4);
    automatic word_t w  = dram.peek(pa);
    return pa[2] ? w[63:32] : w[31:0];
  endfunction

  int idx [2][32];
  line_t rl, wl;
  logic [31:0] sum_dca, sum_ref;

  task automatic precompute(int half, addr_t areg = AREG);
    for (int k = 0; k < 32; k++) begin
      idx[half][k] = int'($urandom_range(NA - 1));
      wl[k*32 +: 32] = VBASE + 32'(idx[half][k] * 4);
    end
    bus(1, areg + addr_t'(half * 128), wl, rl);     // flush_cache_line
  endtask

  task automatic access(int half, addr_t dreg = DREG);
    bit ok = 1;
    bus(0, dreg + addr_t'(half * 128), '0, rl);     // load of aliasarray[...]
    for (int k = 0; k < 32; k++) begin
      automatic logic [31:0] ref_v = a_val(idx[half][k]);
      if (rl[k*32 +: 32] !== ref_v) ok = 0;
      sum_dca += rl[k*32 +: 32];
      sum_ref += ref_v;
    end
    check(ok, $sformatf("gathered line %0d", half));
  endtask

  initial begin
    repeat (40 * (NACC + NACC5) + 100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    bus_req_valid = 0; bus_req = '0; cfg_we = 0; cfg_set = 0; cfg_field = F_CTRL; cfg_wdata = 0;
    {n_capture, n_gather, n_mtlbmiss, n_ivhit} = '0;
    sum_dca = 0; sum_ref = 0;
    for (int v = 0; v < NPAGES; v++) dram.poke32(PT + addr_t'(v * 4), ppage(v));
    repeat (3) @(posedge clk);
    rst_n = 1;

    // setup_call(A, SIZE, 64, &aliasarray, &idxvector)
    cfg(0, F_PTBASE,   PT);
    cfg(0, F_DATABASE, DREG);
    cfg(0, F_ADDRBASE, AREG);
    cfg(0, F_IVPA,     IVPA);
    cfg(0, F_NELEMS,   64);
    cfg(0, F_VBASE,    VBASE);
    cfg(0, F_CTRL,     {22'd0, IV_VIRT, 3'd2, 3'd2, 1'b1, 1'b1});

    t0 = cyc;
    precompute(0);
    for (int i = 0; i < NACC / 64; i++) begin
      precompute(1);
      access(0);
      if (i < NACC / 64 - 1) precompute(0);
      access(1);
    end
    check(sum_dca == sum_ref, $sformatf("sum %h, expected %h", sum_dca, sum_ref));
    check(n_gather == NACC / 32, "one gather per data line");
    check(n_capture == NACC / 32, "one capture per address line");
    check(n_mtlbmiss > 0, "MTLB misses with A[] four times the MTLB reach");
    $display("unrolled: accesses=%0d cycles=%0d cycles/line=%0d mtlb misses=%0d (%0d%% of entries) iv hits=%0d",
             NACC, cyc - t0, (cyc - t0) / (NACC / 32), n_mtlbmiss, 100 * n_mtlbmiss / NACC, n_ivhit);

    // the simple form: setup_call(A, SIZE, 32, ...), one vector line reused
    cfg(1, F_DATABASE, DREG + 32'h0100_0000);
    cfg(1, F_ADDRBASE, AREG + 32'h0100_0000);
    cfg(1, F_IVPA,     IVPA + 32'h0001_0000);
    cfg(1, F_NELEMS,   32);
    cfg(1, F_VBASE,    VBASE);
    cfg(1, F_CTRL,     {22'd0, IV_VIRT, 3'd2, 3'd2, 1'b1, 1'b1});
    t0 = cyc;
    sum_dca = 0; sum_ref = 0;
    for (int i = 0; i < NACC5 / 32; i++) begin
      precompute(0, AREG + 32'h0100_0000);
      access(0, DREG + 32'h0100_0000);
    end
    check(sum_dca == sum_ref, $sformatf("simple form: sum %h, expected %h", sum_dca, sum_ref));
    check(n_gather == (NACC + NACC5) / 32, "simple form: one gather per data line");
    $display("simple: accesses=%0d cycles=%0d cycles/line=%0d", NACC5, cyc - t0, (cyc - t0) / (NACC5 / 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
