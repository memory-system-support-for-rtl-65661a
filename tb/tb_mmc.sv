// tb_mmc: end-to-end test of the memory controller at its default parameters.
//
// A behavioural DRAM (16-cycle read latency) sits behind the controller. The
// test plays the operating system (page table, remapping registers) and the
// processor (line fills and write-backs on the bus) and checks every returned
// line against values computed here from the test's own description of memory:
//  1. the unrolled random-access loop: two lines of random addresses into A[]
//     are flushed into a DCA address region, then the matching data lines are
//     read and must hold A[addr] packed densely (virtual-address IVs, 4-byte
//     objects), over many iterations;
//  2. a third address line evicts an IV line, which must be reloaded from the
//     backing memory; the address region reads back what was written;
//  3. plain IV remapping of 16-byte objects through an index vector held in
//     normal memory, four data lines per IV line; a scatter write-back; a
//     normal write to the vector that must invalidate the buffered IV line;
//  4. physical-address IVs with 8-byte objects (MTLB bypassed);
//  5. normal line fill and write-back, and an unmapped shadow access.
// The gather pipeline's rate is checked: with MTLB hits the first gathered word
// is requested six cycles after the bus request is accepted (two cycles to
// decode and check the IV buffer, then four pipeline stages) and one word is
// requested per cycle after that. Each mechanism must occur at least once.
module tb_mmc;
  import dca_pkg::*;

  localparam addr_t VBASE  = 32'h1000_0000;   // special virtual region
  localparam addr_t PT     = 32'h0010_0000;   // memory controller page table
  localparam int    NPAGES = 32;
  localparam int    NA     = 16384;           // A[] elements (4 bytes), 16 pages
  localparam addr_t B_PV   = 32'h0001_0000;   // B[] (16-byte objects) at page 16

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

  // mechanism counters
  int n_capture, n_ivhit, n_ivmiss, n_mtlbmiss, n_gather, n_scatter, n_aread, n_unmapped;
  int n_normal, n_shadow, n_multiword, n_bypass, n_snoop_inv, n_rate_ok;
  always @(posedge clk) begin
    if (ev.iv_capture) n_capture++;
    if (ev.iv_hit)     n_ivhit++;
    if (ev.iv_miss)    n_ivmiss++;
    if (ev.mtlb_miss)  n_mtlbmiss++;
    if (ev.gather)     n_gather++;
    if (ev.scatter)    n_scatter++;
    if (ev.addr_read)  n_aread++;
    if (ev.unmapped)   n_unmapped++;
    if (shadow_access) n_shadow++;
    if (bus_req_valid && bus_req_ready && !shadow_access) n_normal++;
  end

  // gather request monitor on the DRAM port
  longint t_acc, t_first, t_last;
  int     n_greq;
  always @(posedge clk) begin
    if (bus_req_valid && bus_req_ready) begin
      t_acc  <= cyc;
      n_greq <= 0;
    end else begin
      automatic int n = 0;
      for (int c = 0; c < 4; c++)
        if (mem_req_valid[c] && mem_req_ready[c] && mem_req[c].id[10:9] == K_GATHER) n++;
      if (n > 0) begin
        if (n_greq == 0) t_first <= cyc;
        t_last <= cyc;
        n_greq <= n_greq + n;
      end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic cfg(int s, cfg_field_e f, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_set = 3'(s); cfg_field = f; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic logic [31:0] ctrl(bit dca, int alog, int olog, iv_kind_e k);
    return {22'd0, k, 3'(olog), 3'(alog), dca, 1'b1};
  endfunction

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

  // ---------------- the test's own picture of memory
  function automatic addr_t ppage(int vpn);   // physical page of a pseudo-virtual page
    return addr_t'(32'h0200_0000 + vpn * 3 * 4096);
  endfunction
  function automatic addr_t pv2pa(addr_t pv);
    return ppage(int'(pv >> 12)) | {20'd0, pv[11:0]};
  endfunction
  function automatic logic [31:0] aval(int i);
    return 32'(i) * 32'd2654435761 ^ 32'h0BAD_F00D;
  endfunction
  function automatic logic [63:0] bval(addr_t pv);
    return {pv ^ 32'h5555_0000, pv * 32'd7};
  endfunction

  line_t rl, wl;
  int    idx [2][32];
  int    it;

  task automatic write_addr_line(int set_line, addr_t abase, int seed);
    for (int k = 0; k < 32; k++) begin
      idx[set_line % 2][k] = int'($urandom_range(NA - 1));
      wl[k*32 +: 32] = VBASE + 32'(idx[set_line % 2][k] * 4);
    end
    bus(1, abase + addr_t'(set_line * 128), wl, rl);
  endtask

  task automatic check_data_line(int set_line, addr_t dbase, string tag);
    bit ok = 1;
    bus(0, dbase + addr_t'(set_line * 128), '0, rl);
    for (int k = 0; k < 32; k++)
      if (rl[k*32 +: 32] !== aval(idx[set_line % 2][k])) ok = 0;
    check(ok, $sformatf("%s: gathered line %0d", tag, set_line));
  endtask

  initial begin
    // watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_req_valid = 0; bus_req = '0; cfg_we = 0; cfg_set = 0; cfg_field = F_CTRL; cfg_wdata = 0;
    {n_capture, n_ivhit, n_ivmiss, n_mtlbmiss, n_gather, n_scatter, n_aread, n_unmapped} = '0;
    {n_normal, n_shadow, n_multiword, n_bypass, n_snoop_inv, n_rate_ok} = '0;
    // page table and data
    for (int v = 0; v < NPAGES; v++) dram.poke32(PT + addr_t'(v * 4), ppage(v) | 32'h1);
    for (int i = 0; i < NA; i++) dram.poke32(pv2pa(addr_t'(i * 4)), aval(i));
    for (int j = 0; j < 64; j++) begin
      automatic addr_t pv = B_PV + addr_t'(j * 16);
      dram.poke(pv2pa(pv), bval(pv));
      dram.poke(pv2pa(pv + 8), bval(pv + 8));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    cfg(0, F_PTBASE, PT);
    // set 0: DCA, virtual-address IV, 4-byte objects, three lines
    cfg(0, F_DATABASE, 32'h8000_0000);
    cfg(0, F_ADDRBASE, 32'h9000_0000);
    cfg(0, F_IVPA,     32'h0020_0000);
    cfg(0, F_NELEMS,   96);
    cfg(0, F_VBASE,    VBASE);
    cfg(0, F_CTRL,     ctrl(1, 2, 2, IV_VIRT));

    // ---- 1. unroll-and-jam random access loop
    write_addr_line(0, 32'h9000_0000, 0);
    for (it = 0; it < 12; it++) begin
      write_addr_line(1, 32'h9000_0000, 1);
      check_data_line(0, 32'h8000_0000, "loop");
      write_addr_line(0, 32'h9000_0000, 0);
      check_data_line(1, 32'h8000_0000, "loop");
    end
    // rate: repeat a gather whose pages are now in the MTLB
    begin
      for (int k = 0; k < 32; k++) begin
        idx[0][k] = k * 3;
        wl[k*32 +: 32] = VBASE + 32'(k * 12);
      end
      bus(1, 32'h9000_0000, wl, rl);
      check_data_line(0, 32'h8000_0000, "rate warm-up");
      check_data_line(0, 32'h8000_0000, "rate");
      check(t_first - t_acc == 6, $sformatf("first gather request %0d cycles after accept, expected 6",
                                            t_first - t_acc));
      check(n_greq == 32 && t_last - t_first == 31,
            $sformatf("32 gather requests on consecutive cycles (got %0d over %0d cycles)",
                      n_greq, t_last - t_first + 1));
      if (t_first - t_acc == 6 && t_last - t_first == 31) n_rate_ok++;
    end

    // ---- 2. IV eviction and reload, address-region read
    begin
      int miss0;
      write_addr_line(0, 32'h9000_0000, 0);
      write_addr_line(1, 32'h9000_0000, 1);
      for (int k = 0; k < 32; k++) wl[k*32 +: 32] = VBASE + 32'(k * 4);
      bus(1, 32'h9000_0000 + 256, wl, rl);          // line 2 evicts line 0
      miss0 = n_ivmiss;
      check_data_line(0, 32'h8000_0000, "reload");
      check(n_ivmiss == miss0 + 1, "evicted IV line reloaded from memory");
      bus(0, 32'h9000_0000 + 256, '0, rl);
      check(rl == wl, "address region reads back its addresses");
      bus(0, 32'h0020_0000 + 256, '0, rl);
      check(rl == wl, "address line also stored in backing memory");
    end

    // ---- 3. plain IV remapping, 16-byte objects through an index vector
    begin
      int bidx [32];
      line_t ivl;
      bit ok;
      for (int k = 0; k < 32; k++) begin
        bidx[k] = (k * 13 + 5) % 64;
        ivl[k*32 +: 32] = 32'(bidx[k]);
      end
      bus(1, 32'h0030_0000, ivl, rl);               // vector written by the program
      cfg(2, F_DATABASE, 32'hA000_0000);
      cfg(2, F_IVPA,     32'h0030_0000);
      cfg(2, F_NELEMS,   32);
      cfg(2, F_OBJPV,    B_PV);
      cfg(2, F_CTRL,     ctrl(0, 2, 4, IV_INDEX));
      for (int d = 0; d < 4; d++) begin
        bus(0, 32'hA000_0000 + addr_t'(d * 128), '0, rl);
        ok = 1;
        for (int e = 0; e < 8; e++) begin
          automatic addr_t pv = B_PV + addr_t'(bidx[d*8 + e] * 16);
          if (rl[e*128 +: 64] !== bval(pv) || rl[e*128 + 64 +: 64] !== bval(pv + 8)) ok = 0;
        end
        check(ok, $sformatf("16-byte objects, data line %0d", d));
        if (ok) n_multiword++;
      end
      // scatter into data line 1
      for (int w = 0; w < 16; w++) wl[w*64 +: 64] = {32'hC0DE_0000 + 32'(w), 32'(w * 77)};
      bus(1, 32'hA000_0000 + 128, wl, rl);
      ok = 1;
      for (int e = 0; e < 8; e++) begin
        automatic addr_t pv = B_PV + addr_t'(bidx[8 + e] * 16);
        if (dram.peek(pv2pa(pv)) !== wl[e*128 +: 64] ||
            dram.peek(pv2pa(pv + 8)) !== wl[e*128 + 64 +: 64]) ok = 0;
      end
      check(ok, "scatter wrote each object to its own address");
      bus(0, 32'hA000_0000 + 128, '0, rl);
      check(rl == wl, "scattered line gathers back");
      // program rewrites its index vector through the normal path
      for (int k = 0; k < 32; k++) begin
        bidx[k] = 63 - k;
        ivl[k*32 +: 32] = 32'(bidx[k]);
      end
      begin
        automatic int miss0 = n_ivmiss;
        bus(1, 32'h0030_0000, ivl, rl);
        bus(0, 32'hA000_0000 + 384, '0, rl);
        if (n_ivmiss == miss0 + 1) n_snoop_inv++;
        check(n_ivmiss == miss0 + 1, "normal write to the vector invalidated the IV line");
      end
      ok = 1;
      for (int e = 0; e < 8; e++) begin
        automatic addr_t pv = B_PV + addr_t'(bidx[24 + e] * 16);
        if (dram.peek(pv2pa(pv)) !== rl[e*128 +: 64] ||
            dram.peek(pv2pa(pv + 8)) !== rl[e*128 + 64 +: 64]) ok = 0;
      end
      check(ok, "gather uses the rewritten vector");
    end

    // ---- 4. physical-address IV, 8-byte objects
    begin
      addr_t pa [32];
      bit ok;
      cfg(3, F_DATABASE, 32'hB000_0000);
      cfg(3, F_ADDRBASE, 32'hB800_0000);
      cfg(3, F_IVPA,     32'h0040_0000);
      cfg(3, F_NELEMS,   32);
      cfg(3, F_CTRL,     ctrl(1, 2, 3, IV_PHYS));
      for (int k = 0; k < 32; k++) begin
        pa[k] = 32'h0300_0000 + addr_t'($urandom_range(65535) * 8);
        wl[k*32 +: 32] = pa[k];
      end
      bus(1, 32'hB800_0000, wl, rl);
      for (int d = 0; d < 2; d++) begin
        automatic int m0 = n_mtlbmiss;
        bus(0, 32'hB000_0000 + addr_t'(d * 128), '0, rl);
        ok = 1;
        for (int e = 0; e < 16; e++)
          if (rl[e*64 +: 64] !== dram.peek(pa[d*16 + e])) ok = 0;
        check(ok, $sformatf("physical IV, data line %0d", d));
        check(n_mtlbmiss == m0, "physical IV does not use the MTLB");
        if (ok && n_mtlbmiss == m0) n_bypass++;
      end
    end

    // ---- 5. normal path and unmapped shadow access
    begin
      for (int w = 0; w < 16; w++) wl[w*64 +: 64] = {32'(w), 32'hFACE_0000 ^ 32'(w)};
      bus(1, 32'h0050_0080, wl, rl);
      bus(0, 32'h0050_0080, '0, rl);
      check(rl == wl, "normal write-back and fill");
      bus(0, 32'h0050_0100, '0, rl);
      check(rl[63:0] == dram.peek(32'h0050_0100) && rl[1023:960] == dram.peek(32'h0050_0178),
            "normal fill of untouched memory");
      bus(0, 32'hF000_0000, '0, rl);
      check(rl == '0, "unmapped shadow fill returns zeros");
    end

    // ---- every mechanism must have happened
    check(n_capture   > 0, "DCA write-back capture");
    check(n_ivhit     > 0, "IV buffer hit");
    check(n_ivmiss    > 0, "IV buffer miss / reload");
    check(n_mtlbmiss  > 0, "MTLB miss stall");
    check(n_gather    > 0, "gather");
    check(n_scatter   > 0, "scatter");
    check(n_aread     > 0, "address-region read");
    check(n_unmapped  > 0, "unmapped shadow access");
    check(n_normal    > 0, "normal access");
    check(n_multiword > 0, "multi-word objects");
    check(n_bypass    > 0, "physical IV bypass");
    check(n_snoop_inv > 0, "IV invalidation by normal write");
    check(n_rate_ok   > 0, "pipeline rate");
    $display("capture=%0d ivhit=%0d ivmiss=%0d mtlbmiss=%0d gather=%0d scatter=%0d aread=%0d unmapped=%0d normal=%0d shadow=%0d",
             n_capture, n_ivhit, n_ivmiss, n_mtlbmiss, n_gather, n_scatter, n_aread, n_unmapped,
             n_normal, n_shadow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
