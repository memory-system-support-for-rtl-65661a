// tb_wl_fftw: the depth phase of a 3-D FFT on arrays of 16-byte complex
// elements, run through the memory controller at its default parameters, for
// the three input sizes 567 x 61 x 51, 576 x 57 x 31 and 576 x 7 x 11 (z first).
//
// Each array is row-major with z slowest, so walking along z strides by
// NY * NX * 16 bytes and touches a new cache line at every element. With
// dynamic cache line assembly each codelet instead writes the addresses of the
// next 32 elements of its z column (one line of the indirection vector) and
// reads them back packed, eight 16-byte elements per line, four data lines per
// vector line. It then writes its results back through the same data lines,
// which scatters them to their places in the array. Two vector lines are in
// flight (unroll-and-jam), in a 64-element DCA region with virtual-address
// entries. Where a column's length is not a multiple of 32 its last vector
// line is partial; the unused entries point at a scratch element.
//
// The transform itself is replaced by a fixed function (bitwise inversion):
// every gathered element is checked against the DRAM model's content, and at
// the end every element of the array must hold the inverted original value.
// Arrays are never preloaded: the DRAM model's untouched words read as a
// known function of their address. Between arrays the page table is rebuilt
// and the MTLB flushed. All columns of all three arrays are done.
module tb_wl_fftw;
  import dca_pkg::*;

  localparam int NRUN = 3;
  localparam int RNZ [NRUN] = '{567, 576, 576};
  localparam int RNY [NRUN] = '{61, 57, 7};
  localparam int RNX [NRUN] = '{51, 31, 11};
  localparam addr_t VBASE  = 32'h2000_0000;     // array in the special virtual region
  localparam addr_t PT     = 32'h0010_0000;     // memory controller page table
  localparam addr_t DREG   = 32'hC000_0000;     // data region, 64 x 16 bytes
  localparam addr_t AREG   = 32'hD000_0000;     // address region, 64 x 4 bytes
  localparam addr_t IVPA   = 32'h0020_0000;

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

  int n_capture, n_gather, n_scatter, n_mtlbmiss;
  always @(posedge clk) if (rst_n) begin
    if (ev.iv_capture) n_capture++;
    if (ev.gather)     n_gather++;
    if (ev.scatter)    n_scatter++;
    if (ev.mtlb_miss)  n_mtlbmiss++;
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

  // current array
  int    NZ, NY, NX, NEL, NPAGES, CPC, NCHUNK;
  addr_t PBASE;

  function automatic addr_t ppage(int vpn);    // scattered physical pages
    return PBASE + addr_t'((vpn ^ 13) * 8192);
  endfunction
  function automatic addr_t va2pa(addr_t va);
    automatic addr_t off = va - VBASE;
    return ppage(int'(off >> 12)) | (off & 32'hFFF);
  endfunction
  // element k of chunk c: column c / CPC, z from 32 * (c % CPC); -1 if unused
  function automatic int chunk_el(int c, int k);
    automatic int col = c / CPC;
    automatic int z   = (c % CPC) * 32 + k;
    return (z < NZ) ? z * NY * NX + col : -1;
  endfunction

  int    el [2][32];
  line_t rl, wl;

  task automatic precompute(int c);
    automatic int h = c % 2;
    for (int k = 0; k < 32; k++) begin
      el[h][k] = chunk_el(c, k);
      wl[k*32 +: 32] = VBASE + 32'((el[h][k] < 0) ? NPAGES * 4096 : el[h][k] * 16);
    end
    bus(1, AREG + addr_t'(h * 128), wl, rl);
  endtask

  task automatic codelet(int c);
    automatic int h = c % 2;
    for (int d = 0; d < 4 && el[h][d*8] >= 0; d++) begin
      automatic bit ok = 1;
      automatic addr_t dl = DREG + addr_t'((h * 4 + d) * 128);
      bus(0, dl, '0, rl);
      for (int j = 0; j < 8; j++) begin
        if (el[h][d*8 + j] >= 0) begin
          automatic addr_t pa = va2pa(VBASE + addr_t'(el[h][d*8 + j] * 16));
          if (rl[j*128 +: 64] !== dram.fill(pa) || rl[j*128 + 64 +: 64] !== dram.fill(pa + 8)) ok = 0;
        end
      end
      check(ok, $sformatf("%0dx%0dx%0d chunk %0d data line %0d", NZ, NY, NX, c, d));
      n_lines++;
      bus(1, dl, ~rl, wl);                        // results back, scattered
    end
  endtask

  int n_lines;

  initial begin
    repeat (100000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    bit ok;
    bus_req_valid = 0; bus_req = '0; cfg_we = 0; cfg_set = 0; cfg_field = F_CTRL; cfg_wdata = 0;
    {n_capture, n_gather, n_scatter, n_mtlbmiss} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    cfg(1, F_PTBASE,   PT);
    cfg(1, F_DATABASE, DREG);
    cfg(1, F_ADDRBASE, AREG);
    cfg(1, F_IVPA,     IVPA);
    cfg(1, F_NELEMS,   64);
    cfg(1, F_VBASE,    VBASE);
    cfg(1, F_CTRL,     {22'd0, IV_VIRT, 3'd4, 3'd2, 1'b1, 1'b1});

    for (int r = 0; r < NRUN; r++) begin
      automatic int cap0 = n_capture, g0 = n_gather, s0 = n_scatter, m0 = n_mtlbmiss;
      NZ = RNZ[r]; NY = RNY[r]; NX = RNX[r];
      NEL    = NZ * NY * NX;
      NPAGES = (NEL * 16 + 4095) / 4096;
      CPC    = (NZ + 31) / 32;
      NCHUNK = NY * NX * CPC;
      PBASE  = addr_t'(32'h0400_0000 * (r + 1));
      n_lines = 0;
      for (int v = 0; v <= NPAGES; v++) dram.poke32(PT + addr_t'(v * 4), ppage(v));
      cfg(0, F_FLUSH, 0);

      t0 = cyc;
      precompute(0);
      for (int c = 0; c < NCHUNK; c++) begin
        if (c + 1 < NCHUNK) precompute(c + 1);
        codelet(c);
      end
      $display("%0dx%0dx%0d: vector lines=%0d data lines=%0d cycles=%0d cycles/data line=%0d (gather+scatter) mtlb misses=%0d",
               NZ, NY, NX, NCHUNK, n_lines, cyc - t0, (cyc - t0) / n_lines, n_mtlbmiss - m0);

      ok = 1;
      for (int e = 0; e < NEL; e++) begin
        automatic addr_t pa = va2pa(VBASE + addr_t'(e * 16));
        if (dram.peek(pa) !== ~dram.fill(pa) || dram.peek(pa + 8) !== ~dram.fill(pa + 8)) ok = 0;
      end
      check(ok, $sformatf("%0dx%0dx%0d: every element holds its transformed value", NZ, NY, NX));
      check(n_capture - cap0 == NCHUNK, "one capture per vector line");
      check(n_gather - g0 == n_lines && n_scatter - s0 == n_lines, "one gather and one scatter per data line");
      check(n_lines == NY * NX * ((NZ + 7) / 8), "data lines per column");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
