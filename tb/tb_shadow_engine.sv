// tb_shadow_engine: drives the shadow engine directly, behind a behavioural
// DRAM that stalls at random and answers reads out of order, so that packing
// by tag is exercised. Expected data are computed from the test's own page
// mapping and the DRAM contents. Cases:
//  A. DCA with 8-byte virtual addresses and 8-byte objects (one IV line per
//     data line);
//  B. DCA with 4-byte indices and 32-byte objects (eight data lines per IV
//     line, four words per object);
//  C. scatter of 4-byte objects to physical addresses, some sharing a DRAM
//     word (byte strobes), then the line gathered back;
//  D. plain IV remapping from a vector in memory: the buffered IV line is used
//     until a normal write to it is signalled on the snoop input;
//  E. an unmapped shadow write-back is dropped; a flush empties the MTLB;
//  F. every legal pair of address size (4, 8 bytes) and object size (4 to 128
//     bytes), alternating virtual-address and index vectors: two IV lines are
//     written, data lines at the start, the end and in between are gathered,
//     and one line is scattered and read back from memory word by word.
module tb_shadow_engine;
  import dca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we; logic [2:0] cfg_set; cfg_field_e cfg_field; logic [31:0] cfg_wdata;
  logic req_valid, req_ready, rsp_valid, snoop_valid;
  bus_req_t req;
  line_t rsp_line;
  addr_t snoop_addr;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  shadow_ev_t ev;
  shadow_engine dut (.*);
  dram_model #(.LAT(10), .STALL_PCT(20), .REORDER(1)) dram (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp(mem_rsp)
  );

  localparam addr_t PT = 32'h0010_0000, VBASE = 32'h2000_0000;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_mtlb = 0, n_ivhit = 0, n_ivmiss = 0, n_unmapped = 0;
  always @(posedge clk) if (rst_n) begin
    n_mtlb += int'(ev.mtlb_miss); n_ivhit += int'(ev.iv_hit);
    n_ivmiss += int'(ev.iv_miss); n_unmapped += int'(ev.unmapped);
  end

  function automatic addr_t pv2pa(addr_t pv);
    return (32'h0300_0000 + (pv >> 12) * 5 * 4096) | {20'd0, pv[11:0]};
  endfunction

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
    req_valid = 1; req.we = we; req.addr = a; req.wline = wl;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    while (!rsp_valid) @(negedge clk);
    rl = rsp_line;
  endtask

  line_t wl, rl;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_set = 0; cfg_field = F_CTRL; cfg_wdata = 0;
    req_valid = 0; req = '0; snoop_valid = 0; snoop_addr = 0;
    for (int v = 0; v < 64; v++) dram.poke32(PT + addr_t'(v * 4), pv2pa(addr_t'(v) << 12));
    repeat (2) @(posedge clk);
    rst_n = 1;
    cfg(0, F_PTBASE, PT);

    // ---- A
    begin
      automatic addr_t va [32];
      cfg(0, F_DATABASE, 32'h5000_0000); cfg(0, F_ADDRBASE, 32'h5100_0000);
      cfg(0, F_IVPA, 32'h0040_0000); cfg(0, F_NELEMS, 32); cfg(0, F_VBASE, VBASE);
      cfg(0, F_CTRL, ctrl(1, 3, 3, IV_VIRT));
      for (int l = 0; l < 2; l++) begin
        for (int k = 0; k < 16; k++) begin
          va[l*16 + k] = VBASE + addr_t'($urandom_range(0, 32767) * 8);
          wl[k*64 +: 64] = {32'h0, va[l*16 + k]};
        end
        bus(1, 32'h5100_0000 + addr_t'(l * 128), wl, rl);
      end
      for (int l = 1; l >= 0; l--) begin
        automatic bit ok = 1;
        bus(0, 32'h5000_0000 + addr_t'(l * 128), '0, rl);
        for (int k = 0; k < 16; k++)
          if (rl[k*64 +: 64] !== dram.peek(pv2pa(va[l*16 + k] - VBASE))) ok = 0;
        check(ok, $sformatf("A: 8-byte objects, line %0d", l));
      end
    end

    // ---- B
    begin
      automatic int ix [32];
      cfg(1, F_DATABASE, 32'h6000_0000); cfg(1, F_ADDRBASE, 32'h6100_0000);
      cfg(1, F_IVPA, 32'h0041_0000); cfg(1, F_NELEMS, 32); cfg(1, F_OBJPV, 32'h0000_8000);
      cfg(1, F_CTRL, ctrl(1, 2, 5, IV_INDEX));
      for (int k = 0; k < 32; k++) begin
        ix[k] = $urandom_range(0, 2047);
        wl[k*32 +: 32] = 32'(ix[k]);
      end
      bus(1, 32'h6100_0000, wl, rl);
      for (int d = 0; d < 8; d++) begin
        automatic bit ok = 1;
        bus(0, 32'h6000_0000 + addr_t'(d * 128), '0, rl);
        for (int e = 0; e < 4; e++)
          for (int w = 0; w < 4; w++)
            if (rl[(e*4 + w)*64 +: 64] !== dram.peek(pv2pa(32'h8000 + addr_t'(ix[d*4 + e] * 32 + w * 8))))
              ok = 0;
        check(ok, $sformatf("B: 32-byte objects, line %0d", d));
      end
    end

    // ---- C
    begin
      automatic addr_t pa [32];
      automatic logic [31:0] other [32];
      automatic bit ok = 1;
      cfg(2, F_DATABASE, 32'h7000_0000); cfg(2, F_ADDRBASE, 32'h7100_0000);
      cfg(2, F_IVPA, 32'h0042_0000); cfg(2, F_NELEMS, 32);
      cfg(2, F_CTRL, ctrl(1, 2, 2, IV_PHYS));
      for (int k = 0; k < 32; k += 2) begin
        // element k in word slot k; element k+1 either its word neighbour or far away
        pa[k]     = 32'h0500_0000 + addr_t'(k * 64) + ($urandom_range(1) ? 4 : 0);
        pa[k + 1] = ($urandom_range(1)) ? (pa[k] ^ 32'h4) : (32'h0580_0000 + addr_t'(k * 64));
      end
      for (int k = 0; k < 32; k++) begin
        wl[k*32 +: 32] = pa[k];
        other[k] = 32'(dram.peek(pa[k] ^ 32'h4) >> (pa[k][2] ? 0 : 32));
      end
      bus(1, 32'h7100_0000, wl, rl);
      for (int k = 0; k < 32; k++) wl[k*32 +: 32] = $urandom;
      bus(1, 32'h7000_0000, wl, rl);
      for (int k = 0; k < 32; k++) begin
        automatic word_t w = dram.peek(pa[k]);
        automatic logic [31:0] mine = pa[k][2] ? w[63:32] : w[31:0];
        automatic logic [31:0] nb   = pa[k][2] ? w[31:0] : w[63:32];
        automatic bit nb_target = 0;
        for (int j = 0; j < 32; j++) if (pa[j] == (pa[k] ^ 32'h4)) nb_target = 1;
        if (mine !== wl[k*32 +: 32]) ok = 0;
        if (!nb_target && nb !== other[k]) ok = 0;
      end
      check(ok, "C: scatter writes only the object's bytes");
      bus(0, 32'h7000_0000, '0, rl);
      check(rl == wl, "C: scattered line gathers back");
    end

    // ---- D
    begin
      automatic addr_t pa [16];
      automatic bit ok;
      automatic int h0;
      cfg(3, F_DATABASE, 32'h7800_0000); cfg(3, F_IVPA, 32'h0060_0000); cfg(3, F_NELEMS, 32);
      cfg(3, F_CTRL, ctrl(0, 2, 3, IV_PHYS));
      for (int k = 0; k < 32; k++) dram.poke32(32'h0060_0000 + addr_t'(k * 4), 32'h0700_0000 + addr_t'(k * 8));
      bus(0, 32'h7800_0000, '0, rl);
      ok = 1;
      for (int k = 0; k < 16; k++) if (rl[k*64 +: 64] !== dram.peek(32'h0700_0000 + addr_t'(k * 8))) ok = 0;
      check(ok, "D: gather through a vector in memory");
      // the program changes the vector; without a snoop the buffered copy is used
      for (int k = 0; k < 32; k++) dram.poke32(32'h0060_0000 + addr_t'(k * 4), 32'h0710_0000 + addr_t'(k * 16));
      h0 = n_ivhit;
      bus(0, 32'h7800_0000, '0, rl);
      check(n_ivhit == h0 + 1 && rl[63:0] == dram.peek(32'h0700_0000), "D: buffered IV line reused");
      @(negedge clk);
      snoop_valid = 1; snoop_addr = 32'h0060_0040;
      @(negedge clk);
      snoop_valid = 0;
      bus(0, 32'h7800_0000, '0, rl);
      ok = 1;
      for (int k = 0; k < 16; k++) if (rl[k*64 +: 64] !== dram.peek(32'h0710_0000 + addr_t'(k * 16))) ok = 0;
      check(ok, "D: snooped write forces a reload");
    end

    // ---- E
    begin
      automatic int w0 = dram.n_writes, m0;
      bus(1, 32'hE000_0000, wl, rl);
      check(dram.n_writes == w0 && n_unmapped == 1, "E: unmapped write-back dropped");
      cfg(0, F_FLUSH, 0);
      m0 = n_mtlb;
      bus(0, 32'h6000_0000, '0, rl);
      check(n_mtlb > m0, "E: flush empties the MTLB");
    end
    // ---- F
    for (int alog = 2; alog <= 3; alog++) begin
      for (int olog = alog; olog <= 7; olog++) begin
        automatic iv_kind_e kind = ((alog + olog) % 2) ? IV_INDEX : IV_VIRT;
        automatic int    epl    = 128 >> alog;              // entries per IV line
        automatic int    nel    = 2 * epl;
        automatic int    nlines = (nel << olog) / 128;      // data lines in the region
        automatic addr_t ivpa   = 32'h0070_0000 + addr_t'((alog * 8 + olog) * 256);
        automatic addr_t objpv  = 32'h0001_0000;
        automatic addr_t pv [64];
        automatic int    r      = $urandom_range(0, 1023);
        automatic int    pick [4];
        automatic string tag    = $sformatf("F: %0d-byte entries, %0d-byte objects", 1 << alog, 1 << olog);
        cfg(4, F_DATABASE, 32'h4800_0000); cfg(4, F_ADDRBASE, 32'h4C00_0000);
        cfg(4, F_IVPA, ivpa); cfg(4, F_NELEMS, 32'(nel)); cfg(4, F_VBASE, VBASE);
        cfg(4, F_OBJPV, objpv); cfg(4, F_CTRL, ctrl(1, alog, olog, kind));
        // distinct objects: slot (k * 97 + r) mod 1024
        for (int l = 0; l < 2; l++) begin
          wl = '0;
          for (int k = 0; k < epl; k++) begin
            automatic int    slot = ((l * epl + k) * 97 + r) & 1023;
            automatic addr_t ent  = (kind == IV_VIRT) ? VBASE + addr_t'(slot << olog) : addr_t'(slot);
            pv[l * epl + k] = (kind == IV_VIRT) ? addr_t'(slot << olog) : objpv + addr_t'(slot << olog);
            wl[k * (8 << alog) +: 32] = ent;
          end
          bus(1, 32'h4C00_0000 + addr_t'(l * 128), wl, rl);
        end
        pick = '{0, nlines - 1, nlines / 2 + 1, $urandom_range(0, nlines - 1)};
        for (int p = 0; p < 4; p++) begin
          automatic bit ok = 1;
          automatic int d  = pick[p] % nlines;
          bus(0, 32'h4800_0000 + addr_t'(d * 128), '0, rl);
          for (int b = 0; b < 128; b += 4) begin
            // byte b of data line d belongs to element e, at byte o of it
            automatic int    e  = (d * 128 + b) >> olog;
            automatic int    o  = (d * 128 + b) & ((1 << olog) - 1);
            automatic addr_t pa = pv2pa(pv[e] + addr_t'(o));
            automatic word_t w  = dram.peek(pa);
            if (rl[b*8 +: 32] !== (pa[2] ? w[63:32] : w[31:0])) ok = 0;
          end
          check(ok, $sformatf("%s: gathered line %0d", tag, d));
        end
        begin
          automatic bit ok = 1;
          automatic int d  = nlines - 1;
          for (int k = 0; k < 32; k++) wl[k*32 +: 32] = $urandom;
          bus(1, 32'h4800_0000 + addr_t'(d * 128), wl, rl);
          for (int b = 0; b < 128; b += 4) begin
            automatic int    e  = (d * 128 + b) >> olog;
            automatic int    o  = (d * 128 + b) & ((1 << olog) - 1);
            automatic addr_t pa = pv2pa(pv[e] + addr_t'(o));
            automatic word_t w  = dram.peek(pa);
            if (wl[b*8 +: 32] !== (pa[2] ? w[63:32] : w[31:0])) ok = 0;
          end
          check(ok, $sformatf("%s: scattered line in memory", tag));
          bus(0, 32'h4800_0000 + addr_t'(d * 128), '0, rl);
          check(rl == wl, $sformatf("%s: scattered line gathers back", tag));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
