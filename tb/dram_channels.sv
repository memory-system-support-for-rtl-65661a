// dram_channels: behavioural model of the DRAM behind the controller's NPORT
// channels, for simulation only (not synthesizable).
//
// All channels share one sparse memory of 64-bit words (an associative array;
// words never written read as the pattern function 'fill' of their address).
// Each channel accepts requests with valid/ready and withholds ready on
// STALL_PCT percent of cycles at random. Reads answer LAT cycles after
// acceptance, or up to 8 cycles later with REORDER, with the request's tag.
// A response stays valid until the controller takes it (rsp_ready), and the
// oldest due answer goes first. Writes apply the byte strobes and return
// nothing. Testbenches preload and inspect memory with poke/peek.
module dram_channels
  import dca_pkg::*;
#(
  parameter int NPORT     = 4,
  parameter int LAT       = 16,
  parameter int STALL_PCT = 0,
  parameter bit REORDER   = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid [NPORT],
  output logic     req_ready [NPORT],
  input  mem_req_t req       [NPORT],
  output logic     rsp_valid [NPORT],
  input  logic     rsp_ready [NPORT],
  output mem_rsp_t rsp       [NPORT]
);

  word_t mem [logic [28:0]];
  int unsigned n_reads, n_writes;
  int unsigned n_req [NPORT];

  typedef struct {
    longint   due;
    mem_rsp_t r;
  } pend_t;
  pend_t  q [NPORT][$];
  longint cyc;

  function automatic word_t fill(addr_t a);
    return {a ^ 32'hDEAD_BEEF, a};
  endfunction

  function automatic word_t peek(addr_t a);
    if (mem.exists(a[31:3])) return mem[a[31:3]];
    return fill({a[31:3], 3'b000});
  endfunction

  function automatic void poke(addr_t a, word_t d);
    mem[a[31:3]] = d;
  endfunction

  function automatic void poke32(addr_t a, logic [31:0] d);
    word_t w;
    w = peek(a);
    if (a[2]) w[63:32] = d;
    else      w[31:0]  = d;
    mem[a[31:3]] = w;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int p = 0; p < NPORT; p++) req_ready[p] <= 1'b1;
    else        for (int p = 0; p < NPORT; p++) req_ready[p] <= ($urandom_range(99) >= STALL_PCT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc      <= 0;
      n_reads  <= 0;
      n_writes <= 0;
      for (int p = 0; p < NPORT; p++) begin
        rsp_valid[p] <= 1'b0;
        rsp[p]       <= '0;
        n_req[p]     <= 0;
        q[p].delete();
      end
    end else begin
      automatic int nr = 0, nw = 0;
      cyc <= cyc + 1;
      for (int p = 0; p < NPORT; p++) begin
        if (req_valid[p] && req_ready[p]) begin
          n_req[p] <= n_req[p] + 1;
          if (req[p].we) begin
            word_t w;
            w = peek(req[p].addr);
            for (int b = 0; b < 8; b++)
              if (req[p].wstrb[b]) w[b*8 +: 8] = req[p].wdata[b*8 +: 8];
            mem[req[p].addr[31:3]] = w;
            nw++;
          end else begin
            pend_t e;
            e.due     = cyc + LAT - 1 + (REORDER ? longint'($urandom_range(8)) : 0);
            e.r.rdata = peek(req[p].addr);
            e.r.id    = req[p].id;
            q[p].push_back(e);
            nr++;
          end
        end
        if (!rsp_valid[p] || rsp_ready[p]) begin
          // answer the oldest request that is due
          automatic int k = -1;
          for (int i = 0; i < q[p].size(); i++)
            if (k < 0 && q[p][i].due <= cyc) k = i;
          rsp_valid[p] <= (k >= 0);
          if (k >= 0) begin
            rsp[p] <= q[p][k].r;
            q[p].delete(k);
          end
        end
      end
      n_reads  <= n_reads + nr;
      n_writes <= n_writes + nw;
    end
  end

endmodule
