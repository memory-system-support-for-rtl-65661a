// dram_model: behavioural model of the DRAM behind the controller's 8-byte
// port, for simulation only (not synthesizable).
//
// A sparse memory of 64-bit words (associative array; words never written read
// as the pattern function 'fill' of their address). Requests are accepted with
// valid/ready; with STALL_PCT > 0 the model withholds ready on that share of
// cycles at random. Reads answer LAT cycles after acceptance with the request's
// tag; with REORDER each read waits up to 8 cycles longer at random, so answers
// leave out of order. Writes apply the byte strobes and return nothing.
// Testbenches preload and inspect memory with poke/peek and count requests.
module dram_model
  import dca_pkg::*;
#(
  parameter int LAT       = 16,
  parameter int STALL_PCT = 0,
  parameter bit REORDER   = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  output mem_rsp_t rsp
);

  word_t mem [logic [28:0]];
  int unsigned n_reads, n_writes;

  typedef struct {
    longint   due;
    mem_rsp_t r;
  } pend_t;
  pend_t  q[$];
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
    if (!rst_n) req_ready <= 1'b1;
    else        req_ready <= ($urandom_range(99) >= STALL_PCT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc       <= 0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
      n_reads   <= 0;
      n_writes  <= 0;
      q.delete();
    end else begin
      cyc       <= cyc + 1;
      rsp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        if (req.we) begin
          word_t w;
          w = peek(req.addr);
          for (int b = 0; b < 8; b++)
            if (req.wstrb[b]) w[b*8 +: 8] = req.wdata[b*8 +: 8];
          mem[req.addr[31:3]] = w;
          n_writes <= n_writes + 1;
        end else begin
          pend_t p;
          p.due     = cyc + LAT - 1 + (REORDER ? longint'($urandom_range(8)) : 0);
          p.r.rdata = peek(req.addr);
          p.r.id    = req.id;
          q.push_back(p);
          n_reads <= n_reads + 1;
        end
      end
      begin
        // answer the oldest request that is due
        automatic int k = -1;
        for (int i = 0; i < q.size(); i++)
          if (k < 0 && q[i].due <= cyc) k = i;
        if (k >= 0) begin
          rsp_valid <= 1'b1;
          rsp       <= q[k].r;
          q.delete(k);
        end
      end
    end
  end

endmodule
