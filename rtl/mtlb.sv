// mtlb: memory-controller TLB, pseudo-virtual to physical translation.
//
// A set-associative TLB of ENTRIES entries in WAYS ways (default 256 entries,
// four ways, 4 KB pages, as in the evaluated configuration). It is one stage of
// the shadow engine's address pipeline: a lookup takes one cycle, after which
// the translated address is offered downstream. On a miss the stage stalls
// (in_ready low) and fetches the page-table entry itself from the memory
// controller page table, a flat table of 32-bit entries at pt_base indexed by
// the virtual page number; when the entry returns it is written into the set
// (round-robin way choice) and the held request completes.
//
// Requests marked 'bypass' carry real physical addresses and are not
// translated. 'flush' invalidates every entry.
//
// This design's choices: PTE layout (physical page number in bits [31:12],
// the other bits ignored, no fault handling), round-robin replacement, the
// request/response port used for the refill (one 64-bit word read; the PTE is
// the half selected by address bit 2).
module mtlb
  import dca_pkg::*;
#(
  parameter int ENTRIES = 256,
  parameter int WAYS    = 4,
  parameter int TAG_W   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  addr_t            pt_base,
  // lookup side
  input  logic             in_valid,
  output logic             in_ready,
  input  addr_t            in_addr,
  input  logic             in_bypass,
  input  logic [TAG_W-1:0] in_tag,
  // translated side
  output logic             out_valid,
  input  logic             out_ready,
  output addr_t            out_pa,
  output logic [TAG_W-1:0] out_tag,
  // page-table walk port
  output logic             pte_req_valid,
  input  logic             pte_req_ready,
  output addr_t            pte_req_addr,
  input  logic             pte_rsp_valid,
  input  word_t            pte_rsp_data,
  // statistics
  output logic             miss_pulse
);

  localparam int SETS  = ENTRIES / WAYS;
  localparam int SET_W = $clog2(SETS);
  localparam int WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int VPN_W = PA_W - PAGE_BITS;
  localparam int TG_W  = VPN_W - SET_W;

  logic [TG_W-1:0]  tag_arr [SETS][WAYS];
  logic [VPN_W-1:0] ppn_arr [SETS][WAYS];
  logic [WAYS-1:0]  vld     [SETS];
  logic [WAY_W-1:0] rr      [SETS];

  // held request
  logic             h_valid, h_hit, h_bypass, h_pending;
  addr_t            h_addr;
  logic [VPN_W-1:0] h_ppn;
  logic [TAG_W-1:0] h_tag;

  // lookup of the incoming request
  logic [VPN_W-1:0] in_vpn;
  logic [SET_W-1:0] in_set;
  logic             lk_hit;
  logic [VPN_W-1:0] lk_ppn;
  assign in_vpn = in_addr[PA_W-1:PAGE_BITS];
  assign in_set = in_vpn[SET_W-1:0];

  always_comb begin
    lk_hit = 1'b0;
    lk_ppn = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (vld[in_set][w] && tag_arr[in_set][w] == in_vpn[VPN_W-1:SET_W]) begin
        lk_hit = 1'b1;
        lk_ppn = ppn_arr[in_set][w];
      end
    end
  end

  logic [VPN_W-1:0] h_vpn;
  logic [SET_W-1:0] h_set;
  addr_t            pte_addr;
  assign h_vpn    = h_addr[PA_W-1:PAGE_BITS];
  assign h_set    = h_vpn[SET_W-1:0];
  assign pte_addr = pt_base + PA_W'({h_vpn, 2'b00});

  assign out_valid     = h_valid && (h_hit || h_bypass);
  assign out_pa        = h_bypass ? h_addr : {h_ppn, h_addr[PAGE_BITS-1:0]};
  assign out_tag       = h_tag;
  assign in_ready      = !h_valid || (out_valid && out_ready);
  assign pte_req_valid = h_valid && !h_hit && !h_bypass && !h_pending;
  assign pte_req_addr  = {pte_addr[PA_W-1:3], 3'b000};

  logic [31:0] pte;
  assign pte = pte_addr[2] ? pte_rsp_data[63:32] : pte_rsp_data[31:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_valid    <= 1'b0;
      h_hit      <= 1'b0;
      h_bypass   <= 1'b0;
      h_pending  <= 1'b0;
      h_addr     <= '0;
      h_ppn      <= '0;
      h_tag      <= '0;
      miss_pulse <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        vld[s] <= '0;
        rr[s]  <= '0;
      end
    end else begin
      miss_pulse <= 1'b0;
      if (in_ready) begin
        h_valid <= in_valid;
        if (in_valid) begin
          h_addr     <= in_addr;
          h_bypass   <= in_bypass;
          h_tag      <= in_tag;
          h_hit      <= lk_hit;
          h_ppn      <= lk_ppn;
          miss_pulse <= !lk_hit && !in_bypass;
        end
      end else if (pte_req_valid && pte_req_ready) begin
        h_pending <= 1'b1;
      end else if (h_pending && pte_rsp_valid) begin
        h_pending                    <= 1'b0;
        h_hit                        <= 1'b1;
        h_ppn                        <= pte[31:PAGE_BITS];
        vld[h_set][rr[h_set]]        <= 1'b1;
        rr[h_set]                    <= (32'(rr[h_set]) == WAYS - 1) ? '0 : rr[h_set] + 1'b1;
      end
      if (flush)
        for (int s = 0; s < SETS; s++) vld[s] <= '0;
    end
  end

  always_ff @(posedge clk) begin
    if (!in_ready && h_pending && pte_rsp_valid) begin
      tag_arr[h_set][rr[h_set]] <= h_vpn[VPN_W-1:SET_W];
      ppn_arr[h_set][rr[h_set]] <= pte[31:PAGE_BITS];
    end
  end

endmodule
