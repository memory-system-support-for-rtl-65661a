// shadow_engine: serves every access to shadow (remapped) physical addresses.
//
// Holds the remapping control registers, the IV buffer, the AddrCalc unit, the
// MTLB and the scatter/gather buffer, and sequences them. It accepts one
// line-wide bus transaction at a time:
//
//  * Write-back to a DCA address region: the line of addresses is captured in
//    the IV buffer (replacing the line with the same backing address if there
//    is one) and also written to the real memory that backs the region, so that
//    it can be reloaded if it is pushed out of the buffer.
//  * Line fill from a data region (gather): the engine works out which IV line
//    and which entries belong to the requested line, loads that IV line from
//    memory unless the buffer already holds it, and then streams the entries,
//    one per cycle, through a four-stage pipeline:
//        IV buffer read -> AddrCalc -> MTLB lookup -> issue register.
//    The first physical address therefore stands in the issue register four
//    cycles after the first entry is read, and one address follows per cycle
//    while the MTLB hits; an MTLB miss stalls the pipeline until the refill
//    returns. Each object is read with one (objects of 4 or 8 bytes) or several
//    (larger objects) 8-byte memory reads, and each returning word is packed
//    into the scatter/gather buffer at its place in the dense line. When every
//    word has returned the line is sent back on the bus.
//  * Write-back to a data region (scatter): the line is loaded into the
//    scatter/gather buffer and its objects are written to the addresses that
//    the IV names, through the same pipeline.
//  * Line fill from a DCA address region: read from its backing memory.
//  * A shadow address that matches no remapping: fills return zeros,
//    write-backs are dropped, and the 'unmapped' event pulses.
//
// A normal (unremapped) write that hits the physical line an IV buffer line
// was loaded from invalidates that IV line (snoop_* inputs).
//
// Memory port: valid/ready requests, tagged responses that may return in any
// order; bit 11 of the tag is left 0 for the DRAM interface. Tag layout:
// [10:9] kind (tag_kind_e), [8:0] kind-specific routing information.
//
// Following the described design: the blocks, the IV buffer check, the dual
// store of captured write-backs, the one-entry-per-cycle pipeline with first
// address four cycles later, stall on MTLB miss, dense packing. This design's
// choices: the transaction interface, the tag layout, objects being naturally
// aligned and at least as large as an address, the unmapped-access behaviour
// and the snoop invalidation.
module shadow_engine
  import dca_pkg::*;
#(
  parameter int NUM_SETS     = NUM_MAPS,
  parameter int IV_LINES     = 2,
  parameter int MTLB_ENTRIES = 256,
  parameter int MTLB_WAYS    = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // configuration registers
  input  logic                        cfg_we,
  input  logic [$clog2(NUM_SETS)-1:0] cfg_set,
  input  cfg_field_e                  cfg_field,
  input  logic [31:0]                 cfg_wdata,
  // bus side
  input  logic                        req_valid,
  output logic                        req_ready,
  input  bus_req_t                    req,
  output logic                        rsp_valid,
  output line_t                       rsp_line,
  // normal writes, for IV buffer invalidation
  input  logic                        snoop_valid,
  input  addr_t                       snoop_addr,
  // memory side
  output logic                        mem_req_valid,
  input  logic                        mem_req_ready,
  output mem_req_t                    mem_req,
  input  logic                        mem_rsp_valid,
  input  mem_rsp_t                    mem_rsp,
  // statistics
  output shadow_ev_t                  ev
);

  localparam int SW    = $clog2(NUM_SETS);
  localparam int LW    = $clog2(IV_LINES);
  localparam int KTAG  = 8;

  typedef enum logic [3:0] {
    S_IDLE, S_CAPT, S_LWR, S_LRD, S_IVCHK, S_IVLOAD, S_GATHER, S_RESP
  } state_e;

  state_e state;

  // ------------------------------------------------------------------
  // control registers and region match
  map_cfg_t maps [NUM_SETS];
  addr_t    pt_base;
  logic     flush;

  ctrl_regs #(.NUM_SETS(NUM_SETS)) u_regs (
    .clk, .rst_n, .cfg_we, .cfg_set, .cfg_field, .cfg_wdata,
    .maps, .pt_base, .flush
  );

  logic          m_hit, m_is_data;
  logic [SW-1:0] m_set;
  addr_t         m_offset;

  region_match #(.NUM_SETS(NUM_SETS)) u_match (
    .addr(req.addr), .maps, .hit(m_hit), .set_idx(m_set),
    .is_data(m_is_data), .offset(m_offset)
  );

  // ------------------------------------------------------------------
  // the transaction being served
  logic     t_we, t_data, t_unmapped;
  addr_t    t_offset;
  line_t    t_wline;
  map_cfg_t c;
  logic [LW-1:0] cur_line;

  // derived quantities for data-region accesses
  addr_t       line_ofs, e0, iv_byte, iv_line_pa, aline_pa, backing_pa;
  logic [5:0]  first_entry;   // index in address-size units inside the IV line
  logic [6:0]  epl;           // objects per data line
  logic [5:0]  total_ops;     // memory words per data line
  logic [2:0]  obj_log2;
  assign obj_log2    = c.obj_log2;
  assign line_ofs    = {t_offset[PA_W-1:LINE_OFS], {LINE_OFS{1'b0}}};
  assign e0          = line_ofs >> obj_log2;
  assign iv_byte     = e0 << c.addr_log2;
  assign aline_pa    = c.iv_pa + {iv_byte[PA_W-1:LINE_OFS], {LINE_OFS{1'b0}}};
  assign backing_pa  = c.iv_pa + line_ofs;
  assign iv_line_pa  = t_data ? aline_pa : backing_pa;
  assign first_entry = 6'(iv_byte[LINE_OFS-1:0] >> c.addr_log2);
  assign epl         = 7'(8'd128 >> obj_log2);
  assign total_ops   = (obj_log2 == 3'd2) ? 6'd32 : 6'd16;

  // ------------------------------------------------------------------
  // IV buffer
  logic          iv_hit;
  logic [LW-1:0] iv_lk_line;
  logic          iv_alloc, iv_line_we, iv_word_we, iv_rd_en;
  logic [WIDX_W-1:0] iv_word_idx, iv_rd_idx;
  word_t         iv_rd_data;

  iv_buffer #(.IV_LINES(IV_LINES)) u_iv (
    .clk, .rst_n,
    .lk_tag(iv_line_pa[PA_W-1:LINE_OFS]), .lk_hit(iv_hit), .lk_line(iv_lk_line),
    .alloc(iv_alloc),
    .line_we(iv_line_we), .line_idx(iv_lk_line), .line_data(t_wline),
    .word_we(iv_word_we), .word_line(cur_line), .word_idx(iv_word_idx),
    .word_data(mem_rsp.rdata),
    .rd_en(iv_rd_en), .rd_line(cur_line), .rd_idx(iv_rd_idx), .rd_data(iv_rd_data),
    .inv_en(snoop_valid), .inv_tag(snoop_addr[PA_W-1:LINE_OFS]), .flush
  );

  // ------------------------------------------------------------------
  // stage 0/1: feed entries out of the IV buffer
  logic [6:0]      fk;           // next element to feed
  logic            s1_valid, s1_half;
  logic [KTAG-1:0] s1_k;
  logic            ac_in_ready, s1_adv, feeding;
  logic [5:0]      fidx;

  assign feeding   = (state == S_GATHER) && (fk < epl);
  assign s1_adv    = !s1_valid || ac_in_ready;
  assign iv_rd_en  = feeding && s1_adv;
  assign fidx      = first_entry + fk[5:0];
  assign iv_rd_idx = (c.addr_log2 == 3'd2) ? fidx[4:1] : fidx[3:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_half  <= 1'b0;
      s1_k     <= '0;
    end else if (s1_adv) begin
      s1_valid <= iv_rd_en;
      s1_half  <= (c.addr_log2 == 3'd2) && fidx[0];
      s1_k     <= KTAG'(fk);
    end
  end

  // ------------------------------------------------------------------
  // stage 2: AddrCalc
  logic            ac_valid, ac_bypass, tl_in_ready;
  addr_t           ac_addr;
  logic [KTAG-1:0] ac_k;

  addr_calc #(.TAG_W(KTAG)) u_calc (
    .clk, .rst_n,
    .in_valid(s1_valid), .in_ready(ac_in_ready),
    .entry(s1_half ? iv_rd_data[63:32] : iv_rd_data[31:0]), .tag_in(s1_k),
    .kind(c.kind), .vbase(c.vbase), .obj_pv(c.obj_pv), .obj_log2(obj_log2),
    .out_valid(ac_valid), .out_ready(tl_in_ready),
    .out_addr(ac_addr), .out_bypass(ac_bypass), .out_tag(ac_k)
  );

  // ------------------------------------------------------------------
  // stage 3: MTLB
  logic            tl_valid, tl_out_ready;
  addr_t           tl_pa;
  logic [KTAG-1:0] tl_k;
  logic            pte_req_valid, pte_req_ready, pte_rsp_valid;
  addr_t           pte_req_addr;
  logic            mtlb_miss;

  mtlb #(.ENTRIES(MTLB_ENTRIES), .WAYS(MTLB_WAYS), .TAG_W(KTAG)) u_mtlb (
    .clk, .rst_n, .flush, .pt_base,
    .in_valid(ac_valid), .in_ready(tl_in_ready), .in_addr(ac_addr),
    .in_bypass(ac_bypass), .in_tag(ac_k),
    .out_valid(tl_valid), .out_ready(tl_out_ready), .out_pa(tl_pa), .out_tag(tl_k),
    .pte_req_valid, .pte_req_ready, .pte_req_addr,
    .pte_rsp_valid, .pte_rsp_data(mem_rsp.rdata),
    .miss_pulse(mtlb_miss)
  );

  // ------------------------------------------------------------------
  // stage 4: issue register, one memory word per cycle
  logic            is_valid;
  addr_t           is_pa;
  logic [KTAG-1:0] is_k;
  logic [3:0]      is_w;          // word inside a large object
  logic            is_last, is_fire;
  logic [WIDX_W-1:0] is_widx;
  logic [3:0]      nwe_m1;        // words per object minus one
  addr_t           is_addr;
  word_t           is_wdata;
  logic [7:0]      is_strb;
  logic [8:0]      is_info;
  word_t           sg_rd_word;
  logic [31:0]     sg_half;

  assign nwe_m1  = (obj_log2 <= 3'd3) ? 4'd0 : 4'((16'd1 << (obj_log2 - 3'd3)) - 16'd1);
  assign is_last = (is_w == nwe_m1);
  assign is_widx = (obj_log2 == 3'd2) ? WIDX_W'(is_k >> 1)
                                      : WIDX_W'((is_k << (obj_log2 - 3'd3)) + KTAG'(is_w));
  assign is_addr = (obj_log2 == 3'd2) ? {is_pa[PA_W-1:3], 3'b000}
                                      : is_pa + PA_W'({is_w, 3'b000});
  assign sg_half = is_k[0] ? sg_rd_word[63:32] : sg_rd_word[31:0];
  assign is_wdata = (obj_log2 == 3'd2) ? {sg_half, sg_half} : sg_rd_word;
  assign is_strb  = (obj_log2 != 3'd2) ? 8'hFF : (is_pa[2] ? 8'hF0 : 8'h0F);
  // gather routing: word, destination half, source half, 4-byte object
  assign is_info  = {is_widx, is_k[0], is_pa[2], (obj_log2 == 3'd2), 2'b00};

  assign tl_out_ready = !is_valid || (is_fire && is_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      is_valid <= 1'b0;
      is_pa    <= '0;
      is_k     <= '0;
      is_w     <= '0;
    end else begin
      if (tl_out_ready) begin
        is_valid <= tl_valid;
        is_pa    <= tl_pa;
        is_k     <= tl_k;
        is_w     <= '0;
      end else if (is_fire) begin
        is_w <= is_w + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------
  // memory request arbitration: page-table walk, then gather/scatter issue,
  // then plain line transfers
  logic [4:0]  lcnt;        // line words issued
  logic [5:0]  dcnt;        // words completed (returned, or issued for writes)
  logic        line_issue;
  logic        line_we_op;
  addr_t       line_base;

  assign line_issue = ((state == S_LWR) || (state == S_LRD) || (state == S_IVLOAD))
                      && (lcnt < 5'd16);
  assign line_we_op = (state == S_LWR);
  assign line_base  = (state == S_IVLOAD) ? aline_pa : backing_pa;

  always_comb begin
    mem_req_valid = 1'b0;
    mem_req       = '0;
    pte_req_ready = 1'b0;
    is_fire       = 1'b0;
    if (pte_req_valid) begin
      mem_req_valid = 1'b1;
      mem_req.addr  = pte_req_addr;
      mem_req.id    = {1'b0, K_PTE, 9'd0};
      pte_req_ready = mem_req_ready;
    end else if (is_valid) begin
      mem_req_valid = 1'b1;
      mem_req.we    = t_we;
      mem_req.addr  = is_addr;
      mem_req.wdata = is_wdata;
      mem_req.wstrb = is_strb;
      mem_req.id    = {1'b0, K_GATHER, is_info};
      is_fire       = mem_req_ready;
    end else if (line_issue) begin
      mem_req_valid = 1'b1;
      mem_req.we    = line_we_op;
      mem_req.addr  = line_base + PA_W'({lcnt[3:0], 3'b000});
      mem_req.wdata = t_wline[lcnt[3:0]*WORD_W +: WORD_W];
      mem_req.wstrb = 8'hFF;
      mem_req.id    = {1'b0, (state == S_IVLOAD) ? K_IVLOAD : K_LINE, 5'd0, lcnt[3:0]};
    end
  end

  // ------------------------------------------------------------------
  // responses
  tag_kind_e rsp_kind;
  logic [8:0] rsp_info;
  assign rsp_kind = tag_kind_e'(mem_rsp.id[10:9]);
  assign rsp_info = mem_rsp.id[8:0];

  assign pte_rsp_valid = mem_rsp_valid && (rsp_kind == K_PTE);
  assign iv_word_we    = mem_rsp_valid && (rsp_kind == K_IVLOAD);
  assign iv_word_idx   = rsp_info[3:0];

  logic              sg_line_we, sg_word_we;
  logic [WIDX_W-1:0] sg_word_idx;
  word_t             sg_wdata;
  logic [7:0]        sg_strb;
  line_t             sg_line;
  logic [31:0]       rsp_half;

  assign rsp_half = rsp_info[3] ? mem_rsp.rdata[63:32] : mem_rsp.rdata[31:0];

  always_comb begin
    sg_word_we  = 1'b0;
    sg_word_idx = rsp_info[3:0];
    sg_wdata    = mem_rsp.rdata;
    sg_strb     = 8'hFF;
    if (mem_rsp_valid && rsp_kind == K_LINE) begin
      sg_word_we = 1'b1;
    end else if (mem_rsp_valid && rsp_kind == K_GATHER) begin
      sg_word_we  = 1'b1;
      sg_word_idx = rsp_info[8:5];
      if (rsp_info[2]) begin
        sg_wdata = {rsp_half, rsp_half};
        sg_strb  = rsp_info[4] ? 8'hF0 : 8'h0F;
      end
    end
  end

  assign sg_line_we = (state == S_IDLE) && req_valid && req.we;

  sg_buffer u_sg (
    .clk, .line_we(sg_line_we), .line_wdata(req.wline),
    .word_we(sg_word_we), .word_idx(sg_word_idx), .word_wdata(sg_wdata),
    .word_strb(sg_strb), .rd_idx(is_widx), .rd_word(sg_rd_word), .line(sg_line)
  );

  // ------------------------------------------------------------------
  // sequencing
  assign req_ready  = (state == S_IDLE);
  assign iv_alloc   = (state == S_CAPT) || ((state == S_IVCHK) && !iv_hit);
  assign iv_line_we = (state == S_CAPT);
  assign rsp_line   = t_unmapped ? '0 : sg_line;

  logic line_rsp, gather_rsp;
  assign line_rsp   = mem_rsp_valid && (rsp_kind == K_LINE || rsp_kind == K_IVLOAD);
  assign gather_rsp = mem_rsp_valid && (rsp_kind == K_GATHER);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      t_we       <= 1'b0;
      t_data     <= 1'b0;
      t_unmapped <= 1'b0;
      t_offset   <= '0;
      t_wline    <= '0;
      c          <= '0;
      cur_line   <= '0;
      fk         <= '0;
      lcnt       <= '0;
      dcnt       <= '0;
      rsp_valid  <= 1'b0;
      ev         <= '0;
    end else begin
      rsp_valid <= 1'b0;
      ev        <= '0;
      ev.mtlb_miss <= mtlb_miss;
      if (line_issue && !pte_req_valid && !is_valid && mem_req_ready) lcnt <= lcnt + 1'b1;
      if (line_rsp) dcnt <= dcnt + 1'b1;
      if (state == S_GATHER) begin
        if (t_we ? is_fire : gather_rsp) dcnt <= dcnt + 1'b1;
        if (iv_rd_en) fk <= fk + 1'b1;
      end
      unique case (state)
        S_IDLE: if (req_valid) begin
          t_we       <= req.we;
          t_wline    <= req.wline;
          t_offset   <= m_offset;
          t_data     <= m_is_data;
          t_unmapped <= !m_hit;
          c          <= maps[m_set];
          lcnt       <= '0;
          dcnt       <= '0;
          fk         <= '0;
          if (!m_hit) begin
            state       <= S_RESP;
            ev.unmapped <= 1'b1;
          end else if (m_is_data) begin
            state <= S_IVCHK;
          end else if (req.we) begin
            state <= S_CAPT;
          end else begin
            state <= S_LRD;
          end
        end
        S_CAPT: begin
          ev.iv_capture <= 1'b1;
          cur_line      <= iv_lk_line;
          state         <= S_LWR;
        end
        S_LWR: if (lcnt == 5'd16) state <= S_RESP;
        S_LRD: if (dcnt == 6'd16) begin
          ev.addr_read <= 1'b1;
          state        <= S_RESP;
        end
        S_IVCHK: begin
          cur_line <= iv_lk_line;
          if (iv_hit) begin
            ev.iv_hit <= 1'b1;
            state     <= S_GATHER;
          end else begin
            ev.iv_miss <= 1'b1;
            state      <= S_IVLOAD;
          end
        end
        S_IVLOAD: if (dcnt == 6'd16) begin
          dcnt  <= '0;
          state <= S_GATHER;
        end
        S_GATHER: if (dcnt == total_ops) begin
          if (t_we) ev.scatter <= 1'b1;
          else      ev.gather  <= 1'b1;
          state <= S_RESP;
        end
        S_RESP: begin
          rsp_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A transaction is only accepted when the engine is idle, and responses of
  // the memory never arrive for a kind that is not in progress.
  assert property (@(posedge clk) disable iff (!rst_n)
    (mem_rsp_valid && rsp_kind == K_IVLOAD) |-> state == S_IVLOAD);
  assert property (@(posedge clk) disable iff (!rst_n)
    (mem_rsp_valid && rsp_kind == K_GATHER) |-> state == S_GATHER);

endmodule
