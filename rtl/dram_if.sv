// dram_if: the controller's DRAM interface. It connects the normal access
// path (master 0) and the shadow engine (master 1) to the DRAM buses.
//
// The DRAM has eight banks. Each pair of banks shares one 8-byte bus, so there
// are NCHAN = 4 independent channels. A word request goes to the channel
// selected by address bits [CH_LSB +: log2(NCHAN)]. With the default
// CH_LSB = 7, consecutive 128-byte lines fall on consecutive channels, and a
// line never spans two channels. The bank within a pair is left to the DRAM
// side.
//
// Requests: each channel has its own round-robin arbiter between the two
// masters (the master not granted last on that channel wins a conflict).
// Requests of the two masters for different channels go out in the same
// cycle. The top bit of the request tag is overwritten with the master
// number.
//
// Responses: each channel answers with valid/ready and keeps a response
// valid until it is taken. Each master takes at most one response per cycle,
// from the channels whose tag names it, chosen round robin. The tag bit is
// cleared on the way back. Answers may come in any order, within a channel
// and across channels.
//
// The channel count follows the described memory system: eight banks, pairs
// sharing a bus. The address interleaving, the arbitration and the tag
// routing are this design's own.
module dram_if
  import dca_pkg::*;
#(
  parameter int NCHAN  = 4,
  parameter int CH_LSB = LINE_OFS
) (
  input  logic     clk,
  input  logic     rst_n,
  // master 0: normal path
  input  logic     m0_req_valid,
  output logic     m0_req_ready,
  input  mem_req_t m0_req,
  output logic     m0_rsp_valid,
  output mem_rsp_t m0_rsp,
  // master 1: shadow engine
  input  logic     m1_req_valid,
  output logic     m1_req_ready,
  input  mem_req_t m1_req,
  output logic     m1_rsp_valid,
  output mem_rsp_t m1_rsp,
  // DRAM channels
  output logic     ch_req_valid [NCHAN],
  input  logic     ch_req_ready [NCHAN],
  output mem_req_t ch_req       [NCHAN],
  input  logic     ch_rsp_valid [NCHAN],
  output logic     ch_rsp_ready [NCHAN],
  input  mem_rsp_t ch_rsp       [NCHAN]
);

  localparam int CW = (NCHAN > 1) ? $clog2(NCHAN) : 1;

  function automatic logic [CW-1:0] chan(addr_t a);
    return (NCHAN > 1) ? CW'(a >> CH_LSB) : '0;
  endfunction

  // ---------------- requests
  logic [CW-1:0]    c0, c1;
  logic [NCHAN-1:0] want0, want1, gnt1, last1;
  assign c0 = chan(m0_req.addr);
  assign c1 = chan(m1_req.addr);

  always_comb begin
    m0_req_ready = 1'b0;
    m1_req_ready = 1'b0;
    for (int c = 0; c < NCHAN; c++) begin
      want0[c] = m0_req_valid && (32'(c0) == c);
      want1[c] = m1_req_valid && (32'(c1) == c);
      gnt1[c]  = (want0[c] && want1[c]) ? !last1[c] : want1[c];
      ch_req_valid[c] = want0[c] || want1[c];
      ch_req[c]       = gnt1[c] ? m1_req : m0_req;
      ch_req[c].id[ID_W-1] = gnt1[c];
      if (ch_req_ready[c] && want0[c] && !gnt1[c]) m0_req_ready = 1'b1;
      if (ch_req_ready[c] && gnt1[c])              m1_req_ready = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last1 <= '0;
    else
      for (int c = 0; c < NCHAN; c++)
        if (ch_req_valid[c] && ch_req_ready[c]) last1[c] <= gnt1[c];
  end

  // ---------------- responses
  logic [CW-1:0] rp0, rp1;      // channel served last, per master
  logic          sel0_v, sel1_v;
  logic [CW-1:0] sel0, sel1;

  always_comb begin
    sel0_v = 1'b0; sel0 = '0;
    sel1_v = 1'b0; sel1 = '0;
    for (int k = 1; k <= NCHAN; k++) begin
      automatic logic [CW-1:0] c = CW'((32'(rp0) + k) % NCHAN);
      if (!sel0_v && ch_rsp_valid[c] && !ch_rsp[c].id[ID_W-1]) begin
        sel0_v = 1'b1; sel0 = c;
      end
    end
    for (int k = 1; k <= NCHAN; k++) begin
      automatic logic [CW-1:0] c = CW'((32'(rp1) + k) % NCHAN);
      if (!sel1_v && ch_rsp_valid[c] && ch_rsp[c].id[ID_W-1]) begin
        sel1_v = 1'b1; sel1 = c;
      end
    end
    for (int c = 0; c < NCHAN; c++)
      ch_rsp_ready[c] = (sel0_v && 32'(sel0) == c) || (sel1_v && 32'(sel1) == c);
    m0_rsp_valid      = sel0_v;
    m0_rsp            = ch_rsp[sel0];
    m0_rsp.id[ID_W-1] = 1'b0;
    m1_rsp_valid      = sel1_v;
    m1_rsp            = ch_rsp[sel1];
    m1_rsp.id[ID_W-1] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp0 <= '0;
      rp1 <= '0;
    end else begin
      if (sel0_v) rp0 <= sel0;
      if (sel1_v) rp1 <= sel1;
    end
  end

  // a channel holds a response that was not taken
  for (genvar g = 0; g < NCHAN; g++) begin : g_chk
    a_rsp_hold: assert property (@(posedge clk) disable iff (!rst_n)
      ch_rsp_valid[g] && !ch_rsp_ready[g] |=> ch_rsp_valid[g] && ch_rsp[g] == $past(ch_rsp[g]));
  end

endmodule
