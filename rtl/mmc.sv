// mmc: main memory controller with an Impulse-style shadow engine and dynamic
// cache line assembly.
//
// The system bus presents line fills and write-backs of 128-byte lines. The
// shadow_decode block sends normal physical addresses to the dense line path
// (normal_path) and shadow addresses to the shadow_engine, which remaps them
// through indirection vectors: a line of a data region is gathered from
// scattered objects in real memory, and a line written into a DCA address
// region becomes the indirection vector for the matching data line. Both paths
// reach DRAM through dram_if, which spreads their word requests over the
// four 8-byte DRAM channels (eight banks, pairs sharing a bus) and routes the
// tagged responses back.
//
// Ports: a line-wide bus transaction port (one outstanding), the OS register
// port of the remapping registers, one word port per DRAM channel (valid/ready
// requests, valid/ready responses in any order), and shadow-engine event
// pulses for statistics. DRAM itself, the processor, its caches and the bus
// protocol are outside this module.
module mmc
  import dca_pkg::*;
#(
  parameter logic [PA_W:0] DRAM_BYTES   = 33'h0_4000_0000,
  parameter int            NUM_SETS     = NUM_MAPS,
  parameter int            IV_LINES     = 2,
  parameter int            MTLB_ENTRIES = 256,
  parameter int            MTLB_WAYS    = 4,
  parameter int            NCHAN        = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // system bus
  input  logic                        bus_req_valid,
  output logic                        bus_req_ready,
  input  bus_req_t                    bus_req,
  output logic                        bus_rsp_valid,
  output line_t                       bus_rsp_line,
  // OS configuration port
  input  logic                        cfg_we,
  input  logic [$clog2(NUM_SETS)-1:0] cfg_set,
  input  cfg_field_e                  cfg_field,
  input  logic [31:0]                 cfg_wdata,
  // DRAM channels
  output logic                        mem_req_valid [NCHAN],
  input  logic                        mem_req_ready [NCHAN],
  output mem_req_t                    mem_req       [NCHAN],
  input  logic                        mem_rsp_valid [NCHAN],
  output logic                        mem_rsp_ready [NCHAN],
  input  mem_rsp_t                    mem_rsp       [NCHAN],
  // statistics
  output logic                        shadow_access,
  output shadow_ev_t                  ev
);

  logic     n_req_valid, n_req_ready, n_rsp_valid;
  logic     s_req_valid, s_req_ready, s_rsp_valid;
  line_t    n_rsp_line, s_rsp_line;
  logic     snoop_valid;
  addr_t    snoop_addr;
  logic     is_shadow;
  logic     n_mreq_valid, n_mreq_ready, n_mrsp_valid;
  logic     s_mreq_valid, s_mreq_ready, s_mrsp_valid;
  mem_req_t n_mreq, s_mreq;
  mem_rsp_t n_mrsp, s_mrsp;

  assign shadow_access = bus_req_valid && bus_req_ready && is_shadow;

  shadow_decode #(.DRAM_BYTES(DRAM_BYTES)) u_decode (
    .clk, .rst_n,
    .bus_req_valid, .bus_req_ready, .bus_req, .bus_rsp_valid, .bus_rsp_line,
    .is_shadow,
    .n_req_valid, .n_req_ready, .n_rsp_valid, .n_rsp_line,
    .s_req_valid, .s_req_ready, .s_rsp_valid, .s_rsp_line
  );

  normal_path u_normal (
    .clk, .rst_n,
    .req_valid(n_req_valid), .req_ready(n_req_ready), .req(bus_req),
    .rsp_valid(n_rsp_valid), .rsp_line(n_rsp_line),
    .snoop_valid, .snoop_addr,
    .mem_req_valid(n_mreq_valid), .mem_req_ready(n_mreq_ready), .mem_req(n_mreq),
    .mem_rsp_valid(n_mrsp_valid), .mem_rsp(n_mrsp)
  );

  shadow_engine #(
    .NUM_SETS(NUM_SETS), .IV_LINES(IV_LINES),
    .MTLB_ENTRIES(MTLB_ENTRIES), .MTLB_WAYS(MTLB_WAYS)
  ) u_shadow (
    .clk, .rst_n,
    .cfg_we, .cfg_set, .cfg_field, .cfg_wdata,
    .req_valid(s_req_valid), .req_ready(s_req_ready), .req(bus_req),
    .rsp_valid(s_rsp_valid), .rsp_line(s_rsp_line),
    .snoop_valid, .snoop_addr,
    .mem_req_valid(s_mreq_valid), .mem_req_ready(s_mreq_ready), .mem_req(s_mreq),
    .mem_rsp_valid(s_mrsp_valid), .mem_rsp(s_mrsp),
    .ev
  );

  dram_if #(.NCHAN(NCHAN)) u_dram_if (
    .clk, .rst_n,
    .m0_req_valid(n_mreq_valid), .m0_req_ready(n_mreq_ready), .m0_req(n_mreq),
    .m0_rsp_valid(n_mrsp_valid), .m0_rsp(n_mrsp),
    .m1_req_valid(s_mreq_valid), .m1_req_ready(s_mreq_ready), .m1_req(s_mreq),
    .m1_rsp_valid(s_mrsp_valid), .m1_rsp(s_mrsp),
    .ch_req_valid(mem_req_valid), .ch_req_ready(mem_req_ready), .ch_req(mem_req),
    .ch_rsp_valid(mem_rsp_valid), .ch_rsp_ready(mem_rsp_ready), .ch_rsp(mem_rsp)
  );

endmodule
