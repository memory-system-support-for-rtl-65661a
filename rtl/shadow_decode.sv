// shadow_decode: the controller's address check at the system-bus side.
//
// Physical addresses at or above the installed DRAM size (DRAM_BYTES, default
// 1 GB, so 0x4000_0000..0xFFFF_FFFF is shadow space in a 32-bit system) are
// shadow addresses and go to the shadow engine; all others are normal
// addresses and go to the dense line path. The block forwards each bus
// transaction to one of the two with valid/ready, keeps at most one
// transaction outstanding (busy until the chosen side answers) and returns
// that side's response.
//
// The address split follows the described system; the single-outstanding rule
// and the handshake are this design's choice.
module shadow_decode
  import dca_pkg::*;
#(
  parameter logic [PA_W:0] DRAM_BYTES = 33'h0_4000_0000
) (
  input  logic     clk,
  input  logic     rst_n,
  // system bus side
  input  logic     bus_req_valid,
  output logic     bus_req_ready,
  input  bus_req_t bus_req,
  output logic     bus_rsp_valid,
  output line_t    bus_rsp_line,
  output logic     is_shadow,
  // normal path
  output logic     n_req_valid,
  input  logic     n_req_ready,
  input  logic     n_rsp_valid,
  input  line_t    n_rsp_line,
  // shadow engine
  output logic     s_req_valid,
  input  logic     s_req_ready,
  input  logic     s_rsp_valid,
  input  line_t    s_rsp_line
);

  logic busy;

  assign is_shadow     = {1'b0, bus_req.addr} >= DRAM_BYTES;
  assign n_req_valid   = bus_req_valid && !busy && !is_shadow;
  assign s_req_valid   = bus_req_valid && !busy &&  is_shadow;
  assign bus_req_ready = !busy && (is_shadow ? s_req_ready : n_req_ready);
  assign bus_rsp_valid = n_rsp_valid || s_rsp_valid;
  assign bus_rsp_line  = s_rsp_valid ? s_rsp_line : n_rsp_line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           busy <= 1'b0;
    else if (bus_req_valid && bus_req_ready) busy <= 1'b1;
    else if (bus_rsp_valid)               busy <= 1'b0;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(n_rsp_valid && s_rsp_valid));

endmodule
