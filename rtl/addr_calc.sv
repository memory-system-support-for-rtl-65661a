// addr_calc: the shadow engine's address ALU (AddrCalc), one pipeline stage.
//
// Turns one indirection-vector entry into the address used for the memory
// access, according to what the remapping says the vector holds:
//   IV_VIRT : pseudo-virtual address = entry - vbase (offset into the special
//             virtual region whose page table the controller owns);
//   IV_INDEX: pseudo-virtual address = obj_pv + entry * 2**obj_log2;
//   IV_PHYS : the entry already is a real physical address; it is passed on
//             with 'bypass' set so that the MTLB does not translate it.
// The three interpretations are the described ones; the arithmetic for each is
// this design's reading of them.
//
// Timing: valid/ready register stage, result one cycle after acceptance, one
// entry per cycle. 'tag_in' is carried alongside (element number).
module addr_calc
  import dca_pkg::*;
#(
  parameter int TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  addr_t            entry,
  input  logic [TAG_W-1:0] tag_in,
  input  iv_kind_e         kind,
  input  addr_t            vbase,
  input  addr_t            obj_pv,
  input  logic [2:0]       obj_log2,
  output logic             out_valid,
  input  logic             out_ready,
  output addr_t            out_addr,
  output logic             out_bypass,
  output logic [TAG_W-1:0] out_tag
);

  addr_t calc;
  always_comb begin
    unique case (kind)
      IV_VIRT:  calc = entry - vbase;
      IV_INDEX: calc = obj_pv + (entry << obj_log2);
      default:  calc = entry;
    endcase
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_addr   <= '0;
      out_bypass <= 1'b0;
      out_tag    <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_addr   <= calc;
        out_bypass <= (kind == IV_PHYS);
        out_tag    <= tag_in;
      end
    end
  end

endmodule
