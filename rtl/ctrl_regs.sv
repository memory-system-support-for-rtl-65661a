// ctrl_regs: the shadow engine's remapping control registers.
//
// Eight register sets (NUM_SETS) each describe one remapping: where its data
// (alias) region and, for dynamic cache line assembly, its address region sit
// in shadow space, where the indirection vector lives in real memory, the size
// of an address and of a gathered object, and how IV entries are interpreted.
// A global register holds the physical base of the memory controller page
// table. The operating system writes them through a simple 32-bit register
// port: one field of one set per cycle (cfg_field selects, see cfg_field_e).
// Writing F_FLUSH pulses flush for one cycle so that cached translations and
// IV lines are dropped after a reconfiguration.
//
// The number of sets and the content of a set follow the described system;
// the write port, field encoding and reset values (all sets invalid) are this
// design's choice. Outputs are registered; a write is visible the next cycle.
module ctrl_regs
  import dca_pkg::*;
#(
  parameter int NUM_SETS = NUM_MAPS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        cfg_we,
  input  logic [$clog2(NUM_SETS)-1:0] cfg_set,
  input  cfg_field_e                  cfg_field,
  input  logic [31:0]                 cfg_wdata,
  output map_cfg_t                    maps [NUM_SETS],
  output addr_t                       pt_base,
  output logic                        flush
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_SETS; i++) maps[i] <= '0;
      pt_base <= '0;
      flush   <= 1'b0;
    end else begin
      flush <= cfg_we && (cfg_field == F_FLUSH);
      if (cfg_we) begin
        unique case (cfg_field)
          F_CTRL: begin
            maps[cfg_set].valid     <= cfg_wdata[0];
            maps[cfg_set].dca       <= cfg_wdata[1];
            maps[cfg_set].addr_log2 <= cfg_wdata[4:2];
            maps[cfg_set].obj_log2  <= cfg_wdata[7:5];
            maps[cfg_set].kind      <= iv_kind_e'(cfg_wdata[9:8]);
          end
          F_DATABASE: maps[cfg_set].data_base <= cfg_wdata;
          F_ADDRBASE: maps[cfg_set].addr_base <= cfg_wdata;
          F_IVPA:     maps[cfg_set].iv_pa     <= cfg_wdata;
          F_NELEMS:   maps[cfg_set].n_elems   <= cfg_wdata[23:0];
          F_VBASE:    maps[cfg_set].vbase     <= cfg_wdata;
          F_OBJPV:    maps[cfg_set].obj_pv    <= cfg_wdata;
          F_PTBASE:   pt_base                 <= cfg_wdata;
          F_FLUSH:    ;
          default:    ;
        endcase
      end
    end
  end

endmodule
