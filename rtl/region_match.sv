// region_match: finds which remapping a shadow address belongs to.
//
// Every valid register set names a data (alias) region of n_elems objects of
// 2**obj_log2 bytes starting at data_base, and, when its dca bit is set, an
// address region of n_elems entries of 2**addr_log2 bytes starting at
// addr_base. The element counts of the two regions are equal, as the DCA
// scheme requires. This block compares the address against all regions in
// parallel and reports the first hit (lowest set number wins if the OS has
// configured overlapping regions, which is this design's choice) together with
// the byte offset of the address inside the region.
//
// Purely combinational.
module region_match
  import dca_pkg::*;
#(
  parameter int NUM_SETS = NUM_MAPS
) (
  input  addr_t                       addr,
  input  map_cfg_t                    maps [NUM_SETS],
  output logic                        hit,
  output logic [$clog2(NUM_SETS)-1:0] set_idx,
  output logic                        is_data,   // 1: data region, 0: address region
  output addr_t                       offset     // addr minus region base
);

  always_comb begin
    hit     = 1'b0;
    set_idx = '0;
    is_data = 1'b0;
    offset  = '0;
    for (int i = NUM_SETS - 1; i >= 0; i--) begin
      // Region sizes in bytes; 34 bits so that a region may end at 4 GB.
      logic [33:0] dsize, asize, doff, aoff;
      dsize = {10'd0, maps[i].n_elems} << maps[i].obj_log2;
      asize = {10'd0, maps[i].n_elems} << maps[i].addr_log2;
      doff  = {2'b00, addr} - {2'b00, maps[i].data_base};
      aoff  = {2'b00, addr} - {2'b00, maps[i].addr_base};
      if (maps[i].valid) begin
        if (maps[i].dca && aoff < asize) begin
          hit     = 1'b1;
          set_idx = i[$clog2(NUM_SETS)-1:0];
          is_data = 1'b0;
          offset  = aoff[PA_W-1:0];
        end
        if (doff < dsize) begin
          hit     = 1'b1;
          set_idx = i[$clog2(NUM_SETS)-1:0];
          is_data = 1'b1;
          offset  = doff[PA_W-1:0];
        end
      end
    end
  end

endmodule
