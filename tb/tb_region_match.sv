// tb_region_match: random register sets and random addresses near the region
// boundaries; the expected match (first set whose data or address region holds
// the address, data region before address region within a set) is computed
// here and compared with the block's hit, set, region kind and offset.
module tb_region_match;
  import dca_pkg::*;
  map_cfg_t maps [8];
  addr_t addr, offset;
  logic hit, is_data;
  logic [2:0] set_idx;
  region_match dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 300; r++) begin
      for (int s = 0; s < 8; s++) begin
        maps[s] = '0;
        maps[s].valid     = ($urandom_range(3) != 0);
        maps[s].dca       = $urandom_range(1);
        maps[s].n_elems   = 24'($urandom_range(1, 256));
        maps[s].addr_log2 = 3'($urandom_range(2, 3));
        maps[s].obj_log2  = 3'($urandom_range(2, 7));
        maps[s].data_base = 32'h4000_0000 + 32'($urandom_range(0, 63)) * 32'h0010_0000;
        maps[s].addr_base = 32'h8000_0000 + 32'($urandom_range(0, 63)) * 32'h0010_0000;
      end
      for (int q = 0; q < 20; q++) begin
        automatic int s = $urandom_range(7);
        automatic bit  hit_e = 0, data_e = 0;
        automatic int  set_e = 0;
        automatic longint off_e = 0;
        automatic longint base = ($urandom_range(1)) ? maps[s].data_base : maps[s].addr_base;
        automatic longint span = longint'(maps[s].n_elems) << 7;
        addr = 32'(base + longint'($urandom_range(0, 32'(span + 256))) - 128);
        // probe the exact ends of the chosen set's regions as well
        case ($urandom_range(3))
          0: addr = 32'(longint'(maps[s].data_base) + (longint'(maps[s].n_elems) << maps[s].obj_log2));
          1: addr = 32'(longint'(maps[s].data_base) + (longint'(maps[s].n_elems) << maps[s].obj_log2) - 1);
          2: addr = 32'(longint'(maps[s].addr_base) + (longint'(maps[s].n_elems) << maps[s].addr_log2));
          default: ;
        endcase
        for (int t = 7; t >= 0; t--) begin
          automatic longint ds = longint'(maps[t].n_elems) << maps[t].obj_log2;
          automatic longint as = longint'(maps[t].n_elems) << maps[t].addr_log2;
          automatic longint a  = longint'(addr);
          if (maps[t].valid && maps[t].dca && a >= maps[t].addr_base && a < maps[t].addr_base + as) begin
            hit_e = 1; data_e = 0; set_e = t; off_e = a - maps[t].addr_base;
          end
          if (maps[t].valid && a >= maps[t].data_base && a < maps[t].data_base + ds) begin
            hit_e = 1; data_e = 1; set_e = t; off_e = a - maps[t].data_base;
          end
        end
        #1;
        check(hit == hit_e, $sformatf("hit for %h", addr));
        if (hit_e) begin
          check(set_idx == 3'(set_e), "set");
          check(is_data == data_e, "region kind");
          check(offset == 32'(off_e), "offset");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
