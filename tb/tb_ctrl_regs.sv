// tb_ctrl_regs: writes every field of every register set through the
// configuration port and compares the register outputs with a copy kept by
// the test; checks the reset state, that sets do not disturb one another and
// that a flush write gives exactly one flush pulse.
module tb_ctrl_regs;
  import dca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we; logic [2:0] cfg_set; cfg_field_e cfg_field; logic [31:0] cfg_wdata;
  map_cfg_t maps [8];
  addr_t pt_base;
  logic flush;
  ctrl_regs dut (.*);

  int checks = 0, failures = 0;
  map_cfg_t ref_m [8];
  addr_t ref_pt;
  int n_flush = 0;
  always @(posedge clk) if (rst_n && flush) n_flush++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(int s, cfg_field_e f, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_set = 3'(s); cfg_field = f; cfg_wdata = d;
    case (f)
      F_CTRL: begin
        ref_m[s].valid = d[0]; ref_m[s].dca = d[1]; ref_m[s].addr_log2 = d[4:2];
        ref_m[s].obj_log2 = d[7:5]; ref_m[s].kind = iv_kind_e'(d[9:8]);
      end
      F_DATABASE: ref_m[s].data_base = d;
      F_ADDRBASE: ref_m[s].addr_base = d;
      F_IVPA:     ref_m[s].iv_pa = d;
      F_NELEMS:   ref_m[s].n_elems = d[23:0];
      F_VBASE:    ref_m[s].vbase = d;
      F_OBJPV:    ref_m[s].obj_pv = d;
      F_PTBASE:   ref_pt = d;
      default: ;
    endcase
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_set = 0; cfg_field = F_CTRL; cfg_wdata = 0;
    for (int s = 0; s < 8; s++) ref_m[s] = '0;
    ref_pt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 8; s++) check(maps[s] == '0, "reset clears all sets");
    for (int r = 0; r < 200; r++) begin
      automatic int s = $urandom_range(7);
      automatic cfg_field_e f = cfg_field_e'($urandom_range(7));
      automatic logic [31:0] d = $urandom;
      if (f == F_CTRL) d[9:8] = 2'($urandom_range(2));
      wr(s, f, d);
      for (int t = 0; t < 8; t++) check(maps[t] == ref_m[t], $sformatf("set %0d after write %0d", t, r));
      check(pt_base == ref_pt, "page-table base");
    end
    check(n_flush == 0, "no flush without a flush write");
    wr(3, F_FLUSH, 0);
    @(negedge clk);
    check(n_flush == 1, "one flush pulse per flush write");
    for (int t = 0; t < 8; t++) check(maps[t] == ref_m[t], "flush leaves registers alone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
