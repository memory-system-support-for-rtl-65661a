// tb_addr_calc: streams random indirection-vector entries of all three kinds
// through the AddrCalc stage with random back-pressure and compares each
// result with the address computed here (entry - vbase, obj_pv + entry scaled
// by the object size, or the entry itself with bypass set). Checks the
// one-cycle latency and one result per cycle without back-pressure.
module tb_addr_calc;
  import dca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready, out_bypass;
  addr_t entry, vbase, obj_pv, out_addr;
  logic [7:0] tag_in, out_tag;
  iv_kind_e kind;
  logic [2:0] obj_log2;
  addr_calc #(.TAG_W(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { addr_t a; logic byp; logic [7:0] t; } exp_t;
  exp_t q[$];
  int n_out = 0, bp = 0;
  longint cyc = 0, t_in0 = -1, t_out0 = -1;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      exp_t e;
      unique case (kind)
        IV_VIRT:  begin e.a = entry - vbase; e.byp = 0; end
        IV_INDEX: begin e.a = obj_pv + entry * (32'd1 << obj_log2); e.byp = 0; end
        default:  begin e.a = entry; e.byp = 1; end
      endcase
      e.t = tag_in;
      q.push_back(e);
      if (t_in0 < 0) t_in0 = cyc;
    end
    if (out_valid && out_ready) begin
      automatic exp_t e = q.pop_front();
      check(out_addr == e.a && out_bypass == e.byp && out_tag == e.t, "result");
      if (t_out0 < 0) t_out0 = cyc;
      n_out++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 1; entry = 0; tag_in = 0; kind = IV_VIRT;
    vbase = 32'h1000_0000; obj_pv = 32'h0004_0000; obj_log2 = 2;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // phase 1: no back-pressure, 32 entries back to back
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      in_valid = 1; entry = vbase + 32'(i * 4); tag_in = 8'(i);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(negedge clk);
    check(n_out == 32, "32 results");
    check(t_out0 - t_in0 == 1, "one-cycle latency");
    // phase 2: random kinds and back-pressure
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (!(in_valid && !in_ready)) begin
        in_valid = $urandom_range(1);
        entry    = $urandom;
        tag_in   = 8'($urandom);
        kind     = iv_kind_e'($urandom_range(2));
        obj_log2 = 3'($urandom_range(2, 7));
      end
      out_ready = ($urandom_range(3) != 0);
      bp += !out_ready;
    end
    @(negedge clk);
    in_valid = 0; out_ready = 1;
    repeat (3) @(negedge clk);
    check(q.size() == 0, "nothing lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
