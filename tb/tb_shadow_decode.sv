// tb_shadow_decode: sends bus transactions to addresses around the 1 GB
// boundary and elsewhere, with two simple responders standing in for the
// normal path and the shadow engine. Checks that each request reaches exactly
// the side its address calls for, that a second request waits until the
// first is answered, and that the answering side's line comes back.
module tb_shadow_decode;
  import dca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bus_req_valid, bus_req_ready, bus_rsp_valid, is_shadow;
  bus_req_t bus_req;
  line_t bus_rsp_line, n_rsp_line, s_rsp_line;
  logic n_req_valid, n_req_ready, n_rsp_valid, s_req_valid, s_req_ready, s_rsp_valid;
  shadow_decode dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // responders: accept when idle, answer a few cycles later with a tagged line
  int n_got = 0, s_got = 0, overlap = 0, outstanding = 0;
  assign n_req_ready = 1'b1;
  assign s_req_ready = 1'b1;
  initial begin
    n_rsp_valid = 0; s_rsp_valid = 0; n_rsp_line = '0; s_rsp_line = '0;
    forever begin
      @(posedge clk);
      if (rst_n && (n_req_valid || s_req_valid)) begin
        automatic bit sh = s_req_valid;
        automatic addr_t a = bus_req.addr;
        if (sh) s_got++; else n_got++;
        repeat ($urandom_range(1, 6)) @(posedge clk);
        @(negedge clk);
        if (sh) begin s_rsp_valid = 1; s_rsp_line = {992'd1, a}; end
        else    begin n_rsp_valid = 1; n_rsp_line = {992'd2, a}; end
        @(negedge clk);
        s_rsp_valid = 0; n_rsp_valid = 0;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_req_valid = 0; bus_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 300; r++) begin
      automatic addr_t a;
      automatic bit exp_sh;
      automatic int n0 = n_got, s0 = s_got;
      case ($urandom_range(3))
        0: a = 32'h3FFF_FF80;
        1: a = 32'h4000_0000;
        default: a = {$urandom} & 32'hFFFF_FF80;
      endcase
      exp_sh = (a >= 32'h4000_0000);
      @(negedge clk);
      bus_req_valid = 1; bus_req.addr = a; bus_req.we = 1'($urandom);
      #1;
      check(is_shadow == exp_sh, $sformatf("classification of %h", a));
      @(negedge clk);
      bus_req_valid = 0;
      while (!bus_rsp_valid) begin
        // a new request must be held off while one is outstanding
        check(!bus_req_ready, "one transaction at a time");
        @(negedge clk);
      end
      check(bus_rsp_line == {992'(exp_sh ? 1 : 2), a}, "response from the right side");
      check((s_got - s0) == int'(exp_sh) && (n_got - n0) == int'(!exp_sh), "routed to one side");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
