// tb_dram_if: two masters issue random reads (and some writes) at the same
// time through the DRAM interface into a behavioural four-channel DRAM that
// stalls and answers out of order. Checks that every request leaves on the
// channel its address selects, that every read returns to the master that
// issued it with that master's own tag and the data at its address, that
// neither master starves, that both masters were granted in conflicting
// cycles, that the two masters were served on different channels in the same
// cycle, and that responses were held back when two channels answered the
// same master at once.
module tb_dram_if;
  import dca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic m0_req_valid, m0_req_ready, m0_rsp_valid, m1_req_valid, m1_req_ready, m1_rsp_valid;
  mem_req_t m0_req, m1_req;
  mem_rsp_t m0_rsp, m1_rsp;
  logic     ch_req_valid [4], ch_req_ready [4], ch_rsp_valid [4], ch_rsp_ready [4];
  mem_req_t ch_req [4];
  mem_rsp_t ch_rsp [4];
  dram_if dut (.*);
  dram_channels #(.LAT(6), .STALL_PCT(20), .REORDER(1)) dram (
    .clk, .rst_n, .req_valid(ch_req_valid), .req_ready(ch_req_ready), .req(ch_req),
    .rsp_valid(ch_rsp_valid), .rsp_ready(ch_rsp_ready), .rsp(ch_rsp)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t exp0 [logic [10:0]], exp1 [logic [10:0]];
  int sent0 = 0, sent1 = 0, got0 = 0, got1 = 0, conflicts = 0, parallel = 0, held = 0;
  logic [10:0] id0 = 0, id1 = 0;

  function automatic mem_req_t mk(bit we, logic [10:0] id);
    mem_req_t r;
    // a few channels get most of the traffic, so that conflicts occur
    r.we = we; r.addr = {$urandom} & 32'h00FF_FFF8;
    if ($urandom_range(1)) r.addr[8:7] = 2'd2;
    r.wdata = {$urandom, $urandom}; r.wstrb = 8'hFF; r.id = {1'b0, id};
    return r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    automatic int nrsp0 = 0, nrsp1 = 0;
    for (int c = 0; c < 4; c++) begin
      if (ch_req_valid[c] && ch_req_ready[c])
        check(32'(ch_req[c].addr[8:7]) == c, "request on the channel its address selects");
      if (ch_rsp_valid[c] && !ch_rsp[c].id[11]) nrsp0++;
      if (ch_rsp_valid[c] &&  ch_rsp[c].id[11]) nrsp1++;
    end
    if (nrsp0 > 1 || nrsp1 > 1) held++;
    if (m0_req_valid && m1_req_valid && m0_req.addr[8:7] == m1_req.addr[8:7]) conflicts++;
    if (m0_req_valid && m0_req_ready && m1_req_valid && m1_req_ready) parallel++;
    if (m0_rsp_valid) begin
      check(exp0.exists(m0_rsp.id[10:0]) && exp0[m0_rsp.id[10:0]] == m0_rsp.rdata && !m0_rsp.id[11],
            "master 0 response");
      exp0.delete(m0_rsp.id[10:0]); got0++;
    end
    if (m1_rsp_valid) begin
      check(exp1.exists(m1_rsp.id[10:0]) && exp1[m1_rsp.id[10:0]] == m1_rsp.rdata && !m1_rsp.id[11],
            "master 1 response");
      exp1.delete(m1_rsp.id[10:0]); got1++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m0_req_valid = 0; m1_req_valid = 0; m0_req = '0; m1_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 3000; c++) begin
      // offer new requests where the last one was taken
      if (!m0_req_valid && $urandom_range(3) != 0) begin
        m0_req = mk($urandom_range(4) == 0, id0); m0_req_valid = 1;
      end
      if (!m1_req_valid && $urandom_range(3) != 0) begin
        m1_req = mk(0, id1); m1_req_valid = 1;
      end
      #1;
      // the DRAM data for a read is known when it is accepted
      if (m0_req_valid && m0_req_ready) begin
        if (!m0_req.we) exp0[id0] = dram.peek(m0_req.addr);
        sent0++; id0++;
      end
      if (m1_req_valid && m1_req_ready) begin
        exp1[id1] = dram.peek(m1_req.addr);
        sent1++; id1++;
      end
      @(posedge clk);
      @(negedge clk);
      // drop requests that were accepted (their tag is behind the counter)
      if (m1_req_valid && m1_req.id[10:0] != id1) m1_req_valid = 0;
      if (m0_req_valid && m0_req.id[10:0] != id0) m0_req_valid = 0;
    end
    m0_req_valid = 0; m1_req_valid = 0;
    repeat (60) @(negedge clk);
    check(exp0.size() == 0 && exp1.size() == 0, "every read answered");
    check(sent0 > 500 && sent1 > 500, "neither master starves");
    check(conflicts > 100, "masters competed for a channel");
    check(parallel > 100, "masters served on different channels in the same cycle");
    check(held > 50, "responses held while another channel answered the same master");
    $display("sent %0d/%0d conflicts %0d parallel %0d held %0d", sent0, sent1, conflicts, parallel, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
