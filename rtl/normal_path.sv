// normal_path: dense cache-line transfers for unremapped physical addresses.
//
// A line fill is split into the sixteen 8-byte words of the 128-byte line,
// read through the memory port (towards the DRAM interface) one request per
// cycle, as long as the port accepts, and reassembled in a line register as
// the tagged responses come back, in any order; the line is then returned on
// the bus. A write-back is written as sixteen word writes and acknowledged
// once all are accepted. Each accepted write-back is announced on snoop_* so
// that the shadow engine can drop a stale copy of an indirection vector held
// in its IV buffer.
//
// The word-by-word transfer over an 8-byte path follows the described memory
// system; critical-word-first ordering is not modelled (words are requested in
// address order). One transaction at a time. Response tag = word index.
module normal_path
  import dca_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  bus_req_t req,
  output logic     rsp_valid,
  output line_t    rsp_line,
  output logic     snoop_valid,
  output addr_t    snoop_addr,
  output logic     mem_req_valid,
  input  logic     mem_req_ready,
  output mem_req_t mem_req,
  input  logic     mem_rsp_valid,
  input  mem_rsp_t mem_rsp
);

  typedef enum logic [1:0] {N_IDLE, N_RUN, N_RESP} nstate_e;
  nstate_e    state;
  logic       t_we;
  addr_t      t_addr;
  line_t      buf_line;
  logic [4:0] icnt, rcnt;

  assign req_ready     = (state == N_IDLE);
  assign mem_req_valid = (state == N_RUN) && (icnt < 5'd16);
  always_comb begin
    mem_req       = '0;
    mem_req.we    = t_we;
    mem_req.addr  = t_addr + PA_W'({icnt[3:0], 3'b000});
    mem_req.wdata = buf_line[icnt[3:0]*WORD_W +: WORD_W];
    mem_req.wstrb = 8'hFF;
    mem_req.id    = ID_W'(icnt[3:0]);
  end
  assign rsp_line = buf_line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= N_IDLE;
      t_we        <= 1'b0;
      t_addr      <= '0;
      buf_line    <= '0;
      icnt        <= '0;
      rcnt        <= '0;
      rsp_valid   <= 1'b0;
      snoop_valid <= 1'b0;
      snoop_addr  <= '0;
    end else begin
      rsp_valid   <= 1'b0;
      snoop_valid <= 1'b0;
      unique case (state)
        N_IDLE: if (req_valid) begin
          t_we        <= req.we;
          t_addr      <= {req.addr[PA_W-1:LINE_OFS], {LINE_OFS{1'b0}}};
          buf_line    <= req.wline;
          icnt        <= '0;
          rcnt        <= '0;
          snoop_valid <= req.we;
          snoop_addr  <= req.addr;
          state       <= N_RUN;
        end
        N_RUN: begin
          if (mem_req_valid && mem_req_ready) icnt <= icnt + 1'b1;
          if (mem_rsp_valid) begin
            buf_line[mem_rsp.id[3:0]*WORD_W +: WORD_W] <= mem_rsp.rdata;
            rcnt <= rcnt + 1'b1;
          end
          if (t_we ? (icnt == 5'd16) : (rcnt == 5'd16)) state <= N_RESP;
        end
        N_RESP: begin
          rsp_valid <= 1'b1;
          state     <= N_IDLE;
        end
        default: state <= N_IDLE;
      endcase
    end
  end

endmodule
