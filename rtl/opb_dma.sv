// opb_dma: direct memory access engine from the external SRAM to a module.
//
// The processor writes a source word address and a length in 32-bit words,
// then starts the transfer. The engine issues one SRAM read per cycle while
// its 4-word buffer has room for the data of every read in flight, and
// passes the words on as a 32-bit stream in address order. Two instances
// exist in the encoder: one feeds the histogram unit, the other the
// quasi-static encoder (each through the 32-to-8-bit converter).
//
// Interfaces
//   reg_req/reg_rsp  register slave:
//                      0  R/W: source word address
//                      1  R/W: length in words
//                      2  W: bit 0 = 1 starts; R: bit 0 = busy (reads
//                         still to issue or data still buffered)
//                      3  R: words still to be read
//   mem_req/mem_rsp  SRAM client port (request taken when gnt; data one
//                    cycle later with rvalid)
//   out_*            32-bit word stream
// Timing: up to one word per cycle when the SRAM grants every request and
// the stream is not stalled. The register map and buffer size are this
// implementation's choices; the document gives only the engine's job.
module opb_dma
  import dhe_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  reg_req_t          reg_req,
  output reg_rsp_t          reg_rsp,
  output mem_req_t          mem_req,
  input  mem_rsp_t          mem_rsp,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data
);

  localparam int unsigned FDEPTH = 4;

  logic [SRAM_AW-1:0] addr_q;
  logic [SRAM_AW:0]   len_q, left_q;
  logic [2:0]         inflight;
  logic [2:0]         fcount;
  logic               issue, ack_q, access, busy;
  logic [1:0]         raddr_q;

  assign issue = (left_q != '0) && ((3'(fcount) + inflight) < 3'(FDEPTH));
  assign busy  = (left_q != '0) || (inflight != '0) || out_valid;

  always_comb begin
    mem_req       = '0;
    mem_req.req   = issue;
    mem_req.we    = 1'b0;
    mem_req.addr  = addr_q;
  end

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FDEPTH)) u_buf (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (mem_rsp.rvalid),
    .in_ready (),
    .in_data  (mem_rsp.rdata),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_data (out_data),
    .count    (fcount)
  );

  assign access = reg_req.sel && !ack_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q   <= '0;
      len_q    <= '0;
      left_q   <= '0;
      inflight <= '0;
      ack_q    <= 1'b0;
      raddr_q  <= '0;
    end else begin
      ack_q <= access;
      if (access) raddr_q <= reg_req.addr[1:0];
      inflight <= inflight + 3'(issue && mem_rsp.gnt) - 3'(mem_rsp.rvalid);
      if (issue && mem_rsp.gnt) begin
        addr_q <= addr_q + 1'b1;
        left_q <= left_q - 1'b1;
      end
      if (access && reg_req.we) begin
        unique case (reg_req.addr[1:0])
          2'd0: addr_q <= reg_req.wdata[SRAM_AW-1:0];
          2'd1: len_q  <= reg_req.wdata[SRAM_AW:0];
          2'd2: if (reg_req.wdata[0] && !busy) left_q <= len_q;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    reg_rsp.ack   = ack_q;
    reg_rsp.rdata = '0;
    unique case (raddr_q)
      2'd0: reg_rsp.rdata = DATA_W'(addr_q);
      2'd1: reg_rsp.rdata = DATA_W'(len_q);
      2'd2: reg_rsp.rdata = {31'b0, busy};
      2'd3: reg_rsp.rdata = DATA_W'(left_q);
      default: ;
    endcase
  end

  // the buffer never overflows: a read is only issued when its word has room
  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_rsp.rvalid |-> fcount < 3'(FDEPTH));

endmodule
