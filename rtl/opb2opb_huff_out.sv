// opb2opb_huff_out: coded-output path from the encoder to the SRAM.
//
// Pairs the 16-bit coded words of the encoder into 32-bit words (the first
// word of a pair in the upper half, so the bit stream stays MSB first),
// queues them in a 16-word FIFO and writes them to consecutive SRAM word
// addresses starting at a programmed destination. The FIFO absorbs the
// cycles in which the shared SRAM serves the DMA engines. A flush command
// writes a pending lone 16-bit word padded with zeros in its lower half.
//
// Interfaces
//   reg_req/reg_rsp  register slave:
//                      0  R/W: destination word address (next write)
//                      1  R: 32-bit words written since the last address
//                         write
//                      2  W: bit 0 = 1 flushes; R: bit 0 = busy (a flush
//                         pending, a half word waiting or the FIFO not empty)
//   in_*             16-bit coded word stream
//   mem_req/mem_rsp  SRAM client port (writes only)
// Timing: one 16-bit word per clock in; one SRAM write per grant. The FIFO
// follows the design; its depth, the pairing order, the flush and the
// address registers are this implementation's choices.
module opb2opb_huff_out
  import dhe_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  reg_req_t          reg_req,
  output reg_rsp_t          reg_rsp,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [OUT_W-1:0]  in_data,
  output mem_req_t          mem_req,
  input  mem_rsp_t          mem_rsp,
  output logic              sram_wait   // words wait in the FIFO while the SRAM serves others
);

  localparam int unsigned FAW = $clog2(FIFO_DEPTH);

  logic [OUT_W-1:0]   hi_q;
  logic               half_q, flush_q;
  logic               f_in_valid, f_in_ready, f_out_valid;
  logic [DATA_W-1:0]  f_in_data, f_out_data;
  logic [FAW:0]       f_count;
  logic [SRAM_AW-1:0] dst_q;
  logic [31:0]        written_q;
  logic               ack_q, access, busy;
  logic [1:0]         raddr_q;

  // a second half word completes a 32-bit word; a flush sends a lone half
  always_comb begin
    f_in_valid = 1'b0;
    f_in_data  = {hi_q, in_data};
    in_ready   = 1'b0;
    if (half_q && in_valid) begin
      f_in_valid = 1'b1;
      in_ready   = f_in_ready;
    end else if (half_q && flush_q) begin
      f_in_valid = 1'b1;
      f_in_data  = {hi_q, {OUT_W{1'b0}}};
    end else if (!half_q) begin
      in_ready   = !flush_q;
    end
  end

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (f_in_valid),
    .in_ready (f_in_ready),
    .in_data  (f_in_data),
    .out_valid(f_out_valid),
    .out_ready(mem_rsp.gnt),
    .out_data (f_out_data),
    .count    (f_count)
  );

  always_comb begin
    mem_req       = '0;
    mem_req.req   = f_out_valid;
    mem_req.we    = 1'b1;
    mem_req.addr  = dst_q;
    mem_req.wdata = f_out_data;
  end

  assign sram_wait = f_out_valid && !mem_rsp.gnt;
  assign busy   = flush_q || half_q || f_out_valid;
  assign access = reg_req.sel && !ack_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi_q      <= '0;
      half_q    <= 1'b0;
      flush_q   <= 1'b0;
      dst_q     <= '0;
      written_q <= '0;
      ack_q     <= 1'b0;
      raddr_q   <= '0;
    end else begin
      ack_q <= access;
      if (access) raddr_q <= reg_req.addr[1:0];
      if (!half_q && in_valid && in_ready) begin
        hi_q   <= in_data;
        half_q <= 1'b1;
      end else if (half_q && f_in_valid && f_in_ready) begin
        half_q <= 1'b0;
      end
      if (flush_q && (!half_q || (f_in_valid && f_in_ready && !in_valid)))
        flush_q <= 1'b0;
      if (f_out_valid && mem_rsp.gnt) begin
        dst_q     <= dst_q + 1'b1;
        written_q <= written_q + 32'd1;
      end
      if (access && reg_req.we && reg_req.addr[1:0] == 2'd0) begin
        dst_q     <= reg_req.wdata[SRAM_AW-1:0];
        written_q <= '0;
      end
      if (access && reg_req.we && reg_req.addr[1:0] == 2'd2 && reg_req.wdata[0])
        flush_q <= 1'b1;
    end
  end

  always_comb begin
    reg_rsp.ack   = ack_q;
    reg_rsp.rdata = '0;
    unique case (raddr_q)
      2'd0: reg_rsp.rdata = DATA_W'(dst_q);
      2'd1: reg_rsp.rdata = written_q;
      2'd2: reg_rsp.rdata = {31'b0, busy};
      default: ;
    endcase
  end

  // the SRAM port only writes when there is data
  assert property (@(posedge clk) disable iff (!rst_n) mem_req.req |-> f_count != '0);

endmodule
