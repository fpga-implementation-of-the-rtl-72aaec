// opb_huff: quasi-static Huffman encoder.
//
// Every 8-bit input word addresses a 256-entry code table held in a
// dual-port block RAM. Each entry is 16 bits: the code in the 12 LSBs and
// its length in the 4 MSBs. The table output feeds huff_packer (the "barrel
// shifter"), which concatenates the variable-length codes into 16-bit output
// words. Port A of the table belongs to the register bus, so the processor
// can rewrite the table between frames (that is what makes the encoder
// quasi-static); port B does the look-ups, one input word per clock.
//
// Interfaces
//   reg_req/reg_rsp  register slave (stands for the OPB slave bus), word
//                    addresses inside the block:
//                      0x000-0x0FF  code table entry of symbol addr (R/W)
//                      0x100        W: bit 0 = 1 flushes the last partial
//                                   word; R: bit 0 = flush in progress
//                      0x101        R: input words encoded; W: clear
//                      0x102        R: code bits produced; W: clear
//   in_*             8-bit input word stream (fed by the DMA)
//   out_*            16-bit coded word stream (stands for the OPB master)
// Timing: a register access is acknowledged one cycle after sel. The input
// is taken in the cycle in_valid && in_ready; its code reaches the packer
// one cycle later (block RAM read latency). Table layout, 8-bit input and
// 16-bit output follow the design; the register map and the valid/ready
// streams in place of OPB transfers are this implementation's choices.
module opb_huff
  import dhe_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  reg_req_t         reg_req,
  output reg_rsp_t         reg_rsp,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [SYM_W-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [OUT_W-1:0] out_data
);

  // ---------------- code table ----------------
  logic             a_en, a_we;
  logic [LUT_W-1:0] a_rdata;
  lut_entry_t       b_rdata;
  logic             in_fire;

  assign in_fire = in_valid && in_ready;

  dp_bram #(.DEPTH(NSYM), .WIDTH(LUT_W)) u_lut (
    .clk    (clk),
    .a_en   (a_en),
    .a_we   (a_we),
    .a_addr (reg_req.addr[SYM_W-1:0]),
    .a_wdata(reg_req.wdata[LUT_W-1:0]),
    .a_rdata(a_rdata),
    .b_en   (in_fire),
    .b_we   (1'b0),
    .b_addr (in_data),
    .b_wdata('0),
    .b_rdata(b_rdata)
  );

  // ---------------- look-up stage ----------------
  logic s1_valid, pk_ready, flush, flushing;

  assign in_ready = !s1_valid || pk_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        s1_valid <= 1'b0;
    else if (in_ready) s1_valid <= in_valid;
  end

  huff_packer u_pack (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s1_valid),
    .in_ready (pk_ready),
    .in_len   (b_rdata.len),
    .in_code  (b_rdata.code),
    .flush    (flush),
    .flushing (flushing),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_data (out_data)
  );

  // ---------------- counters ----------------
  logic [31:0] sym_cnt, bit_cnt;
  logic        pk_take;
  assign pk_take = s1_valid && pk_ready;

  // ---------------- register slave ----------------
  logic              ack_q, access, is_lut;
  logic [8:0] addr_q;  // region offset; the region bits are decoded by the bus

  assign access = reg_req.sel && !ack_q;
  assign is_lut = (reg_req.addr[8] == 1'b0);
  assign a_en   = access && is_lut;
  assign a_we   = reg_req.we;
  assign flush  = access && reg_req.we && reg_req.addr[8:0] == 9'h100 && reg_req.wdata[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q   <= 1'b0;
      addr_q  <= '0;
      sym_cnt <= '0;
      bit_cnt <= '0;
    end else begin
      ack_q <= access;
      if (access) addr_q <= reg_req.addr[8:0];
      if (access && reg_req.we && reg_req.addr[8:0] == 9'h101) sym_cnt <= '0;
      else if (pk_take) sym_cnt <= sym_cnt + 32'd1;
      if (access && reg_req.we && reg_req.addr[8:0] == 9'h102) bit_cnt <= '0;
      else if (pk_take) bit_cnt <= bit_cnt + 32'((b_rdata.len > LEN_W'(CODE_W)) ? LEN_W'(CODE_W) : b_rdata.len);
    end
  end

  always_comb begin
    reg_rsp.ack   = ack_q;
    reg_rsp.rdata = '0;
    unique case (addr_q[8:0])
      9'h100:  reg_rsp.rdata = {31'b0, flushing};
      9'h101:  reg_rsp.rdata = sym_cnt;
      9'h102:  reg_rsp.rdata = bit_cnt;
      default: if (addr_q[8] == 1'b0) reg_rsp.rdata = {{(DATA_W-LUT_W){1'b0}}, a_rdata};
    endcase
  end

  // a request stays put until it is acknowledged
  assert property (@(posedge clk) disable iff (!rst_n)
                   reg_req.sel && !ack_q |=> reg_req.sel);

endmodule
