// opb_hist: histogram of the 8-bit input words, one word per clock.
//
// Each symbol value has one counter in a dual-port block RAM. Port 0 reads
// the counter addressed by the incoming word; one cycle later the count plus
// one is written through port 1 at the same address, taken from a register
// (the "FF") that delays the address by one cycle. So a read and a write
// overlap every cycle and a new word is accepted on every clock.
// Because the block RAM needs a whole cycle to read, a counter written in the
// cycle its next read was issued would be read stale; such a read is replaced
// by the value just written (forwarding). Counters saturate at 2**CNT_W-1.
// An address multiplexer on port 1 lets the register bus clear all counters
// (256 cycles) and read the result.
//
// Interfaces
//   reg_req/reg_rsp  register slave (the COPB bus):
//                      0x000-0x0FF  R: counter of symbol addr
//                      0x100        W: bit 0 = 1 clears all counters;
//                                   R: bit 0 = clear in progress
//                      0x101        R: words counted since the last clear
//   in_*             8-bit input word stream (the DOPB bus, fed by the DMA)
// Timing: one input word per cycle; a counter read is acknowledged two or
// more cycles after sel (it waits for port 1 to be free); other accesses one
// cycle after sel. The input is held off while counters are cleared or read.
// The two-port read/write scheme follows the design; forwarding, saturation,
// the register map and the stream handshake are this implementation's own.
module opb_hist
  import dhe_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  reg_req_t         reg_req,
  output reg_rsp_t         reg_rsp,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [SYM_W-1:0] in_data,
  output logic             fwd_hit,    // a forwarded count was used this cycle
  output logic             sat_hit     // a counter stayed at its maximum
);

  logic             in_fire;
  logic [CNT_W-1:0] dout0, dout1, cur, inc;
  logic             b_en, b_we;
  logic [SYM_W-1:0] b_addr;
  logic [CNT_W-1:0] b_wdata;

  // pipeline: read stage -> increment/write stage
  logic             p_valid;
  logic [SYM_W-1:0] p_addr;
  logic             wl_valid;
  logic [SYM_W-1:0] wl_addr;
  logic [CNT_W-1:0] wl_val;

  // clear and bus read
  logic             clr_busy;
  logic [SYM_W-1:0] clr_addr;
  logic             rd_pend, rd_issued, ack_q, access, bus_busy;
  logic [8:0] addr_q;  // region offset; the region bits are decoded by the bus
  logic [31:0]      word_cnt;

  assign in_ready = !clr_busy && !rd_pend && !rd_issued;
  assign in_fire  = in_valid && in_ready;

  dp_bram #(.DEPTH(NSYM), .WIDTH(CNT_W)) u_ram (
    .clk    (clk),
    .a_en   (in_fire),
    .a_we   (1'b0),
    .a_addr (in_data),
    .a_wdata('0),
    .a_rdata(dout0),
    .b_en   (b_en),
    .b_we   (b_we),
    .b_addr (b_addr),
    .b_wdata(b_wdata),
    .b_rdata(dout1)
  );

  assign fwd_hit = p_valid && wl_valid && (wl_addr == p_addr);
  assign cur     = fwd_hit ? wl_val : dout0;
  assign inc     = (&cur) ? cur : cur + CNT_W'(1);
  assign sat_hit = p_valid && (&cur);

  // port 1 address multiplexer: increment write, clear, bus read
  always_comb begin
    b_en    = 1'b0;
    b_we    = 1'b0;
    b_addr  = p_addr;
    b_wdata = inc;
    if (p_valid) begin
      b_en = 1'b1;
      b_we = 1'b1;
    end else if (clr_busy) begin
      b_en    = 1'b1;
      b_we    = 1'b1;
      b_addr  = clr_addr;
      b_wdata = '0;
    end else if (rd_pend) begin
      b_en   = 1'b1;
      b_addr = addr_q[SYM_W-1:0];
    end
  end

  assign bus_busy = ack_q || rd_pend || rd_issued;
  assign access   = reg_req.sel && !bus_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid   <= 1'b0;
      p_addr    <= '0;
      wl_valid  <= 1'b0;
      wl_addr   <= '0;
      wl_val    <= '0;
      clr_busy  <= 1'b0;
      clr_addr  <= '0;
      rd_pend   <= 1'b0;
      rd_issued <= 1'b0;
      ack_q     <= 1'b0;
      addr_q    <= '0;
      word_cnt  <= '0;
    end else begin
      p_valid  <= in_fire;
      if (in_fire) p_addr <= in_data;
      wl_valid <= p_valid;
      wl_addr  <= p_addr;
      wl_val   <= inc;
      if (p_valid) word_cnt <= word_cnt + 32'd1;

      if (clr_busy && !p_valid) begin
        clr_addr <= clr_addr + SYM_W'(1);
        if (&clr_addr) clr_busy <= 1'b0;
      end

      ack_q <= 1'b0;
      rd_issued <= 1'b0;
      if (access) begin
        addr_q <= reg_req.addr[8:0];
        if (!reg_req.we && reg_req.addr[8] == 1'b0) rd_pend <= 1'b1;
        else ack_q <= 1'b1;
        if (reg_req.we && reg_req.addr[8:0] == 9'h100 && reg_req.wdata[0]) begin
          clr_busy <= 1'b1;
          clr_addr <= '0;
          word_cnt <= '0;
        end
      end
      if (rd_pend && !p_valid && !clr_busy) begin
        rd_pend   <= 1'b0;
        rd_issued <= 1'b1;
      end
      if (rd_issued) ack_q <= 1'b1;
    end
  end

  always_comb begin
    reg_rsp.ack   = ack_q;
    reg_rsp.rdata = '0;
    if (addr_q[8] == 1'b0)          reg_rsp.rdata = {{(DATA_W-CNT_W){1'b0}}, dout1};
    else if (addr_q[8:0] == 9'h100) reg_rsp.rdata = {31'b0, clr_busy};
    else if (addr_q[8:0] == 9'h101) reg_rsp.rdata = word_cnt;
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   reg_req.sel && !bus_busy |=> reg_req.sel);

endmodule
