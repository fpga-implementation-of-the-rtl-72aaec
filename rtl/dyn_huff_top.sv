// dyn_huff_top: dynamic Huffman encoder, hardware part.
//
// Frames of 8-bit words (image pixels) lie in an external SRAM. Three
// hardware stages can work on three different frames at once:
//   * opb_hist counts the symbol histogram of frame k+1 (fed by a DMA engine
//     and a 32-to-8-bit converter),
//   * opb_sort, with its table memory bram_2, sorts histogram elements by
//     insertion, one element per command, for the processor that builds the
//     Huffman tree and the new code table,
//   * opb_huff encodes frame k with the code table computed from frame k's
//     histogram (fed by a second DMA engine and converter); its 16-bit coded
//     words are paired into 32-bit words and written back to the SRAM.
// The processor that runs the tree construction and sequences the system
// (a soft processor in the original system) is outside this module: its
// register bus comes in on cpu_req/cpu_rsp, passes the bridge opb2opb_mb
// (posted writes) and is decoded by opb_bus into the regions listed there.
// The three SRAM clients share the SRAM through opb_sram.
//
// Interfaces: cpu_req/cpu_rsp register bus (request held until ack),
// sram_* synchronous external SRAM (read data one cycle after the address),
// events: one-cycle flags showing the internal mechanisms at work (counter
// forwarding and saturation, sort moves, coded words waiting for the SRAM,
// SRAM contention), for monitoring.
// The split into blocks and their cooperation follow the design; bus
// protocol, register maps and the SRAM timing are this implementation's.
// Own choice: the histogram reads the stored frame back from the SRAM by DMA
// (the design's system description), instead of tapping the pixels while a
// frame is captured, since the capture path is not part of this design.
module dyn_huff_top
  import dhe_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  reg_req_t           cpu_req,
  output reg_rsp_t           cpu_rsp,
  output logic               sram_en,
  output logic               sram_we,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [DATA_W-1:0]  sram_wdata,
  input  logic [DATA_W-1:0]  sram_rdata,
  output events_t            events
);

  localparam int unsigned NSLV = 7;
  localparam int unsigned SORT_DEPTH = NSYM;
  localparam int unsigned SORT_AW = $clog2(SORT_DEPTH);

  reg_req_t s_req [NSLV];
  reg_rsp_t s_rsp [NSLV];
  mem_req_t m_req [3];
  mem_rsp_t m_rsp [3];

  reg_req_t pb_req;
  reg_rsp_t pb_rsp;

  // processor side decoupled from the peripheral bus
  opb2opb_mb u_bridge (
    .clk(clk), .rst_n(rst_n),
    .up_req(cpu_req), .up_rsp(cpu_rsp),
    .dn_req(pb_req), .dn_rsp(pb_rsp)
  );

  opb_bus #(.NSLV(NSLV)) u_bus (
    .clk(clk), .rst_n(rst_n),
    .m_req(pb_req), .m_rsp(pb_rsp),
    .s_req(s_req), .s_rsp(s_rsp)
  );

  // ---------------- histogram path ----------------
  logic              dh_valid, dh_ready, ch_valid, ch_ready;
  logic [DATA_W-1:0] dh_data;
  logic [SYM_W-1:0]  ch_data;
  logic              hist_fwd, hist_sat;

  opb_dma u_dma_hist (
    .clk(clk), .rst_n(rst_n),
    .reg_req(s_req[4]), .reg_rsp(s_rsp[4]),
    .mem_req(m_req[0]), .mem_rsp(m_rsp[0]),
    .out_valid(dh_valid), .out_ready(dh_ready), .out_data(dh_data)
  );

  opb2opb_dma u_cv_hist (
    .clk(clk), .rst_n(rst_n),
    .in_valid(dh_valid), .in_ready(dh_ready), .in_data(dh_data),
    .out_valid(ch_valid), .out_ready(ch_ready), .out_data(ch_data)
  );

  opb_hist u_hist (
    .clk(clk), .rst_n(rst_n),
    .reg_req(s_req[1]), .reg_rsp(s_rsp[1]),
    .in_valid(ch_valid), .in_ready(ch_ready), .in_data(ch_data),
    .fwd_hit(hist_fwd), .sat_hit(hist_sat)
  );

  // ---------------- sorter ----------------
  logic                sort_busy, sort_moved, rd_en, wr_en;
  logic [SORT_AW-1:0]  rd_addr, wr_addr;
  logic [DATA_W-1:0]   rd_data, wr_data;

  opb_sort #(.ELEM_W(DATA_W), .TAB_AW(SORT_AW)) u_sort (
    .clk(clk), .rst_n(rst_n),
    .reg_req(s_req[2]), .reg_rsp(s_rsp[2]),
    .m_rd_en(rd_en), .m_rd_addr(rd_addr), .m_rd_data(rd_data),
    .m_wr_en(wr_en), .m_wr_addr(wr_addr), .m_wr_data(wr_data),
    .busy(sort_busy), .moved(sort_moved)
  );

  bram2_sys #(.DEPTH(SORT_DEPTH), .ELEM_W(DATA_W)) u_bram2 (
    .clk(clk), .rst_n(rst_n),
    .reg_req(s_req[3]), .reg_rsp(s_rsp[3]),
    .sort_busy(sort_busy),
    .s_rd_en(rd_en), .s_rd_addr(rd_addr), .s_rd_data(rd_data),
    .s_wr_en(wr_en), .s_wr_addr(wr_addr), .s_wr_data(wr_data)
  );

  // ---------------- encoder path ----------------
  logic              de_valid, de_ready, ce_valid, ce_ready;
  logic [DATA_W-1:0] de_data;
  logic [SYM_W-1:0]  ce_data;
  logic              he_valid, he_ready;
  logic [OUT_W-1:0]  he_data;
  logic              out_wait;

  opb_dma u_dma_huff (
    .clk(clk), .rst_n(rst_n),
    .reg_req(s_req[5]), .reg_rsp(s_rsp[5]),
    .mem_req(m_req[1]), .mem_rsp(m_rsp[1]),
    .out_valid(de_valid), .out_ready(de_ready), .out_data(de_data)
  );

  opb2opb_dma u_cv_huff (
    .clk(clk), .rst_n(rst_n),
    .in_valid(de_valid), .in_ready(de_ready), .in_data(de_data),
    .out_valid(ce_valid), .out_ready(ce_ready), .out_data(ce_data)
  );

  opb_huff u_huff (
    .clk(clk), .rst_n(rst_n),
    .reg_req(s_req[0]), .reg_rsp(s_rsp[0]),
    .in_valid(ce_valid), .in_ready(ce_ready), .in_data(ce_data),
    .out_valid(he_valid), .out_ready(he_ready), .out_data(he_data)
  );

  opb2opb_huff_out u_out (
    .clk(clk), .rst_n(rst_n),
    .reg_req(s_req[6]), .reg_rsp(s_rsp[6]),
    .in_valid(he_valid), .in_ready(he_ready), .in_data(he_data),
    .mem_req(m_req[2]), .mem_rsp(m_rsp[2]),
    .sram_wait(out_wait)
  );

  // ---------------- external SRAM ----------------
  logic sram_conflict;

  opb_sram #(.NCLI(3)) u_sram (
    .clk(clk), .rst_n(rst_n),
    .cli_req(m_req), .cli_rsp(m_rsp),
    .sram_en(sram_en), .sram_we(sram_we), .sram_addr(sram_addr),
    .sram_wdata(sram_wdata), .sram_rdata(sram_rdata),
    .conflict(sram_conflict)
  );

  assign events = '{hist_fwd: hist_fwd, hist_sat: hist_sat, sort_move: sort_moved,
                    out_wait: out_wait, sram_conflict: sram_conflict};

endmodule
