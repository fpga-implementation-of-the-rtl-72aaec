// bram2_sys: the sort table memory (bram_2) with its two access paths.
//
// A dual-port block RAM of DEPTH words of ELEM_W bits holds the table that
// opb_sort keeps sorted. While the sorter works it owns both ports: port A
// for its sequential reads, port B for its writes. The processor reaches the
// same memory through a register slave (the job of the bus memory
// controllers): it writes the histogram elements before sorting and reads
// the sorted table afterwards. Processor accesses use port A and wait while
// the sorter is busy or reading.
//
// Interfaces
//   reg_req/reg_rsp  register slave, word address = table address
//   s_rd_* / s_wr_*  sorter read and write ports
//   sort_busy        the sorter owns the memory
// Timing: processor writes are acknowledged one cycle after they are taken,
// reads two cycles (block RAM read latency). The arbitration is this
// implementation's choice.
module bram2_sys
  import dhe_pkg::*;
#(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned ELEM_W = 32,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  reg_req_t          reg_req,
  output reg_rsp_t          reg_rsp,
  input  logic              sort_busy,
  input  logic              s_rd_en,
  input  logic [AW-1:0]     s_rd_addr,
  output logic [ELEM_W-1:0] s_rd_data,
  input  logic              s_wr_en,
  input  logic [AW-1:0]     s_wr_addr,
  input  logic [ELEM_W-1:0] s_wr_data
);

  logic              a_en, a_we, cpu_go, rd_wait, ack_q;
  logic [AW-1:0]     a_addr;
  logic [ELEM_W-1:0] a_rdata;

  assign cpu_go = reg_req.sel && !ack_q && !rd_wait && !sort_busy && !s_rd_en;

  always_comb begin
    if (s_rd_en || sort_busy) begin
      a_en   = s_rd_en;
      a_we   = 1'b0;
      a_addr = s_rd_addr;
    end else begin
      a_en   = cpu_go;
      a_we   = reg_req.we;
      a_addr = reg_req.addr[AW-1:0];
    end
  end

  dp_bram #(.DEPTH(DEPTH), .WIDTH(ELEM_W)) u_bram_2 (
    .clk    (clk),
    .a_en   (a_en),
    .a_we   (a_we),
    .a_addr (a_addr),
    .a_wdata(reg_req.wdata[ELEM_W-1:0]),
    .a_rdata(a_rdata),
    .b_en   (s_wr_en),
    .b_we   (1'b1),
    .b_addr (s_wr_addr),
    .b_wdata(s_wr_data),
    .b_rdata()
  );

  assign s_rd_data = a_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_wait <= 1'b0;
      ack_q   <= 1'b0;
    end else begin
      ack_q   <= (cpu_go && reg_req.we) || rd_wait;
      rd_wait <= cpu_go && !reg_req.we;
    end
  end

  assign reg_rsp.ack   = ack_q;
  assign reg_rsp.rdata = DATA_W'(a_rdata);

endmodule
