// dp_bram: dual-port block RAM with synchronous read on both ports.
//
// Models the FPGA block RAM the encoder uses three times: as the code table
// of the quasi-static encoder, as the counter store of the histogram unit
// and as the sort table (bram_2). Each port has its own address, enable and
// write enable. A read returns the word stored before the clock edge
// (read-first) one cycle after the address is presented; rdata holds its
// value in cycles where the port is not enabled. If both ports write the
// same address in one cycle, port B wins. A read on one port of an address
// the other port writes in the same cycle returns the old word; callers that
// need the new value forward it themselves (opb_hist does).
// DEPTH and WIDTH default to one 256 x 16 Virtex block RAM.
module dp_bram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (b_en && b_we) mem[b_addr] <= b_wdata;
  end

endmodule
