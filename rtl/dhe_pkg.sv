// dhe_pkg: types and constants shared by the dynamic Huffman encoder.
//
// The encoder takes 8-bit input words (SYM_W). Each symbol has a 16-bit code
// table entry: the code in the 12 LSBs (right aligned) and the code length in
// the 4 MSBs. Coded output is packed into 16-bit words. These three numbers
// are the design's own format; everything else here is an interface choice of
// this implementation:
//   * reg_req_t / reg_rsp_t: a simplified On-chip Peripheral Bus slave
//     transfer. The master holds sel/we/addr/wdata until the slave raises ack
//     for exactly one cycle; read data is valid with ack.
//   * mem_req_t / mem_rsp_t: a client port of the shared external SRAM. A
//     request is taken in the cycle gnt is high; read data returns one cycle
//     later with rvalid.
package dhe_pkg;

  localparam int unsigned SYM_W    = 8;   // input word width (n)
  localparam int unsigned CODE_W   = 12;  // maximum code length (m)
  localparam int unsigned LEN_W    = 4;   // code length field
  localparam int unsigned LUT_W    = CODE_W + LEN_W;  // 16-bit table entry
  localparam int unsigned OUT_W    = 16;  // packed output word
  localparam int unsigned NSYM     = 1 << SYM_W;

  localparam int unsigned REG_AW   = 12;  // processor bus word address
  localparam int unsigned DATA_W   = 32;  // processor / SRAM data width
  localparam int unsigned SRAM_AW  = 19;  // SRAM word address (2 MB of 32-bit words)

  typedef struct packed {
    logic              sel;
    logic              we;
    logic [REG_AW-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } reg_req_t;

  typedef struct packed {
    logic              ack;
    logic [DATA_W-1:0] rdata;
  } reg_rsp_t;

  typedef struct packed {
    logic               req;
    logic               we;
    logic [SRAM_AW-1:0] addr;
    logic [DATA_W-1:0]  wdata;
  } mem_req_t;

  typedef struct packed {
    logic              gnt;
    logic              rvalid;
    logic [DATA_W-1:0] rdata;
  } mem_rsp_t;

  // Activity flags of the encoder's mechanisms, one cycle each.
  typedef struct packed {
    logic hist_fwd;       // histogram used a forwarded count
    logic hist_sat;       // a histogram counter stayed saturated
    logic sort_move;      // sorter moved a table element
    logic out_wait;       // coded words waited in the output FIFO for the SRAM
    logic sram_conflict;  // several SRAM clients waited in one cycle
  } events_t;

  // One code table entry.
  typedef struct packed {
    logic [LEN_W-1:0]  len;
    logic [CODE_W-1:0] code;
  } lut_entry_t;

endpackage
