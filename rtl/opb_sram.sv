// opb_sram: shared interface to the external SRAM.
//
// Several clients (the two DMA engines and the coded-output writer) share
// one external SRAM holding the frames and the coded data. Each cycle at most
// one request is granted, chosen round-robin starting after the client
// granted last, so no client can starve another. The granted request is
// driven onto the SRAM pins in the same cycle; read data comes back one cycle
// later and is returned, with rvalid, to the client that asked for it.
//
// Interfaces
//   cli_req[i]/cli_rsp[i]  client ports (request held until gnt)
//   sram_*                 synchronous SRAM: enable, write enable, word
//                          address, write data, read data one cycle after a
//                          read
// Timing: one access per clock. The document names this block only as the
// bridge to the external SRAM; the round-robin arbitration and the
// synchronous one-cycle SRAM timing are this implementation's choices.
module opb_sram
  import dhe_pkg::*;
#(
  parameter int unsigned NCLI = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  mem_req_t           cli_req [NCLI],
  output mem_rsp_t           cli_rsp [NCLI],
  output logic               sram_en,
  output logic               sram_we,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [DATA_W-1:0]  sram_wdata,
  input  logic [DATA_W-1:0]  sram_rdata,
  output logic               conflict      // more than one client was waiting
);

  localparam int unsigned CW = (NCLI > 1) ? $clog2(NCLI) : 1;

  logic [CW-1:0] last_q, pick, rd_cli_q;
  logic          any, rd_q;
  int unsigned   nreq;

  always_comb begin
    any  = 1'b0;
    pick = last_q;
    nreq = 0;
    for (int unsigned k = 0; k < NCLI; k++)
      if (cli_req[k].req) nreq++;
    for (int unsigned k = 1; k <= NCLI; k++) begin
      int unsigned c;
      c = (int'(last_q) + k) % NCLI;
      if (!any && cli_req[c].req) begin
        any  = 1'b1;
        pick = CW'(c);
      end
    end
  end

  assign conflict   = (nreq > 1);
  assign sram_en    = any;
  assign sram_we    = any && cli_req[pick].we;
  assign sram_addr  = cli_req[pick].addr;
  assign sram_wdata = cli_req[pick].wdata;

  always_comb begin
    for (int unsigned k = 0; k < NCLI; k++) begin
      cli_rsp[k].gnt    = any && (pick == CW'(k));
      cli_rsp[k].rvalid = rd_q && (rd_cli_q == CW'(k));
      cli_rsp[k].rdata  = sram_rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q   <= CW'(NCLI - 1);
      rd_q     <= 1'b0;
      rd_cli_q <= '0;
    end else begin
      rd_q <= any && !cli_req[pick].we;
      if (any) begin
        last_q   <= pick;
        rd_cli_q <= pick;
      end
    end
  end

endmodule
