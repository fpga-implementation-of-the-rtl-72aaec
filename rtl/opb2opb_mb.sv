// opb2opb_mb: bridge between the processor bus and the peripheral bus.
//
// Decouples the processor from the slower peripheral bus. Writes are posted:
// the bridge stores address and data in a FIFO and acknowledges the
// processor one cycle later, then replays the writes on the peripheral side
// one at a time, each held until its slave acknowledges. A read is passed on
// only after all earlier writes have completed (so reads see them) and the
// processor is acknowledged, with the data, one cycle after the peripheral
// acknowledges. The processor can thus go on working from its local memory
// while its register writes drain.
//
// Interfaces: up_req/up_rsp slave towards the processor, dn_req/dn_rsp
// master towards the peripherals; both use the register transfer of
// dhe_pkg (request held until a one-cycle ack).
// Timing: a posted write costs the processor two cycles when the FIFO has
// room; a read costs the peripheral access plus two cycles. The FIFO follows
// the design; both sides are 32 bits wide here, so the width conversion the
// design mentions is not needed, and the FIFO depth is this implementation's
// choice.
module opb2opb_mb
  import dhe_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  reg_req_t up_req,
  output reg_rsp_t up_rsp,
  output reg_req_t dn_req,
  input  reg_rsp_t dn_rsp
);

  localparam int unsigned FAW = $clog2(FIFO_DEPTH);
  localparam int unsigned EW  = REG_AW + DATA_W;

  logic          up_ack_q, rd_pend, dn_active, dn_read;
  logic [DATA_W-1:0] up_rdata_q;
  logic          push, pop, f_ready, f_valid;
  logic [EW-1:0] f_out;
  logic [FAW:0]  f_count;

  assign push = up_req.sel && up_req.we && !up_ack_q && f_ready;
  assign pop  = !dn_active && f_valid;

  sync_fifo #(.WIDTH(EW), .DEPTH(FIFO_DEPTH)) u_wfifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (push),
    .in_ready (f_ready),
    .in_data  ({up_req.addr, up_req.wdata}),
    .out_valid(f_valid),
    .out_ready(pop),
    .out_data (f_out),
    .count    (f_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_ack_q   <= 1'b0;
      up_rdata_q <= '0;
      rd_pend    <= 1'b0;
      dn_active  <= 1'b0;
      dn_read    <= 1'b0;
      dn_req     <= '0;
    end else begin
      up_ack_q <= push;
      if (up_req.sel && !up_req.we && !up_ack_q && !rd_pend) rd_pend <= 1'b1;

      if (dn_active && dn_rsp.ack) begin
        dn_active  <= 1'b0;
        dn_req.sel <= 1'b0;
        if (dn_read) begin
          up_ack_q   <= 1'b1;
          up_rdata_q <= dn_rsp.rdata;
          rd_pend    <= 1'b0;
        end
      end else if (pop) begin
        dn_active <= 1'b1;
        dn_read   <= 1'b0;
        dn_req    <= '{sel: 1'b1, we: 1'b1, addr: f_out[EW-1 -: REG_AW], wdata: f_out[DATA_W-1:0]};
      end else if (!dn_active && rd_pend) begin
        dn_active <= 1'b1;
        dn_read   <= 1'b1;
        dn_req    <= '{sel: 1'b1, we: 1'b0, addr: up_req.addr, wdata: '0};
      end
    end
  end

  assign up_rsp.ack   = up_ack_q;
  assign up_rsp.rdata = up_rdata_q;

  // a transfer on the peripheral side is held until it is acknowledged
  assert property (@(posedge clk) disable iff (!rst_n)
                   dn_req.sel && !dn_rsp.ack |=> dn_req.sel && $stable(dn_req.addr));

endmodule
