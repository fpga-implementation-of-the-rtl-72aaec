// opb2opb_dma: 32-bit to 8-bit width converter.
//
// Splits every 32-bit word read from the SRAM into four 8-bit input words
// for the histogram unit or the encoder, most significant byte first
// (big-endian, the byte order of the processor bus). One byte leaves per
// clock; the next 32-bit word is taken in the cycle its last byte leaves, so
// a steady stream keeps one byte per clock. The byte order is this
// implementation's choice.
// Interfaces: valid/ready 32-bit stream in, valid/ready 8-bit stream out.
module opb2opb_dma
  import dhe_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [SYM_W-1:0]  out_data
);

  logic [DATA_W-1:0] word_q;
  logic [1:0]        sel_q;
  logic              full_q, last_byte;

  assign out_valid = full_q;
  assign out_data  = word_q[DATA_W-1 - 8*sel_q -: 8];
  assign last_byte = (sel_q == 2'd3);
  assign in_ready  = !full_q || (out_ready && last_byte);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q <= '0;
      sel_q  <= '0;
      full_q <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        word_q <= in_data;
        sel_q  <= '0;
        full_q <= 1'b1;
      end else if (out_valid && out_ready) begin
        sel_q <= sel_q + 2'd1;
        if (last_byte) full_q <= 1'b0;
      end
    end
  end

endmodule
