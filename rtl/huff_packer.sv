// huff_packer: the "barrel shifter" of the quasi-static Huffman encoder.
//
// Concatenates variable-length code words (1..12 bits, length 0 adds
// nothing, lengths 13..15 count as 12) into fixed 16-bit output words, first code bit first (MSB first).
// A 32-bit accumulator holds the pending bits left aligned; a new code is
// shifted right by the number of pending bits and OR-ed in, and a full
// 16-bit word is taken from the top whenever 16 or more bits are pending.
// At most 15 + 12 = 27 bits are ever pending, so one code can be accepted in
// every cycle in which the output is not stalled: the rate is one code per
// clock.
//
// Interface: valid/ready stream in (len, code right aligned), valid/ready
// stream out (16-bit words). A one-cycle pulse on `flush` (taken when the
// input is idle) pushes the last partial word out padded with zero bits;
// `flushing` stays high until that word has left. The MSB-first bit order,
// zero padding and the flush command are this implementation's choices; the
// 12-bit code, 4-bit length and 16-bit output word are the design's format.
module huff_packer
  import dhe_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [LEN_W-1:0]  in_len,
  input  logic [CODE_W-1:0] in_code,
  input  logic              flush,
  output logic              flushing,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [OUT_W-1:0]  out_data
);

  logic [31:0] acc, acc_s, acc_n, ins;
  logic [5:0]  cnt, cnt_s, cnt_n;
  logic        flush_q;
  logic        emit, take;
  logic [CODE_W-1:0] code_m;
  logic [LEN_W-1:0]  len_c;

  assign out_valid = (cnt >= 6'd16) || (flush_q && cnt != 6'd0);
  assign out_data  = acc[31:16];
  assign emit      = out_valid && out_ready;
  assign in_ready  = !flush_q && ((cnt < 6'd16) || out_ready);
  assign take      = in_valid && in_ready;
  assign flushing  = flush_q;

  always_comb begin
    // lengths above 12 are not valid table entries and are taken as 12;
    // only the len low bits of the code are used
    len_c  = (in_len > LEN_W'(CODE_W)) ? LEN_W'(CODE_W) : in_len;
    code_m = in_code & CODE_W'((32'd1 << len_c) - 32'd1);
    acc_s  = emit ? (acc << 16) : acc;
    cnt_s  = emit ? ((cnt >= 6'd16) ? cnt - 6'd16 : 6'd0) : cnt;
    ins    = ({code_m, 20'b0} << (CODE_W - int'(len_c))) >> cnt_s;
    acc_n  = take ? (acc_s | ins) : acc_s;
    cnt_n  = take ? (cnt_s + 6'(len_c)) : cnt_s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      cnt     <= '0;
      flush_q <= 1'b0;
    end else begin
      acc <= acc_n;
      cnt <= cnt_n;
      if (flush && !in_valid) flush_q <= 1'b1;
      else if (flush_q && cnt_n == 6'd0) flush_q <= 1'b0;
    end
  end

  // never more than 27 bits pending
  assert property (@(posedge clk) disable iff (!rst_n) cnt <= 6'd27);

endmodule
