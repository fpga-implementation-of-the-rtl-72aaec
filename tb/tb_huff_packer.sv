// tb_huff_packer: self-checking test of the code packer.
// Sends random codes (lengths 0..12) with random output stalls, keeps an
// independent bit-queue model of the expected MSB-first stream, compares
// every 16-bit output word, then flushes and checks the zero-padded tail.
// A second phase with the output always ready checks the rate of one code
// per clock.
module tb_huff_packer;
  import dhe_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, flush, flushing, out_valid, out_ready;
  logic [LEN_W-1:0]  in_len;
  logic [CODE_W-1:0] in_code;
  logic [OUT_W-1:0]  out_data;

  int checks = 0, failures = 0;
  bit exp_q[$];
  int stall_pct = 30;

  huff_packer dut (.*);

  // output side: compare with the model
  // sampled at the falling edge: a word shown now is taken at the next rising edge
  always @(negedge clk) if (rst_n && out_valid && out_ready) begin
    logic [15:0] e;
    e = '0;
    for (int i = 0; i < 16; i++) begin
      e[15-i] = (exp_q.size() > 0) ? exp_q.pop_front() : 1'b0;
    end
    checks++;
    if (out_data !== e) begin
      failures++;
      $display("MISMATCH word got %h exp %h", out_data, e);
    end
  end
  always @(posedge clk) out_ready <= ($urandom_range(0, 99) >= stall_pct);

  task automatic send(input int len, input int code);
    in_valid <= 1; in_len <= LEN_W'(len); in_code <= CODE_W'(code);
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    for (int i = len - 1; i >= 0; i--) exp_q.push_back(code[i]);
    @(posedge clk);
  endtask

  initial begin
    int t0, n;
    in_valid = 0; flush = 0; in_len = 0; in_code = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int k = 0; k < 2000; k++) begin
      int len;
      len = $urandom_range(0, 12);
      // random upper garbage above len must be ignored
      send(len, ($urandom() & ((1 << len) - 1)) | ((len < 12) ? ($urandom() << len) & 'hfff : 0));
      if ($urandom_range(0, 3) == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
    end
    in_valid <= 0;
    // flush
    flush <= 1; @(posedge clk); flush <= 0;
    while (flushing) @(posedge clk);
    @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("bits left after flush: %0d", exp_q.size()); end

    // rate: output always ready, codes every cycle
    stall_pct = 0;
    @(posedge clk);
    t0 = 0; n = 0;
    in_valid <= 1;
    for (int k = 0; k < 200; k++) begin
      in_len <= LEN_W'(12); in_code <= CODE_W'(k * 37);
      @(negedge clk);
      if (in_ready) begin
        n++;
        for (int i = 11; i >= 0; i--) exp_q.push_back(1'((k * 37) >> i));
      end
      @(posedge clk);
    end
    in_valid <= 0;
    checks++;
    if (n != 200) begin failures++; $display("rate: %0d codes in 200 cycles", n); end
    flush <= 1; @(posedge clk); flush <= 0;
    while (flushing) @(posedge clk);
    repeat (2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("bits left after flush 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
