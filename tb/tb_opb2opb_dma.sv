// tb_opb2opb_dma: self-checking test of the 32-to-8-bit converter.
// Random 32-bit words with random input gaps and output stalls; every byte
// must come out in order, most significant byte first. With no gaps or
// stalls, 400 bytes must take 400 cycles (one byte per clock).
module tb_opb2opb_dma;
  import dhe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [31:0] in_data;
  logic [7:0]  out_data;
  logic [7:0]  exp_q[$];
  int checks = 0, failures = 0, nbytes = 0, stall_pct = 30, gap_pct = 30;

  int cycle = 0;
  always @(posedge clk) cycle++;

  opb2opb_dma dut (.*);

  always @(negedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    nbytes++;
    if (exp_q.size() == 0 || out_data !== exp_q.pop_front()) begin
      failures++;
      $display("FAIL byte %0d", nbytes);
    end
  end
  always @(posedge clk) out_ready <= ($urandom_range(0, 99) >= stall_pct);

  initial begin
    int cyc, t0;
    in_valid = 0; in_data = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      logic [31:0] w;
      w = $urandom();
      @(posedge clk);
      in_valid <= 1'b1;
      in_data  <= w;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      for (int b = 3; b >= 0; b--) exp_q.push_back(w[8*b +: 8]);
      if ($urandom_range(0, 99) < gap_pct) begin
        @(posedge clk);
        in_valid <= 1'b0;
        @(negedge clk);
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d bytes missing", exp_q.size()); end

    // rate
    stall_pct = 0;
    nbytes = 0;
    @(posedge clk);
    t0 = cycle;
    for (int k = 0; k < 100; k++) begin
      logic [31:0] w;
      w = $urandom();
      in_valid <= 1'b1;
      in_data  <= w;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      for (int b = 3; b >= 0; b--) exp_q.push_back(w[8*b +: 8]);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    cyc = 0;
    while (exp_q.size() != 0 && cyc < 1000) begin @(posedge clk); cyc++; end
    // 400 bytes leave one per clock: the last 4 drain after the last word
    checks++;
    if (cycle - t0 > 404) begin failures++; $display("FAIL 400 bytes took %0d cycles", cycle - t0); end
    checks++;
    if (nbytes != 400 || cyc > 5) begin failures++; $display("FAIL rate: %0d bytes, drain %0d", nbytes, cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
