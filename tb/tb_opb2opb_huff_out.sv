// tb_opb2opb_huff_out: self-checking test of the coded-output path.
// 16-bit words arrive with random gaps while a memory model grants writes
// at random (as when the SRAM serves other clients). Every write must land
// at the next destination address holding the next pair of words, first
// word in the upper half. An odd word count is closed by a flush that pads
// the lower half with zeros; the word counter and busy flag are checked, and
// the test requires that words did wait in the FIFO.
module tb_opb2opb_huff_out;
  import dhe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  reg_req_t reg_req;
  reg_rsp_t reg_rsp;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  logic in_valid, in_ready, sram_wait;
  logic [15:0] in_data;
  int checks = 0, failures = 0, gnt_pct = 40, waits = 0;
  logic [31:0] mem [int];
  logic [15:0] sent[$];

  opb2opb_huff_out dut (.*);

  logic gnt_r;
  always @(posedge clk) gnt_r <= ($urandom_range(0, 99) < gnt_pct);
  always_comb begin
    mem_rsp = '0;
    mem_rsp.gnt = mem_req.req && gnt_r;
  end
  always @(posedge clk) if (mem_req.req && mem_rsp.gnt) begin
    if (!mem_req.we) begin failures++; $display("FAIL read request"); end
    mem[int'(mem_req.addr)] = mem_req.wdata;
  end
  always @(negedge clk) if (sram_wait) waits++;

  task automatic bus_wr(input int a, input int d);
    @(posedge clk);
    reg_req <= '{sel: 1'b1, we: 1'b1, addr: REG_AW'(a), wdata: d};
    @(negedge clk);
    while (!reg_rsp.ack) @(negedge clk);
    @(posedge clk);
    reg_req <= '0;
  endtask

  task automatic bus_rd(input int a, output int d);
    @(posedge clk);
    reg_req <= '{sel: 1'b1, we: 1'b0, addr: REG_AW'(a), wdata: 0};
    @(negedge clk);
    while (!reg_rsp.ack) @(negedge clk);
    d = reg_rsp.rdata;
    @(posedge clk);
    reg_req <= '0;
  endtask

  task automatic run(input int dst, input int n);
    int st;
    sent.delete();
    mem.delete();
    bus_wr(0, dst);
    for (int k = 0; k < n; k++) begin
      logic [15:0] w;
      w = 16'($urandom());
      @(posedge clk);
      in_valid <= 1'b1;
      in_data  <= w;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      sent.push_back(w);
      if ($urandom_range(0, 3) == 0) begin
        @(posedge clk);
        in_valid <= 1'b0;
        @(negedge clk);
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    bus_wr(2, 1);
    do bus_rd(2, st); while (st[0]);
    bus_rd(1, st);
    checks++;
    if (st != (n + 1) / 2) begin failures++; $display("FAIL written %0d", st); end
    for (int i = 0; i < (n + 1) / 2; i++) begin
      logic [31:0] e;
      e = {sent[2*i], (2*i + 1 < n) ? sent[2*i+1] : 16'h0000};
      checks++;
      if (!mem.exists(dst + i) || mem[dst + i] !== e) begin
        failures++;
        $display("FAIL word %0d", i);
      end
    end
    bus_rd(0, st);
    checks++;
    if (st != dst + (n + 1) / 2) begin failures++; $display("FAIL dst %0d", st); end
  endtask

  initial begin
    reg_req = '0; in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1000, 801);
    gnt_pct = 10;
    run(20, 500);
    gnt_pct = 100;
    run(7, 333);
    checks++;
    if (waits == 0) begin failures++; $display("FAIL no FIFO wait"); end
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
