// tb_opb_dma: self-checking test of the DMA engine.
// A memory model grants requests at random and returns read data one cycle
// after the grant. Two transfers with random output stalls must deliver
// exactly the words of the programmed address range, in order, and end with
// busy low; a third with every request granted and the output always ready
// must move one word per clock.
module tb_opb_dma;
  import dhe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  reg_req_t reg_req;
  reg_rsp_t reg_rsp;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  logic out_valid, out_ready;
  logic [31:0] out_data;
  int checks = 0, failures = 0, gnt_pct = 60, stall_pct = 30, nout = 0;
  int unsigned exp_q[$];
  int cycle = 0;
  always @(posedge clk) cycle++;

  opb_dma dut (.*);

  function automatic logic [31:0] mem_word(input logic [SRAM_AW-1:0] a);
    return {a[15:0], ~a[15:0]} ^ 32'h5a5a_0f0f;
  endfunction

  // memory model
  logic gnt_r;
  always @(posedge clk) gnt_r <= ($urandom_range(0, 99) < gnt_pct);
  always_comb begin
    mem_rsp.gnt = mem_req.req && gnt_r;
  end
  always @(posedge clk) begin
    mem_rsp.rvalid <= mem_req.req && mem_rsp.gnt;
    mem_rsp.rdata  <= mem_word(mem_req.addr);
  end

  always @(posedge clk) out_ready <= ($urandom_range(0, 99) >= stall_pct);
  always @(negedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    nout++;
    if (exp_q.size() == 0 || out_data !== exp_q.pop_front()) begin
      failures++;
      $display("FAIL word %0d = %h", nout, out_data);
    end
  end

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

  task automatic transfer(input int src, input int len);
    int st;
    for (int i = 0; i < len; i++) exp_q.push_back(mem_word(SRAM_AW'(src + i)));
    bus_wr(0, src);
    bus_wr(1, len);
    bus_wr(2, 1);
    do bus_rd(2, st); while (st[0]);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words missing", exp_q.size()); end
    bus_rd(3, st);
    checks++;
    if (st != 0) begin failures++; $display("FAIL words left %0d", st); end
  endtask

  initial begin
    int t0;
    reg_req = '0; out_ready = 1;
    mem_rsp.rvalid = 0; mem_rsp.rdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    transfer(100, 500);
    transfer(70000, 333);
    gnt_pct = 100; stall_pct = 0;
    nout = 0;
    t0 = cycle;
    transfer(5, 1000);
    // 1000 words, plus bus polling overhead of a few cycles
    checks++;
    if (cycle - t0 > 1020) begin failures++; $display("FAIL 1000 words took %0d cycles", cycle - t0); end
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
