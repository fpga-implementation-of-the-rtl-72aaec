// tb_opb_huff: self-checking test of the quasi-static Huffman encoder.
// Loads a random code table through the register bus and reads part of it
// back, encodes 3000 random words with input gaps and output stalls, and
// compares every 16-bit output word with an MSB-first bit stream the
// testbench builds from its own copy of the table. Then flushes and checks
// the word and bit counters, rewrites the table (quasi-static update) and
// checks with the output always ready that one word is encoded per clock.
module tb_opb_huff;
  import dhe_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  reg_req_t reg_req;
  reg_rsp_t reg_rsp;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0]  in_data;
  logic [15:0] out_data;

  int checks = 0, failures = 0;
  int lut_len [256];
  int lut_code [256];
  bit exp_q[$];
  int stall_pct = 30;
  longint total_bits = 0;

  opb_huff dut (.*);

  always @(negedge clk) if (rst_n && out_valid && out_ready) begin
    logic [15:0] e;
    for (int i = 0; i < 16; i++) e[15-i] = (exp_q.size() > 0) ? exp_q.pop_front() : 1'b0;
    checks++;
    if (out_data !== e) begin
      failures++;
      $display("FAIL word got %h expected %h", out_data, e);
    end
  end
  always @(posedge clk) out_ready <= ($urandom_range(0, 99) >= stall_pct);

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

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic load_table();
    for (int s = 0; s < 256; s++) begin
      lut_len[s]  = $urandom_range(1, 12);
      lut_code[s] = $urandom() & ((1 << lut_len[s]) - 1);
      bus_wr(s, (lut_len[s] << 12) | lut_code[s]);
    end
  endtask

  task automatic push_sym(input int s);
    for (int i = lut_len[s] - 1; i >= 0; i--) exp_q.push_back(lut_code[s][i]);
    total_bits += lut_len[s];
  endtask

  task automatic flush_all();
    int st;
    repeat (4) @(posedge clk);
    bus_wr('h100, 1);
    do bus_rd('h100, st); while (st[0]);
    repeat (2) @(posedge clk);
    check("bits left after flush", exp_q.size(), 0);
  endtask

  initial begin
    int v, sym, taken, cyc;
    reg_req = '0; in_valid = 0; in_data = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_table();
    for (int s = 0; s < 256; s += 17) begin
      bus_rd(s, v);
      check($sformatf("table read %0d", s), v, (lut_len[s] << 12) | lut_code[s]);
    end

    for (int k = 0; k < 3000; k++) begin
      sym = $urandom_range(0, 255);
      @(posedge clk);
      in_valid <= 1'b1;
      in_data  <= 8'(sym);
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      push_sym(sym);
      if ($urandom_range(0, 4) == 0) begin
        @(posedge clk);
        in_valid <= 1'b0;
        @(negedge clk);
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    flush_all();
    bus_rd('h101, v);
    check("words encoded", v, 3000);
    bus_rd('h102, v);
    check("bits produced", v, total_bits);

    // new table, output always ready: one word per clock
    bus_wr('h101, 0);
    load_table();
    stall_pct = 0;
    taken = 0; cyc = 0;
    @(posedge clk);
    in_valid <= 1'b1;
    in_data  <= 8'($urandom_range(0, 255));
    while (taken < 1000) begin
      @(negedge clk);
      cyc++;
      if (in_ready) begin
        taken++;
        push_sym(in_data);
      end
      @(posedge clk);
      if (taken == 1000) in_valid <= 1'b0;
      in_data <= 8'($urandom_range(0, 255));
    end
    check("cycles for 1000 words", cyc, 1000);
    flush_all();
    bus_rd('h101, v);
    check("words encoded after clear", v, 1000);

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
