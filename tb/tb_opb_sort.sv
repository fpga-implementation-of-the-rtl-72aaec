// tb_opb_sort: self-checking test of the insertion sorter.
// Builds sorted tables by inserting random elements one at a time (small
// value ranges give many equal keys), at a non-zero base address, then runs
// a Huffman-style sequence: drop the two smallest elements (count - 2) and
// insert their sum. After every insertion the table in the RAM is compared
// with a model list kept sorted by the testbench, and the cycle count the
// sorter reports is compared with j + 2 (j = elements smaller than the new
// one; 1 for an empty table): one comparison and one move per clock.
module tb_opb_sort;
  import dhe_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  reg_req_t reg_req;
  reg_rsp_t reg_rsp;
  logic        m_rd_en, m_wr_en, busy, moved;
  logic [7:0]  m_rd_addr, m_wr_addr;
  logic [31:0] m_rd_data, m_wr_data;

  int checks = 0, failures = 0, moves = 0;
  int unsigned model[$];

  opb_sort dut (.*);

  dp_bram #(.DEPTH(256), .WIDTH(32)) mem (
    .clk(clk),
    .a_en(m_rd_en), .a_we(1'b0), .a_addr(m_rd_addr), .a_wdata('0), .a_rdata(m_rd_data),
    .b_en(m_wr_en), .b_we(1'b1), .b_addr(m_wr_addr), .b_wdata(m_wr_data), .b_rdata()
  );

  always @(negedge clk) if (moved) moves++;

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

  task automatic insert(input int base, input int unsigned e);
    int st, cyc, j, pos, n;
    j = 0;
    foreach (model[i]) if (model[i] < e) j++;
    n = model.size();
    bus_wr(0, e);
    do bus_rd(3, st); while (st[0]);
    bus_rd(4, cyc);
    check("insert cycles", cyc, (n == 0) ? 1 : j + 2);
    // model: descending, new element after equal ones
    pos = 0;
    while (pos < model.size() && model[pos] >= e) pos++;
    model.insert(pos, e);
    bus_rd(2, st);
    check("count", st, model.size());
    for (int i = 0; i < model.size(); i++)
      check($sformatf("table[%0d]", i), mem.mem[8'(base + i)], model[i]);
  endtask

  initial begin
    int base;
    reg_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int round = 0; round < 3; round++) begin
      base = (round == 0) ? 0 : (round == 1) ? 16 : 100;
      model.delete();
      bus_wr(1, base);
      bus_wr(2, 0);
      for (int k = 0; k < ((round == 0) ? 150 : 60); k++)
        insert(base, (round == 1) ? $urandom_range(0, 7) : $urandom_range(0, 100000));
    end

    // Huffman-style reduction on the last table: remove two, insert sum
    while (model.size() > 1) begin
      int unsigned a, b;
      a = model.pop_back();
      b = model.pop_back();
      bus_wr(2, model.size());
      insert(base, a + b);
    end

    checks++;
    if (moves == 0) begin failures++; $display("FAIL no element was moved"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
