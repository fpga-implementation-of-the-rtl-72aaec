// tb_opb_sram: self-checking test of the shared SRAM interface.
// Three clients issue random reads and writes to disjoint address ranges of
// a synchronous SRAM model, all at once. Checked: at most one grant per
// cycle, a grant only to a requesting client, read data returned to the
// right client one cycle after its grant with the value last written, no
// client waiting more than two cycles while others are served (round
// robin), and that contention occurred.
module tb_opb_sram;
  import dhe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mem_req_t cli_req [3];
  mem_rsp_t cli_rsp [3];
  logic sram_en, sram_we, conflict;
  logic [SRAM_AW-1:0] sram_addr;
  logic [31:0] sram_wdata, sram_rdata;
  logic [31:0] sram [1024];
  logic [31:0] model [1024];
  int checks = 0, failures = 0, conflicts = 0;
  int unsigned pend_rd [3][$];
  int wait_cnt [3];

  opb_sram #(.NCLI(3)) dut (.*);

  always @(posedge clk) begin
    if (sram_en && sram_we) sram[sram_addr[9:0]] <= sram_wdata;
    if (sram_en && !sram_we) sram_rdata <= sram[sram_addr[9:0]];
  end

  // checks at the falling edge, before the rising edge that acts
  always @(negedge clk) if (rst_n) begin
    int ng;
    ng = 0;
    if (conflict) conflicts++;
    for (int c = 0; c < 3; c++) begin
      if (cli_rsp[c].rvalid) begin
        checks++;
        if (pend_rd[c].size() == 0 || cli_rsp[c].rdata !== pend_rd[c].pop_front()) begin
          failures++;
          $display("FAIL read data client %0d", c);
        end
      end
      if (cli_rsp[c].gnt) begin
        ng++;
        checks++;
        if (!cli_req[c].req) begin failures++; $display("FAIL grant without request"); end
        if (cli_req[c].we) model[cli_req[c].addr[9:0]] = cli_req[c].wdata;
        else pend_rd[c].push_back(model[cli_req[c].addr[9:0]]);
        wait_cnt[c] = 0;
      end else if (cli_req[c].req) begin
        wait_cnt[c]++;
        checks++;
        if (wait_cnt[c] > 2) begin failures++; $display("FAIL client %0d starved", c); end
      end
    end
    checks++;
    if (ng > 1) begin failures++; $display("FAIL %0d grants", ng); end
  end

  // each client: random requests in its own 256-word range, held until granted
  for (genvar c = 0; c < 3; c++) begin : g_cli
    initial begin
      cli_req[c] = '0;
      wait (rst_n);
      repeat (3000) begin
        @(posedge clk);
        if ($urandom_range(0, 3) != 0) begin
          cli_req[c] <= '{req: 1'b1, we: 1'($urandom), addr: SRAM_AW'(c * 256 + $urandom_range(0, 15)),
                          wdata: $urandom()};
          @(negedge clk);
          while (!cli_rsp[c].gnt) @(negedge clk);
          @(posedge clk);
        end
        cli_req[c] <= '0;
      end
    end
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin sram[i] = 32'(i); model[i] = 32'(i); end
    wait_cnt = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20000) @(posedge clk);
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no contention"); end
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
