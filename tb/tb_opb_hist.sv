// tb_opb_hist: self-checking test of the histogram unit.
// Phase 1: clear, stream 3000 random words (with runs of equal words, which
//   need count forwarding, and random gaps), compare all 256 counters and the
//   word count with a model kept by the testbench.
// Phase 2: stream 2000 words with no gaps and check that every word is taken
//   in its own cycle (one word per clock).
// Phase 3: clear, send 65540 copies of one word and check saturation at 65535.
module tb_opb_hist;
  import dhe_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  reg_req_t reg_req;
  reg_rsp_t reg_rsp;
  logic in_valid, in_ready, fwd_hit, sat_hit;
  logic [7:0] in_data;

  int checks = 0, failures = 0;
  int model [256];
  int fwd_seen = 0, sat_seen = 0;

  opb_hist dut (.*);

  always @(negedge clk) begin
    if (fwd_hit) fwd_seen++;
    if (sat_hit) sat_seen++;
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

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic clear_all();
    int st;
    bus_wr('h100, 1);
    do bus_rd('h100, st); while (st[0]);
    foreach (model[i]) model[i] = 0;
  endtask

  task automatic check_all(input int total);
    int v;
    for (int i = 0; i < 256; i++) begin
      bus_rd(i, v);
      check($sformatf("bin %0d", i), v, model[i]);
    end
    bus_rd('h101, v);
    check("word count", v, total);
  endtask

  initial begin
    int v, sym, taken, cyc;
    reg_req = '0; in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    clear_all();

    // phase 1: random words, runs and gaps
    sym = 0;
    for (int k = 0; k < 3000; k++) begin
      if ($urandom_range(0, 2) != 0) sym = $urandom_range(0, 255);
      @(posedge clk);
      in_valid <= 1'b1;
      in_data  <= 8'(sym);
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      model[sym]++;
      if ($urandom_range(0, 4) == 0) begin
        @(posedge clk);
        in_valid <= 1'b0;
        @(negedge clk);
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    check_all(3000);

    // phase 2: back-to-back words, one per clock
    clear_all();
    taken = 0; cyc = 0;
    @(posedge clk);
    in_valid <= 1'b1;
    in_data  <= 8'($urandom_range(0, 255));
    while (taken < 2000) begin
      @(negedge clk);
      cyc++;
      if (in_ready) begin
        taken++;
        model[in_data]++;
      end
      @(posedge clk);
      if (taken == 2000) in_valid <= 1'b0;
      in_data <= ($urandom_range(0, 1) == 0) ? in_data : 8'($urandom_range(0, 255));
    end
    check("cycles for 2000 words", cyc, 2000);
    repeat (3) @(posedge clk);
    check_all(2000);

    // phase 3: saturation
    clear_all();
    @(posedge clk);
    in_valid <= 1'b1;
    in_data  <= 8'd77;
    repeat (65540) @(posedge clk);
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    bus_rd(77, v);
    check("saturated bin", v, 65535);
    bus_rd(78, v);
    check("other bin", v, 0);

    checks++;
    if (fwd_seen == 0 || sat_seen == 0) begin
      failures++;
      $display("FAIL forwarding (%0d) or saturation (%0d) never happened", fwd_seen, sat_seen);
    end
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
