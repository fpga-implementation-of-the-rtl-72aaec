// tb_bram2_sys: self-checking test of the sort table memory.
// The processor port writes and reads random words (reads back what it
// wrote). Then the testbench plays the sorter: while sort_busy is high it
// reads through the sorter read port (data one cycle later) and writes
// through the sorter write port, and a processor read issued meanwhile must
// not be acknowledged until the sorter has let go, and must then return the
// word the sorter wrote.
module tb_bram2_sys;
  import dhe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  reg_req_t reg_req;
  reg_rsp_t reg_rsp;
  logic sort_busy, s_rd_en, s_wr_en;
  logic [7:0] s_rd_addr, s_wr_addr;
  logic [31:0] s_rd_data, s_wr_data;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  bram2_sys dut (.*);

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

  initial begin
    int v;
    reg_req = '0; sort_busy = 0; s_rd_en = 0; s_wr_en = 0;
    s_rd_addr = 0; s_wr_addr = 0; s_wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      model[i] = $urandom();
      bus_wr(i, model[i]);
    end
    for (int k = 0; k < 300; k++) begin
      int a;
      a = $urandom_range(0, 255);
      bus_rd(a, v);
      checks++;
      if (v != model[a]) begin failures++; $display("FAIL cpu read %0d", a); end
    end

    // sorter phase, with a processor read pending
    fork
      begin
        @(posedge clk);
        sort_busy <= 1'b1;
        for (int k = 0; k < 200; k++) begin
          int ra, wa, wd;
          ra = $urandom_range(0, 255);
          wa = $urandom_range(0, 255);
          wd = $urandom();
          @(posedge clk);
          s_rd_en <= 1'b1; s_rd_addr <= 8'(ra);
          s_wr_en <= 1'b1; s_wr_addr <= 8'(wa); s_wr_data <= wd;
          @(negedge clk);
          @(posedge clk);
          s_rd_en <= 1'b0; s_wr_en <= 1'b0;
          @(negedge clk);
          checks++;
          if (s_rd_data != model[ra]) begin  // read-first: old word
            failures++; $display("FAIL sorter read %0d", ra);
          end
          model[wa] = wd;
        end
        // a final known word at address 5
        @(posedge clk);
        s_wr_en <= 1'b1; s_wr_addr <= 8'd5; s_wr_data <= 32'hcafe_0005;
        @(posedge clk);
        s_wr_en <= 1'b0;
        model[5] = 32'hcafe_0005;
        sort_busy <= 1'b0;
      end
      begin
        repeat (20) @(posedge clk);
        bus_rd(5, v);
        checks++;
        if (v != 32'hcafe_0005) begin failures++; $display("FAIL cpu read during sort %h", v); end
      end
    join
    for (int i = 0; i < 256; i++) begin
      bus_rd(i, v);
      checks++;
      if (v != model[i]) begin failures++; $display("FAIL final %0d", i); end
    end
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
