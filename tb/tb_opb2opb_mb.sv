// tb_opb2opb_mb: self-checking test of the processor-side bridge.
// Behind the bridge sits a register file that acknowledges after a random
// delay. Random posted writes and reads from the processor side must give
// read data equal to the last value written to that address (writes drain
// in order before a read), every peripheral write must carry the data that
// was posted, and a write with room in the FIFO must be acknowledged one
// cycle after it is presented, while earlier writes are still draining.
module tb_opb2opb_mb;
  import dhe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  reg_req_t up_req, dn_req;
  reg_rsp_t up_rsp, dn_rsp;
  int checks = 0, failures = 0, slow_acks = 0, drains = 0;
  logic [31:0] regs [64];
  logic [31:0] model [64];
  int delay_cnt = 0;

  opb2opb_mb dut (.*);

  // peripheral register file with random acknowledge delay
  always @(posedge clk) begin
    dn_rsp.ack <= 1'b0;
    if (dn_req.sel && !dn_rsp.ack) begin
      if (delay_cnt == 0) begin
        dn_rsp.ack   <= 1'b1;
        dn_rsp.rdata <= regs[dn_req.addr[5:0]];
        if (dn_req.we) regs[dn_req.addr[5:0]] <= dn_req.wdata;
        delay_cnt <= $urandom_range(0, 6);
      end else delay_cnt <= delay_cnt - 1;
    end
  end

  task automatic up_xfer(input bit we, input int a, input int d, output int q, output int lat);
    @(posedge clk);
    up_req <= '{sel: 1'b1, we: we, addr: REG_AW'(a), wdata: d};
    lat = 0;
    @(negedge clk);
    while (!up_rsp.ack) begin @(negedge clk); lat++; end
    q = up_rsp.rdata;
    @(posedge clk);
    up_req <= '0;
  endtask

  initial begin
    int q, lat, last_a;
    last_a = 0;
    up_req = '0; dn_rsp = '0;
    for (int i = 0; i < 64; i++) begin regs[i] = 0; model[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int a;
      a = $urandom_range(0, 7);
      // reads often target the address written just before
      if ($urandom_range(0, 1) == 0) a = last_a;
      last_a = a;
      if ($urandom_range(0, 2) != 0) begin
        int d;
        d = $urandom();
        up_xfer(1, a, d, q, lat);
        model[a] = d;
        if (lat > 1) slow_acks++;
        if (dn_req.sel) drains++;
      end else begin
        up_xfer(0, a, 0, q, lat);
        checks++;
        if (q != model[a]) begin failures++; $display("FAIL read %0d: %h vs %h", a, q, model[a]); end
      end
    end
    // every write has reached the registers
    up_xfer(0, 0, 0, q, lat);
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (regs[i] != model[i]) begin failures++; $display("FAIL reg %0d", i); end
    end
    // posted writes were mostly acknowledged at once while the bus was busy
    checks++;
    if (drains == 0 || slow_acks > 1500) begin
      failures++; $display("FAIL posting: drains %0d slow %0d", drains, slow_acks);
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
