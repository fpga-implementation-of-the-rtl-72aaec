// tb_opb_bus: self-checking test of the register bus decoder.
// Seven slave models, each acknowledging after its own random delay and
// returning its region number and the address, stand behind the decoder.
// Random transfers to all eight regions check that only the addressed slave
// sees sel, that its read data and ack come back, and that the unused
// region is acknowledged with zero data.
module tb_opb_bus;
  import dhe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  reg_req_t m_req;
  reg_rsp_t m_rsp;
  reg_req_t s_req [7];
  reg_rsp_t s_rsp [7];
  int checks = 0, failures = 0;
  int cur_region = -1;

  opb_bus #(.NSLV(7)) dut (.*);

  for (genvar k = 0; k < 7; k++) begin : g_slv
    int delay_cnt;
    always @(posedge clk) begin
      s_rsp[k].ack <= 1'b0;
      if (s_req[k].sel && !s_rsp[k].ack) begin
        if (delay_cnt == 0) begin
          s_rsp[k].ack   <= 1'b1;
          s_rsp[k].rdata <= {k[7:0], 12'h0, s_req[k].addr};
          delay_cnt      <= $urandom_range(0, 3);
        end else delay_cnt <= delay_cnt - 1;
      end
    end
    initial begin delay_cnt = 0; s_rsp[k] = '0; end
  end

  // only the addressed slave is selected
  always @(negedge clk) if (m_req.sel) begin
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (s_req[k].sel != (k == cur_region)) begin failures++; $display("FAIL sel %0d", k); end
    end
  end

  initial begin
    m_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int a, d;
      a = $urandom_range(0, 4095);
      cur_region = a >> 9;
      @(posedge clk);
      m_req <= '{sel: 1'b1, we: 1'b0, addr: REG_AW'(a), wdata: 0};
      @(negedge clk);
      while (!m_rsp.ack) @(negedge clk);
      d = m_rsp.rdata;
      checks++;
      if (cur_region == 7 ? (d != 0) : (d != ((cur_region << 24) | a))) begin
        failures++; $display("FAIL read %h -> %h", a, d);
      end
      @(posedge clk);
      m_req <= '0;
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
