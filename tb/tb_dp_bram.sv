// tb_dp_bram: self-checking test of the dual-port block RAM.
// Random reads and writes on both ports at once, with a small address range
// so that the ports often collide, checked against a model array: a read
// returns the word held before the edge, port B wins a write collision, and
// rdata holds while a port is disabled.
module tb_dp_bram;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        a_en, a_we, b_en, b_we;
  logic [7:0]  a_addr, b_addr;
  logic [15:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [15:0] model [256];
  logic [15:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  dp_bram #(.DEPTH(256), .WIDTH(16)) dut (.*);

  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // initialise through port A
    for (int i = 0; i < 256; i++) begin
      @(posedge clk);
      a_en <= 1; a_we <= 1; a_addr <= 8'(i); a_wdata <= 16'(i * 3);
      model[i] = 16'(i * 3);
    end
    @(posedge clk);
    a_en <= 0; a_we <= 0;
    exp_a = a_rdata; exp_b = b_rdata;
    for (int k = 0; k < 5000; k++) begin
      logic ae, aw, be, bw;
      logic [7:0] aa, ba;
      logic [15:0] ad, bd;
      ae = 1'($urandom); aw = 1'($urandom); be = 1'($urandom); bw = 1'($urandom);
      aa = 8'($urandom_range(0, 7)); ba = 8'($urandom_range(0, 7));
      ad = 16'($urandom); bd = 16'($urandom);
      @(posedge clk);
      a_en <= ae; a_we <= aw; a_addr <= aa; a_wdata <= ad;
      b_en <= be; b_we <= bw; b_addr <= ba; b_wdata <= bd;
      @(negedge clk);
      // outputs of the previous access
      checks += 2;
      if (a_rdata !== exp_a) begin failures++; $display("FAIL A got %h exp %h", a_rdata, exp_a); end
      if (b_rdata !== exp_b) begin failures++; $display("FAIL B got %h exp %h", b_rdata, exp_b); end
      if (ae) exp_a = model[aa];
      if (be) exp_b = model[ba];
      if (ae && aw) model[aa] = ad;
      if (be && bw) model[ba] = bd;
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
