// tb_dyn_huff_top: end-to-end test of the dynamic Huffman encoder.
// Three frames of 72000 8-bit words run through the three-stage pipeline
// (histogram, sort and table construction, encoding) driven by the processor
// model in dhe_env_model, which checks histograms, Huffman optimality and
// every coded bit. The frame with a dominant symbol is large enough to
// saturate a histogram counter. The test also counts how often each
// mechanism happened: counter forwarding, counter saturation, sort moves,
// SRAM contention, coded words waiting in the output FIFO, code table
// reloads and time slots in which both DMA streams ran together; any that
// never happened is a failure.
module tb_dyn_huff_top;
  import dhe_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  reg_req_t cpu_req;
  reg_rsp_t cpu_rsp;
  logic sram_en, sram_we;
  logic [SRAM_AW-1:0] sram_addr;
  logic [DATA_W-1:0] sram_wdata, sram_rdata;
  events_t events;
  logic done;
  int checks, failures, lut_loads, overlap_slots;
  int n_fwd = 0, n_sat = 0, n_move = 0, n_wait = 0, n_conf = 0;

  dyn_huff_top dut (.*);

  dhe_env_model #(.NF(3), .FRAME_BYTES(72000)) env (.*);

  always @(posedge clk) begin
    if (events.hist_fwd) n_fwd++;
    if (events.hist_sat) n_sat++;
    if (events.sort_move) n_move++;
    if (events.out_wait) n_wait++;
    if (events.sram_conflict) n_conf++;
  end

  task automatic need(input string what, input int n);
    $display("%s: %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (done);
    need("histogram forwarding", n_fwd);
    need("histogram saturation", n_sat);
    need("sort moves", n_move);
    need("output FIFO waits", n_wait);
    need("SRAM contention", n_conf);
    need("code table loads", lut_loads);
    need("overlapping slots", overlap_slots);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
