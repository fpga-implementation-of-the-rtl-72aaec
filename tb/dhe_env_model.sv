// dhe_env_model: the world around the dynamic Huffman encoder, for tests.
//
// Holds a behavioural model of the external SRAM (synchronous, read data one
// cycle after the address) and a processor model that runs the control
// program over the register bus, frame after frame, in the three-stage
// pipeline of the design: in time slot t it
//   1. writes the code table built from frame t-2 and starts the DMA that
//      encodes frame t-2 (coded words go back to the SRAM),
//   2. reads the histogram of frame t-1 and tags each count with its symbol,
//   3. clears the histogram and starts the DMA that counts frame t,
//   4. sorts the counts with the hardware sorter, builds the Huffman tree by
//      repeatedly taking the two smallest table entries and inserting their
//      sum, and derives the code table (lengths limited to 12 bits, canonical
//      codes),
// then waits for both DMA streams, flushes the encoder and checks:
// histogram counters against a counted model (saturating at 65535), the
// Huffman cost against an independent software Huffman construction, and
// the coded bit stream in the SRAM against the stream expected from the
// table. Frames cycle through three kinds: a smooth random walk (long runs),
// one dominant symbol (saturates a counter when the frame has over 65535
// words) and a skewed random source.
module dhe_env_model
  import dhe_pkg::*;
#(
  parameter int unsigned NF          = 3,
  parameter int unsigned FRAME_BYTES = 8192
) (
  input  logic               clk,
  input  logic               rst_n,
  output reg_req_t           cpu_req,
  input  reg_rsp_t           cpu_rsp,
  input  logic               sram_en,
  input  logic               sram_we,
  input  logic [SRAM_AW-1:0] sram_addr,
  input  logic [DATA_W-1:0]  sram_wdata,
  output logic [DATA_W-1:0]  sram_rdata,
  output logic               done,
  output int                 checks,
  output int                 failures,
  output int                 lut_loads,
  output int                 overlap_slots
);

  localparam int unsigned FRAME_WORDS = FRAME_BYTES / 4;
  localparam int unsigned OUT_BASE    = 32'h40000;
  localparam int unsigned HUFF = 0 << 9, HIST = 1 << 9, SORT = 2 << 9, BRAM2 = 3 << 9;
  localparam int unsigned DMAH = 4 << 9, DMAE = 5 << 9, OUTW = 6 << 9;

  // ---------------- SRAM model ----------------
  logic [DATA_W-1:0] sram [1 << SRAM_AW];
  always_ff @(posedge clk) begin
    if (sram_en && sram_we) sram[sram_addr] <= sram_wdata;
    if (sram_en && !sram_we) sram_rdata <= sram[sram_addr];
  end

  longint cycle = 0, build_cycles = 0;
  always @(posedge clk) cycle++;

  // ---------------- processor model ----------------
  int lut_len  [NF][256];
  int lut_code [NF][256];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic bus_wr(input int unsigned a, input int unsigned d);
    @(posedge clk);
    cpu_req <= '{sel: 1'b1, we: 1'b1, addr: REG_AW'(a), wdata: d};
    @(negedge clk);
    while (!cpu_rsp.ack) @(negedge clk);
    @(posedge clk);
    cpu_req <= '0;
  endtask

  task automatic bus_rd(input int unsigned a, output int unsigned d);
    @(posedge clk);
    cpu_req <= '{sel: 1'b1, we: 1'b0, addr: REG_AW'(a), wdata: 0};
    @(negedge clk);
    while (!cpu_rsp.ack) @(negedge clk);
    d = cpu_rsp.rdata;
    @(posedge clk);
    cpu_req <= '0;
  endtask

  task automatic wait_zero(input int unsigned a);
    int unsigned v;
    do bus_rd(a, v); while (v[0]);
  endtask

  function automatic logic [7:0] frame_byte(input int f, input int i);
    return 8'(sram[f * 65536 + i / 4] >> (8 * (3 - i % 4)));
  endfunction

  // fill frame f with test data (big-endian bytes in 32-bit words)
  task automatic make_frame(input int f);
    int p = 128;
    for (int w = 0; w < FRAME_WORDS; w++) begin
      logic [31:0] word;
      for (int b = 0; b < 4; b++) begin
        int v;
        case (f % 3)
          0: begin
            if ($urandom_range(0, 3) == 0) p = p + $urandom_range(0, 6) - 3;
            if (p < 0) p = 0;
            if (p > 255) p = 255;
            v = p;
          end
          1: v = ($urandom_range(0, 99) < 97) ? 200 : $urandom_range(0, 255);
          default: v = ($urandom_range(0, 255) * $urandom_range(0, 255)) >> 8;
        endcase
        word[31 - 8*b -: 8] = 8'(v);
      end
      sram[f * 65536 + w] = word;
    end
  endtask

  // independent Huffman cost from counts (simple O(n^2) selection)
  function automatic longint huff_cost(input int unsigned h [256]);
    longint w[$];
    longint cost = 0;
    foreach (h[s]) if (h[s] != 0) w.push_back(h[s]);
    if (w.size() == 1) return w[0];
    while (w.size() > 1) begin
      int i0 = 0, i1;
      longint a, b;
      foreach (w[i]) if (w[i] < w[i0]) i0 = i;
      a = w[i0]; w.delete(i0);
      i1 = 0;
      foreach (w[i]) if (w[i] < w[i1]) i1 = i;
      b = w[i1]; w.delete(i1);
      cost += a + b;
      w.push_back(a + b);
    end
    return cost;
  endfunction

  // tree construction on the hardware sorter, then the code table
  task automatic build_table(input int f, input int unsigned h [256]);
    int unsigned e, a, b, cnt;
    int parent [512];
    int depth  [512];
    int nused = 0, next_idx = 256;
    int len [256];
    longint cost = 0;
    int kraft;

    bus_wr(SORT + 1, 0);
    bus_wr(SORT + 2, 0);
    for (int s = 0; s < 256; s++) if (h[s] != 0) begin
      bus_wr(SORT + 0, (h[s] << 9) | s);
      wait_zero(SORT + 3);
      nused++;
    end
    cnt = nused;
    // preliminary sort result must be descending
    for (int i = 1; i < nused; i++) begin
      bus_rd(BRAM2 + i - 1, a);
      bus_rd(BRAM2 + i, b);
      checks++;
      if (a < b) begin failures++; $display("FAIL table not sorted at %0d", i); end
    end
    while (cnt > 1) begin
      bus_rd(BRAM2 + cnt - 1, a);
      bus_rd(BRAM2 + cnt - 2, b);
      cnt -= 2;
      bus_wr(SORT + 2, cnt);
      parent[a & 511] = next_idx;
      parent[b & 511] = next_idx;
      bus_wr(SORT + 0, (((a >> 9) + (b >> 9)) << 9) | next_idx);
      wait_zero(SORT + 3);
      next_idx++;
      cnt++;
    end
    // depths, walking from the root down in reverse creation order
    depth[next_idx - 1] = 0;
    for (int n = next_idx - 2; n >= 256; n--) depth[n] = depth[parent[n]] + 1;
    for (int s = 0; s < 256; s++) begin
      len[s] = 0;
      if (h[s] != 0) len[s] = (nused == 1) ? 1 : depth[parent[s]] + 1;
      cost += longint'(h[s]) * len[s];
    end
    check($sformatf("frame %0d Huffman cost", f), cost, huff_cost(h));

    // limit lengths to 12 bits, then repair the Kraft sum (units of 2^-12)
    kraft = 0;
    for (int s = 0; s < 256; s++) if (len[s] != 0) begin
      if (len[s] > 12) len[s] = 12;
      kraft += 1 << (12 - len[s]);
    end
    while (kraft > 4096) begin
      int best = -1;
      for (int s = 0; s < 256; s++)
        if (len[s] != 0 && len[s] < 12 && (best < 0 || len[s] > len[best])) best = s;
      kraft -= 1 << (12 - len[best] - 1);
      len[best]++;
    end
    // cost of the length limit, in bits per counted word
    begin
      longint lim = 0, tot = 0;
      for (int s = 0; s < 256; s++) begin
        lim += longint'(h[s]) * len[s];
        tot += h[s];
      end
      $display("frame %0d length-limit loss %0.4f bit/word", f,
               real'(lim - cost) / real'(tot));
      // the 12-bit code field should cost less than 0.066 bit per word
      checks++;
      if (real'(lim - cost) / real'(tot) >= 0.066) begin
        failures++;
        $display("FAIL frame %0d length-limit loss too large", f);
      end
    end
    // canonical codes
    begin
      int code = 0;
      for (int l = 1; l <= 12; l++) begin
        for (int s = 0; s < 256; s++) if (len[s] == l) begin
          lut_len[f][s]  = l;
          lut_code[f][s] = code;
          code++;
        end
        code <<= 1;
      end
      for (int s = 0; s < 256; s++) if (len[s] == 0) begin
        lut_len[f][s] = 0;
        lut_code[f][s] = 0;
      end
    end
  endtask

  // compare the coded frame f in the SRAM with the expected bit stream
  task automatic check_output(input int f);
    int unsigned v, words;
    longint bits = 0;
    int wi = 0, bi = 0, bad = 0;
    logic [31:0] cur;
    bus_rd(HUFF + 'h101, v);
    check($sformatf("frame %0d words encoded", f), v, FRAME_BYTES);
    for (int i = 0; i < FRAME_BYTES; i++) bits += lut_len[f][frame_byte(f, i)];
    bus_rd(HUFF + 'h102, v);
    check($sformatf("frame %0d code bits", f), v, bits);
    bus_rd(OUTW + 1, words);
    check($sformatf("frame %0d output words", f), words, (bits + 31) / 32);
    cur = sram[OUT_BASE + f * 65536];
    for (int i = 0; i < FRAME_BYTES; i++) begin
      int s = frame_byte(f, i);
      for (int k = lut_len[f][s] - 1; k >= 0; k--) begin
        if (cur[31 - bi] != lut_code[f][s][k]) bad++;
        bi++;
        if (bi == 32) begin
          bi = 0; wi++;
          cur = sram[OUT_BASE + f * 65536 + wi];
        end
      end
    end
    check($sformatf("frame %0d wrong code bits", f), bad, 0);
    $display("frame %0d: %0d words -> %0d bits (%0.3f bits per word)", f, FRAME_BYTES, bits,
             real'(bits) / FRAME_BYTES);
  endtask

  task automatic check_hist(input int f, output int unsigned h [256]);
    int unsigned model [256];
    foreach (model[s]) model[s] = 0;
    for (int i = 0; i < FRAME_BYTES; i++) model[frame_byte(f, i)]++;
    for (int s = 0; s < 256; s++) begin
      bus_rd(HIST + s, h[s]);
      check($sformatf("frame %0d bin %0d", f, s), h[s], (model[s] > 65535) ? 65535 : model[s]);
    end
  endtask

  initial begin
    int unsigned h [256];
    int unsigned v, busy_h, busy_e;
    cpu_req = '0;
    done = 0; checks = 0; failures = 0; lut_loads = 0; overlap_slots = 0;
    for (int f = 0; f < NF; f++) make_frame(f);
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    repeat (2) @(posedge clk);

    for (int t = 0; t < NF + 2; t++) begin
      longint t_start;
      t_start = cycle;
      // 1. code table of frame t-2, start its encoding
      if (t >= 2) begin
        for (int s = 0; s < 256; s++) bus_wr(HUFF + s, (lut_len[t-2][s] << 12) | lut_code[t-2][s]);
        lut_loads++;
        bus_wr(HUFF + 'h101, 0);
        bus_wr(HUFF + 'h102, 0);
        bus_wr(OUTW + 0, OUT_BASE + (t - 2) * 65536);
        bus_wr(DMAE + 0, (t - 2) * 65536);
        bus_wr(DMAE + 1, FRAME_WORDS);
        bus_wr(DMAE + 2, 1);
      end
      // 2. histogram of frame t-1
      if (t >= 1 && t <= NF) check_hist(t - 1, h);
      // 3. count frame t
      if (t < NF) begin
        bus_wr(HIST + 'h100, 1);
        wait_zero(HIST + 'h100);
        bus_wr(DMAH + 0, t * 65536);
        bus_wr(DMAH + 1, FRAME_WORDS);
        bus_wr(DMAH + 2, 1);
      end
      // 4. tree and code table of frame t-1
      build_cycles = 0;
      if (t >= 1 && t <= NF) begin
        longint b0;
        b0 = cycle;
        build_table(t - 1, h);
        build_cycles = cycle - b0;
      end
      // wait for the slot to end
      bus_rd(DMAH + 2, busy_h);
      bus_rd(DMAE + 2, busy_e);
      if (busy_h[0] && busy_e[0]) overlap_slots++;
      if (t >= 2) begin
        wait_zero(DMAE + 2);
        do bus_rd(HUFF + 'h101, v); while (v != FRAME_BYTES);
        bus_wr(HUFF + 'h100, 1);
        wait_zero(HUFF + 'h100);
        bus_wr(OUTW + 2, 1);
        wait_zero(OUTW + 2);
        check_output(t - 2);
      end
      if (t < NF) begin
        wait_zero(DMAH + 2);
        do bus_rd(HIST + 'h101, v); while (v != FRAME_BYTES);
      end
      $display("time slot %0d: %0d clock cycles (table build %0d)", t, cycle - t_start, build_cycles);
    end
    done = 1;
  end

endmodule
