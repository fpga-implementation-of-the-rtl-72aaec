// opb_sort: inserts one element into a table that is already sorted.
//
// The table lives in an external dual-port block RAM (bram_2) at addresses
// base .. base+count-1, sorted in descending order, so its two smallest
// elements are always its last two. Writing an element to the sorter starts
// one insertion step of insertion sort: walking from the end of the table
// towards its start, every element smaller than the new one is moved one
// place up, and the new element is written into the gap. Port A reads
// (sequential, descending addresses) while port B writes the moved element,
// so one comparison and one move are done per clock; the read of the next
// element is issued speculatively in the same cycle. After the insertion the
// element count is incremented. Whole words are compared as unsigned
// numbers: putting the histogram count in the upper bits and the node index
// in the lower bits sorts by count. A new element equal to a table element
// is placed after it (nearer the end).
//
// Interfaces
//   reg_req/reg_rsp  register slave (the SOPB bus):
//                      0  W: element to insert (starts the insertion; held
//                         off until the previous one has finished)
//                      1  R/W: table base address
//                      2  R/W: number of elements in the table
//                      3  R: bit 0 = busy
//                      4  R: clock cycles taken by the last insertion
//   m_rd_* / m_wr_*  read port (MSOPB) and write port (MDOPB) of bram_2
// Timing: inserting behind k larger elements into a table where j elements
// are smaller takes j + 2 cycles (j moves, one final write, one start cycle).
// The algorithm, one compare-and-move per clock and the use of both RAM
// ports follow the design; the register map, the descending order and the
// tie rule are this implementation's choices, as is reading and writing the
// same table (the insertion is done in place).
module opb_sort
  import dhe_pkg::*;
#(
  parameter int unsigned ELEM_W = 32,
  parameter int unsigned TAB_AW = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  reg_req_t          reg_req,
  output reg_rsp_t          reg_rsp,
  output logic              m_rd_en,
  output logic [TAB_AW-1:0] m_rd_addr,
  input  logic [ELEM_W-1:0] m_rd_data,
  output logic              m_wr_en,
  output logic [TAB_AW-1:0] m_wr_addr,
  output logic [ELEM_W-1:0] m_wr_data,
  output logic              busy,
  output logic              moved       // an element was moved this cycle
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_LAST} state_t;

  state_t            state;
  logic [ELEM_W-1:0] new_q;
  logic [TAB_AW-1:0] base_q;
  logic [TAB_AW:0]   count_q;
  logic [TAB_AW:0]   idx;        // index of the element whose data is on m_rd_data
  logic [31:0]       cyc, last_cyc;
  logic              ack_q, access, start, smaller;

  assign busy    = (state != S_IDLE);
  assign access  = reg_req.sel && !ack_q && !(reg_req.we && reg_req.addr[2:0] == 3'd0 && busy);
  assign start   = access && reg_req.we && reg_req.addr[2:0] == 3'd0;
  assign smaller = (m_rd_data < new_q);
  assign moved   = (state == S_RUN) && smaller;

  always_comb begin
    m_rd_en   = 1'b0;
    m_rd_addr = '0;
    m_wr_en   = 1'b0;
    m_wr_addr = '0;
    m_wr_data = new_q;
    unique case (state)
      S_IDLE: begin
        if (start && count_q != '0) begin
          m_rd_en   = 1'b1;
          m_rd_addr = base_q + TAB_AW'(count_q - 1'b1);
        end else if (start) begin
          // empty table: the element becomes its only entry
          m_wr_en   = 1'b1;
          m_wr_addr = base_q;
          m_wr_data = reg_req.wdata[ELEM_W-1:0];
        end
      end
      S_RUN: begin
        m_wr_en = 1'b1;
        if (smaller) begin
          m_wr_addr = base_q + TAB_AW'(idx + 1'b1);
          m_wr_data = m_rd_data;
          if (idx != '0) begin
            m_rd_en   = 1'b1;
            m_rd_addr = base_q + TAB_AW'(idx - 1'b1);
          end
        end else begin
          m_wr_addr = base_q + TAB_AW'(idx + 1'b1);
        end
      end
      S_LAST: begin
        m_wr_en   = 1'b1;
        m_wr_addr = base_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      new_q    <= '0;
      base_q   <= '0;
      count_q  <= '0;
      idx      <= '0;
      cyc      <= '0;
      last_cyc <= '0;
      ack_q    <= 1'b0;
    end else begin
      ack_q <= access;
      if (busy) cyc <= cyc + 32'd1;
      unique case (state)
        S_IDLE: if (start) begin
          new_q <= reg_req.wdata[ELEM_W-1:0];
          cyc   <= 32'd1;
          if (count_q != '0) begin
            idx   <= count_q - 1'b1;
            state <= S_RUN;
          end else begin
            count_q  <= count_q + 1'b1;
            last_cyc <= 32'd1;
          end
        end
        S_RUN: begin
          if (smaller) begin
            if (idx == '0) state <= S_LAST;
            else           idx <= idx - 1'b1;
          end else begin
            state    <= S_IDLE;
            count_q  <= count_q + 1'b1;
            last_cyc <= cyc + 32'd1;
          end
        end
        S_LAST: begin
          state    <= S_IDLE;
          count_q  <= count_q + 1'b1;
          last_cyc <= cyc + 32'd1;
        end
        default: state <= S_IDLE;
      endcase
      if (access && reg_req.we && reg_req.addr[2:0] == 3'd1) base_q  <= reg_req.wdata[TAB_AW-1:0];
      if (access && reg_req.we && reg_req.addr[2:0] == 3'd2) count_q <= reg_req.wdata[TAB_AW:0];
    end
  end

  logic [2:0] raddr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      raddr_q <= '0;
    else if (access) raddr_q <= reg_req.addr[2:0];
  end

  always_comb begin
    reg_rsp.ack   = ack_q;
    reg_rsp.rdata = '0;
    unique case (raddr_q)
      3'd1:    reg_rsp.rdata = DATA_W'(base_q);
      3'd2:    reg_rsp.rdata = DATA_W'(count_q);
      3'd3:    reg_rsp.rdata = {31'b0, busy};
      3'd4:    reg_rsp.rdata = last_cyc;
      default: ;
    endcase
  end

  // the table never grows past the memory
  assert property (@(posedge clk) disable iff (!rst_n)
                   start |-> count_q < (TAB_AW+1)'(1 << TAB_AW));

endmodule
