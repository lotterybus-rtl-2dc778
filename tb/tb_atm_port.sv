// tb_atm_port: an output port fed from a modelled address queue and served
// by a modelled bus that grants at random. Checks that the port pops one
// address per cell, reads the 12 words of the cell in order with the right
// remaining length, forwards each returned word to its link with sop/eop on
// the first/last, returns the slot after the last word, and has no request
// up while its queue is empty and it is idle. The link is ready only 3/4 of
// the time, and no cell may be taken while it is not.
module tb_atm_port;
  import lottery_pkg::*;
  logic clk = 0, rst_n = 0;
  logic q_empty, q_pop;
  logic [9:0] q_head, rel_addr;
  lb_mreq_t m_req;
  lb_mrsp_t m_rsp;
  logic out_valid, out_sop, out_eop, rel_valid, link_rdy = 1;
  int link_waits = 0;
  data_t out_data;
  logic [9:0] queue [$];
  logic [9:0] expect_cells [$];
  int checks = 0, failures = 0, out_k = 0, cells_out = 0, rd_pend = 0;
  logic [9:0] cur_cell, rd_addr;
  int issued = 0;
  always #5 clk = ~clk;

  atm_port dut (.clk, .rst_n, .q_empty, .q_head, .q_pop, .m_req, .m_rsp, .link_rdy,
                .out_valid, .out_sop, .out_eop, .out_data, .rel_valid, .rel_addr);

  function automatic data_t word_at(logic [9:0] a);
    return {16'hCE11, 6'd0, a};
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask


  // bus model: grant the request at random, return read data one cycle later
  always @(negedge clk) begin
    q_empty = (queue.size() == 0);
    q_head  = q_empty ? '0 : queue[0];
    link_rdy = ($urandom % 4 != 0);
    m_rsp.gnt = m_req.req && ($urandom % 3 != 0);
    m_rsp.rvalid = (rd_pend != 0);
    m_rsp.rdata  = word_at(rd_addr);
  end

  always @(posedge clk) if (rst_n) begin
    if (!link_rdy && queue.size() > 0 && expect_cells.size() == 0) link_waits++;
    rd_pend <= 0;
    if (m_rsp.gnt) begin
      chk(!m_req.we && m_req.addr == addr_t'(expect_cells[$]) + addr_t'(issued), "read address");
      chk(int'(m_req.len) == 12 - issued + ((issued == 11 && queue.size() > 0 && link_rdy) ? 12 : 0), "ready length");
      rd_pend <= 1; rd_addr <= m_req.addr[9:0];
      issued = (issued == 11) ? 0 : issued + 1;
    end
    if (q_pop) begin
      chk(queue.size() > 0 && link_rdy, "pop from a non-empty queue, link ready");
      expect_cells.push_back(queue[0]);
      void'(queue.pop_front());
    end
    if (out_valid) begin
      chk(out_data == word_at(expect_cells[0] + 10'(out_k)), "link word");
      chk(out_sop == (out_k == 0) && out_eop == (out_k == 11), "sop/eop");
      chk(rel_valid == out_eop && (!rel_valid || rel_addr == expect_cells[0]), "slot release");
      if (out_k == 11) begin
        out_k = 0; cells_out++;
        void'(expect_cells.pop_front());
      end else out_k++;
    end else chk(!rel_valid, "no stray release");
    if (q_empty && expect_cells.size() == 0) chk(!m_req.req, "quiet when idle");
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 100; c++) begin
      @(posedge clk);
      #1 queue.push_back(10'(($urandom % 64) << 4));
      repeat ($urandom % 30) @(posedge clk);
    end
    repeat (2000) @(posedge clk);
    chk(cells_out == 100, "all cells forwarded");
    chk(link_waits > 0, "a cell waited for its link");
    $display("cells forwarded %0d", cells_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
