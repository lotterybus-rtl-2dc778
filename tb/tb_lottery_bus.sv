// tb_lottery_bus: four self-checking masters (tb_bus_master) with tickets
// 1:2:3:4 on a lottery_bus with four shared_mem slaves, one slave region per
// master. Checks: read data returned as written (inside the masters); a
// lone request on an idle bus is taken one cycle after it appears; no tenure
// exceeds the maximum transfer size (8) and long messages are split; the bus
// never idles in a cycle after one in which a master other than a finishing
// owner was requesting (lotteries pipelined with transfers); and under
// saturation the masters' word counts are ordered like their tickets.
module tb_lottery_bus;
  import lottery_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] en = 0;
  lb_mreq_t [3:0] m_req;
  lb_mrsp_t [3:0] m_rsp;
  lb_sreq_t [3:0] s_req;
  data_t    [3:0] s_rdata;
  logic [1:0] owner;
  logic owner_valid, xfer, tenure_end;
  int words[4], waits[4], msgs[4], mchecks[4], mfails[4];
  int checks = 0, failures = 0, cyc = 0;
  int splits = 0, tenure_words = 0, idle_after_req = 0, max_tenure = 0;
  always #5 clk = ~clk;

  lottery_bus #(.N_M(4), .N_S(4), .TICKETS({4'd4, 4'd3, 4'd2, 4'd1}), .MAX_XFER(8)) dut (
    .clk, .rst_n, .m_req, .m_rsp, .tickets('0), .s_req, .s_rdata,
    .owner, .owner_valid, .xfer, .tenure_end
  );

  for (genvar j = 0; j < 4; j++) begin : g_s
    shared_mem #(.AW(10)) u_mem (.clk, .s_req(s_req[j]), .rdata(s_rdata[j]));
    tb_bus_master #(.ID(j), .LMAX(20), .REGION(addr_t'(j) << 14)) u_m (
      .clk, .rst_n, .enable(en[j]), .m_req(m_req[j]), .m_rsp(m_rsp[j]),
      .words(words[j]), .wait_cycles(waits[j]), .msgs(msgs[j]),
      .checks(mchecks[j]), .failures(mfails[j])
    );
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // pipelining and maximum transfer size, checked every cycle
  logic [3:0] pending_q = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      logic [3:0] pend;
      if (pending_q != 0) begin
        checks++;
        if (!xfer) begin idle_after_req++; failures++; $display("FAIL idle bus with pending request, cycle %0d", cyc); end
      end
      for (int i = 0; i < 4; i++)
        pend[i] = m_req[i].req && !(xfer && owner == 2'(i) && m_req[i].len == 1);
      pending_q <= pend;
      if (xfer) begin
        if (tenure_end) begin
          if (tenure_words + 1 > max_tenure) max_tenure = tenure_words + 1;
          if (m_req[owner].len > 1) splits++;
          tenure_words <= 0;
        end else tenure_words <= tenure_words + 1;
      end
    end
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t_req, t_gnt;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    // lone request on an idle bus
    en <= 4'b0100;
    @(posedge clk); en <= 0;
    t_req = -1; t_gnt = -1;
    for (int k = 0; k < 10 && t_gnt < 0; k++) begin
      #1;
      if (m_req[2].req && t_req < 0) t_req = k;
      if (m_rsp[2].gnt && t_gnt < 0) t_gnt = k;
      @(posedge clk);
    end
    chk(t_req >= 0 && t_gnt == t_req + 1, "grant one cycle after request on idle bus");
    repeat (60) @(posedge clk);
    // saturated traffic
    en <= 4'hf;
    repeat (30000) @(posedge clk);
    en <= 0;
    repeat (100) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      $display("master %0d: words %0d msgs %0d wait %0d checks %0d", i + 1, words[i], msgs[i], waits[i], mchecks[i]);
      checks += mchecks[i]; failures += mfails[i];
      chk(msgs[i] > 10, "master made progress");
    end
    chk(words[3] > words[2] && words[2] > words[1] && words[1] > words[0], "bandwidth ordered like tickets");
    chk(max_tenure == 8, "tenures capped at 8 words");
    chk(splits > 10, "long messages split by the transfer limit");
    $display("splits %0d, max tenure %0d", splits, max_tenure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
