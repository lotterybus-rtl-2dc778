// tb_lotterybus_soc: end-to-end test of both systems of the top, at the
// top's own (default) sizes, running at the same time.
//
// ATM switch (static tickets 1:1:4:6): random cells with randomly stalling
// output links, then rounds in which the links hold back while the queues
// fill and then all open, the last round overfilling the 64 cell slots.
// Every cell must arrive intact at its port; while all four ports have
// cells queued, the bus shares must follow the scaled tickets 5:6:21:32.
//
// Dynamic-ticket bus: four self-checking masters (tb_bus_master), each
// working in another master's slave, saturate the bus with tickets 1:2:3:4,
// then the tickets are changed to 4:3:2:1 at run time. The words each
// master moves must be ordered like its tickets in each phase, all read
// data must match, and the bus must never idle in a cycle following one in
// which a master other than a finishing owner was requesting.
//
// Mechanisms counted (each must happen): back-to-back handovers between
// owners on each bus (lotteries pipelined with transfers), tenures cut at the
// 8-word maximum transfer size on each bus, ticket change at run time, cells
// held back by a link, cell input stalled for lack of slots or queue room.
module tb_lotterybus_soc;
  import lottery_pkg::*;
  logic clk = 0, rst_n = 0;
  // ATM side
  logic a_enable = 0, a_saturate = 0;
  logic [3:0] a_mask = 4'hf, link_rdy = 4'hf;
  int a_gap = 10;
  logic in_valid, in_ready, in_sop;
  logic [1:0] in_port, a_owner;
  data_t in_data;
  logic [3:0] out_valid, out_sop, out_eop;
  data_t [3:0] out_data;
  logic a_owner_valid, a_xfer, a_tend;
  logic [6:0] free_slots;
  int sent[4], recv[4], stalls, tchecks, tfails;
  // dynamic bus side
  lb_mreq_t [3:0] m_req;
  lb_mrsp_t [3:0] m_rsp;
  logic [3:0][TICKET_W-1:0] tickets = {4'd4, 4'd3, 4'd2, 4'd1};
  logic [3:0] m_en = 0;
  logic [1:0] d_owner;
  logic d_owner_valid, d_xfer, d_tend;
  int words[4], waits[4], msgs[4], mchecks[4], mfails[4];

  int checks = 0, failures = 0;
  int a_handover = 0, d_handover = 0, a_cap = 0, d_cap = 0, ticket_changes = 0, link_holds = 0;
  int a_run = 0, d_run = 0, a_busy = 0, a_words[4];
  bit a_measure = 0;
  always #5 clk = ~clk;

  lotterybus_soc dut (
    .clk, .rst_n,
    .atm_in_valid(in_valid), .atm_in_ready(in_ready), .atm_in_sop(in_sop),
    .atm_in_port(in_port), .atm_in_data(in_data), .atm_link_rdy(link_rdy),
    .atm_out_valid(out_valid), .atm_out_sop(out_sop), .atm_out_eop(out_eop),
    .atm_out_data(out_data), .atm_bus_owner(a_owner), .atm_bus_owner_valid(a_owner_valid),
    .atm_bus_xfer(a_xfer), .atm_bus_tenure_end(a_tend), .atm_free_slots(free_slots),
    .dyn_m_req(m_req), .dyn_m_rsp(m_rsp), .dyn_tickets(tickets),
    .dyn_bus_owner(d_owner), .dyn_bus_owner_valid(d_owner_valid),
    .dyn_bus_xfer(d_xfer), .dyn_bus_tenure_end(d_tend)
  );

  tb_atm_traffic u_src (.clk, .rst_n, .enable(a_enable), .saturate(a_saturate),
    .port_mask(a_mask), .gap_max(a_gap), .in_valid, .in_ready, .in_sop, .in_port, .in_data,
    .out_valid, .out_sop, .out_eop, .out_data, .sent, .recv, .stalls,
    .checks(tchecks), .failures(tfails));

  for (genvar j = 0; j < 4; j++) begin : g_m
    tb_bus_master #(.ID(j), .LMAX(20), .REGION(addr_t'((j + 1) % 4) << 14)) u_m (
      .clk, .rst_n, .enable(m_en[j]), .m_req(m_req[j]), .m_rsp(m_rsp[j]),
      .words(words[j]), .wait_cycles(waits[j]), .msgs(msgs[j]),
      .checks(mchecks[j]), .failures(mfails[j])
    );
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // per-cycle monitors of both buses
  logic a_tend_q = 0, d_tend_q = 0;
  logic [1:0] a_owner_q = 0, d_owner_q = 0;
  logic [3:0] d_pend_q = 0;
  always @(posedge clk) if (rst_n) begin
    automatic logic [3:0] pend;
    // ATM bus
    if (a_tend_q && a_xfer && a_owner != a_owner_q) a_handover++;
    if (a_xfer) begin
      a_run++;
      if (a_tend) begin if (a_run == 8) a_cap++; a_run = 0; end
    end
    a_tend_q  <= a_xfer && a_tend;
    a_owner_q <= a_owner;
    for (int p = 0; p < 4; p++) if (!link_rdy[p] && sent[p] > recv[p]) link_holds++;
    if (a_measure && sent[0] - recv[0] > 1 && sent[1] - recv[1] > 1 &&
        sent[2] - recv[2] > 1 && sent[3] - recv[3] > 1 && a_xfer) begin
      a_busy++; a_words[a_owner]++;
    end
    // dynamic bus
    if (d_tend_q && d_xfer && d_owner != d_owner_q) d_handover++;
    if (d_xfer) begin
      d_run++;
      if (d_tend) begin if (d_run == 8) d_cap++; d_run = 0; end
    end
    d_tend_q  <= d_xfer && d_tend;
    d_owner_q <= d_owner;
    if (d_pend_q != 0) begin
      checks++;
      if (!d_xfer) begin failures++; $display("FAIL idle dynamic bus with a request pending"); end
    end
    for (int i = 0; i < 4; i++)
      pend[i] = m_req[i].req && !(d_xfer && d_owner == 2'(i) && m_req[i].len == 1);
    d_pend_q <= pend;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ATM link behaviour during the random phase
  bit links_random = 1, atm_done = 0;
  always @(negedge clk) if (links_random) link_rdy = 4'($urandom) | 4'($urandom);

  task automatic atm_drain();
    int n = 0;
    a_enable = 0;
    while (n < 5000 && (sent[0] != recv[0] || sent[1] != recv[1] || sent[2] != recv[2] || sent[3] != recv[3])) begin
      @(posedge clk); n++;
    end
    repeat (20) @(posedge clk);
    for (int p = 0; p < 4; p++) chk(sent[p] == recv[p], "all cells delivered");
    chk(free_slots == 64, "all slots returned");
  endtask

  // ATM stimulus
  initial begin
    for (int p = 0; p < 4; p++) a_words[p] = 0;
    wait (rst_n);
    a_enable = 1;
    while (sent[0] + sent[1] + sent[2] + sent[3] < 200) @(posedge clk);
    atm_drain();
    links_random = 0;
    a_saturate = 1;
    for (int r = 0; r < 12; r++) begin
      // the last round fills all 64 slots and then keeps offering cells
      automatic int target = sent[0] + sent[1] + sent[2] + sent[3] + (r == 11 ? 64 : 60);
      @(negedge clk); link_rdy = 4'h0; a_enable = 1;
      while (sent[0] + sent[1] + sent[2] + sent[3] < target) @(posedge clk);
      if (r == 11) repeat (50) @(posedge clk);
      else a_enable = 0;
      @(negedge clk); link_rdy = 4'hf; a_measure = 1;
      if (r == 11) begin
        while (sent[0] + sent[1] + sent[2] + sent[3] < target + 2) @(posedge clk);
        a_enable = 0;
      end
      atm_drain();
      a_measure = 0;
    end
    atm_done = 1;
  end

  task automatic dyn_phase(logic [3:0][TICKET_W-1:0] tk, output int got[4]);
    int prev_words[4];
    tickets = tk; ticket_changes++;
    for (int i = 0; i < 4; i++) prev_words[i] = words[i];
    repeat (15000) @(posedge clk);
    for (int i = 0; i < 4; i++) got[i] = words[i] - prev_words[i];
    $display("tickets %0d %0d %0d %0d: words %0d %0d %0d %0d", tk[0], tk[1], tk[2], tk[3],
             got[0], got[1], got[2], got[3]);
  endtask

  initial begin
    int wa[4], wb[4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    m_en = 4'hf;
    dyn_phase({4'd4, 4'd3, 4'd2, 4'd1}, wa);
    dyn_phase({4'd1, 4'd2, 4'd3, 4'd4}, wb);
    m_en = 0;
    chk(wa[3] > wa[2] && wa[2] > wa[1] && wa[1] > wa[0], "dynamic shares follow 1:2:3:4");
    chk(wb[0] > wb[1] && wb[1] > wb[2] && wb[2] > wb[3], "dynamic shares follow 4:3:2:1");
    // let the ATM side finish its rounds
    wait (atm_done);
    begin
      automatic real want[4] = '{5.0 / 64, 6.0 / 64, 21.0 / 64, 32.0 / 64};
      for (int p = 0; p < 4; p++) begin
        automatic real share = real'(a_words[p]) / real'(a_busy);
        $display("ATM port %0d: bus share %f (tickets %f)", p + 1, share, want[p]);
        chk(share > want[p] - 0.05 && share < want[p] + 0.05, "ATM shares follow tickets");
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks += mchecks[i]; failures += mfails[i];
      chk(msgs[i] > 10, "every dynamic-bus master made progress");
    end
    checks += tchecks; failures += tfails;
    $display("mechanisms: ATM handovers %0d, dynamic handovers %0d, ATM capped tenures %0d, dynamic capped tenures %0d",
             a_handover, d_handover, a_cap, d_cap);
    $display("            ticket changes %0d, link-held cycles %0d, input stalls %0d",
             ticket_changes, link_holds, stalls);
    chk(a_handover > 0, "ATM back-to-back handover");
    chk(d_handover > 0, "dynamic back-to-back handover");
    chk(a_cap > 0, "ATM transfer-size cap");
    chk(d_cap > 0, "dynamic transfer-size cap");
    chk(ticket_changes > 1, "run-time ticket change");
    chk(link_holds > 0, "cells held by a link");
    chk(stalls > 0, "cell input stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
