// tb_atm_table1: the ATM switch under the quality-of-service load of its
// evaluation, at default parameters.
// Ports 1-3 are kept backlogged. Port 4 carries light, latency-critical
// traffic: one cell every P4_GAP cycles, about 10% of the bus.
//
// The run has two phases. First the links of ports 1-3 hold back while
// about 15 cells per port are queued. Then all links open, and for
// RUN_CYCLES the source keeps refilling ports 1-3 and injects a port-4 cell
// every P4_GAP cycles.
//
// While ports 1-3 all have at least two cells outstanding, the bus words of
// each port are counted. The checks:
//   - Port 4 gets the bandwidth it offers (10 +- 2 %).
//   - Ports 1-3 split the rest of the bus like their scaled tickets 5:6:21.
//     With port 4 at 10 % that is 14.1 / 16.9 / 59.1 % of the bus, against
//     the published 14.30 / 17.00 / 59.03 %. Tolerance is 3 points.
//   - Port 4's latency is bounded. It is measured as the cycles from a cell
//     being queued (its last input word taken) to its last word on the link,
//     divided by the 12 words of the cell.
//     The floor is about 13/12. A cell needs two tenures (8 + 4 words), and
//     port 4 wins each draw with probability 32/64. It therefore waits on
//     average half an 8-word tenure, then about one lost tenure per piece:
//     roughly (4 + 8 + 8 + 8 + 4 + 2) / 12 = 2.8 cycles per word.
//     The check asks for at most 3.5; the published figure, under other
//     cell and transfer sizes, is 1.4.
//   - Every cell reaches its own port intact and in order.
// Each payload word carries {port, cell sequence number, word index}, so
// the checker needs no copy of the data.
module tb_atm_table1;
  import lottery_pkg::*;
  localparam int CW = 12;            // words per cell
  localparam int P4_GAP = 120;       // one port-4 cell per 120 cycles = 10 %
  localparam int RUN_CYCLES = 24000;
  localparam int FILL = 15;          // cells per port 1-3 before the links open

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_sop = 0;
  logic [1:0] in_port = 0, bus_owner;
  data_t in_data = '0;
  logic [3:0] link_rdy = 4'h0, out_valid, out_sop, out_eop;
  data_t [3:0] out_data;
  logic bus_owner_valid, bus_xfer, bus_tenure_end;
  logic [6:0] free_slots;
  always #5 clk = ~clk;

  atm_switch dut (.clk, .rst_n, .in_valid, .in_ready, .in_sop, .in_port, .in_data,
    .link_rdy, .out_valid, .out_sop, .out_eop, .out_data, .bus_owner, .bus_owner_valid,
    .bus_xfer, .bus_tenure_end, .free_slots);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- source
  int sent[4] = '{default: 0}, recv[4] = '{default: 0};            // cells fully sent / fully received
  int cap = FILL;                   // outstanding limit for ports 1-3
  bit run_p4 = 0, src_on = 0;
  int p4_due = 0, cyc = 0;
  int word_i = 0;                   // word index within the cell being sent
  bit in_cell = 0;
  int tq4[$];                       // port-4 queue times, oldest first

  function automatic data_t payload(int p, int seq, int w);
    return {8'(p), 12'(seq), 12'(w)};
  endfunction

  int cur_p = 0;                    // port of the cell being sent
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && src_on) begin
      if (in_valid && in_ready) begin
        if (word_i == CW - 1) begin
          sent[cur_p]++;
          if (cur_p == 3) tq4.push_back(cyc);
          in_cell = 0;
          word_i = 0;
        end else word_i++;
      end
      if (!in_cell) begin
        // next cell: port 4 when due, else the least loaded of ports 1-3
        automatic int p = -1;
        if (run_p4 && cyc >= p4_due) begin p = 3; p4_due = p4_due + P4_GAP; end
        else begin
          automatic int best = 1 << 30;
          for (int q = 0; q < 3; q++)
            if (sent[q] - recv[q] < cap && sent[q] - recv[q] < best) begin
              best = sent[q] - recv[q]; p = q;
            end
        end
        if (p >= 0) begin in_cell = 1; cur_p = p; end
      end
      in_valid <= in_cell;
      in_sop   <= in_cell && word_i == 0;
      in_port  <= 2'(cur_p);
      in_data  <= payload(cur_p, sent[cur_p], word_i);
    end
  end

  // ---------------- sink: data check and port-4 latency
  int rx_w[4] = '{default: 0}, rx_seq[4] = '{default: 0};
  int lat4_sum = 0;
  int lat4_n = 0;
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 4; p++) if (out_valid[p]) begin
      chk(out_data[p] == payload(p, rx_seq[p], rx_w[p]) &&
          out_sop[p] == (rx_w[p] == 0) && out_eop[p] == (rx_w[p] == CW - 1),
          $sformatf("port %0d cell %0d word %0d", p + 1, rx_seq[p], rx_w[p]));
      if (rx_w[p] == CW - 1) begin
        rx_w[p] = 0; rx_seq[p]++; recv[p]++;
        if (p == 3 && tq4.size() > 0) begin
          automatic int t0 = tq4.pop_front();
          if (run_p4) begin lat4_sum += cyc - t0; lat4_n++; end
        end
      end else rx_w[p]++;
    end
  end

  // ---------------- bus share measurement
  bit measure = 0;
  int words[4] = '{default: 0}, mcycles = 0, handovers = 0, capped = 0, run_len = 0;
  always @(posedge clk) if (rst_n && measure) begin
    if (sent[0] - recv[0] > 1 && sent[1] - recv[1] > 1 && sent[2] - recv[2] > 1) begin
      mcycles++;
      if (bus_xfer) words[bus_owner]++;
    end
    if (bus_xfer) begin
      run_len++;
      if (bus_tenure_end) begin
        handovers++;
        if (run_len == 8) capped++;
        run_len = 0;
      end
    end
  end

  initial begin
    real tot, sh[4], want[4], lat;
    want = '{0.1406, 0.1688, 0.5906, 0.1000};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    // phase 1: queue FILL cells per port 1-3 with the links held
    src_on <= 1;
    while (!(sent[0] >= FILL && sent[1] >= FILL && sent[2] >= FILL)) @(posedge clk);
    // phase 2: open the links, start port-4 traffic, measure
    @(posedge clk);
    link_rdy <= 4'hf;
    p4_due = cyc + 10; run_p4 <= 1;
    measure <= 1;
    repeat (RUN_CYCLES) @(posedge clk);
    measure <= 0; run_p4 <= 0; cap <= 0;
    // drain
    repeat (4000) @(posedge clk);
    tot = 0;
    for (int p = 0; p < 4; p++) tot += real'(words[p]);
    for (int p = 0; p < 4; p++) begin
      sh[p] = real'(words[p]) / (tot > 0 ? tot : 1.0);
      $display("port %0d: cells %0d/%0d, bus share %5.2f %% (expected %5.2f %%)",
               p + 1, recv[p], sent[p], 100.0 * sh[p], 100.0 * want[p]);
    end
    lat = lat4_n > 0 ? real'(lat4_sum) / real'(lat4_n * CW) : 99.0;
    $display("measured over %0d cycles, bus busy %0d; port 4: %0d cells, %4.2f cycles/word",
             mcycles, int'(tot), lat4_n, lat);
    $display("handovers %0d, tenures cut at 8 words %0d", handovers, capped);
    chk(mcycles > RUN_CYCLES / 2, "ports 1-3 stayed backlogged");
    chk(tot > 0.95 * real'(mcycles), "bus busy while backlogged");
    chk(sh[3] > 0.08 && sh[3] < 0.12, "port 4 gets the bandwidth it offers");
    for (int p = 0; p < 3; p++)
      chk(sh[p] > want[p] - 0.03 && sh[p] < want[p] + 0.03, "port 1-3 shares follow 1:1:4");
    chk(lat4_n > 100 && lat <= 3.5, "port 4 latency per word");
    for (int p = 0; p < 4; p++) chk(recv[p] == sent[p] && sent[p] > 0, "all cells delivered");
    chk(handovers > 100 && capped > 100, "handovers and capped tenures happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
