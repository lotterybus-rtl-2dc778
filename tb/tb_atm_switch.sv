// tb_atm_switch: the cell forwarding unit under two loads.
// 1. Random cells with random gaps: every cell reaches its own port intact
//    and in order (checked by tb_atm_traffic), and all slots come back.
// 2. Contention: 30 rounds in which the output links hold back while 15
//    cells per port are queued, then all open at once. While all four queues
//    hold cells, the bus share of each port follows its tickets 1:1:4:6
//    (scaled 5:6:21:32 of 64) within 4 points, port 4 spends the fewest cycles per word,
//    12-word cells are split by the 8-word transfer limit, and the bus is
//    busy over 95% of those cycles.
module tb_atm_switch;
  import lottery_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, saturate = 0;
  logic [3:0] port_mask = 4'hf, link_rdy = 4'hf;
  int gap_max = 20;
  logic in_valid, in_ready, in_sop;
  logic [1:0] in_port, bus_owner;
  data_t in_data;
  logic [3:0] out_valid, out_sop, out_eop;
  data_t [3:0] out_data;
  logic bus_owner_valid, bus_xfer, bus_tenure_end;
  logic [6:0] free_slots;
  int sent[4], recv[4], stalls, tchecks, tfails;
  int checks = 0, failures = 0;
  int words[4], reqcyc[4], busy = 0, cycles = 0;
  bit measure = 0;
  always #5 clk = ~clk;

  atm_switch dut (.clk, .rst_n, .in_valid, .in_ready, .in_sop, .in_port, .in_data,
    .link_rdy, .out_valid, .out_sop, .out_eop, .out_data, .bus_owner, .bus_owner_valid, .bus_xfer,
    .bus_tenure_end, .free_slots);

  tb_atm_traffic u_src (.clk, .rst_n, .enable, .saturate, .port_mask, .gap_max,
    .in_valid, .in_ready, .in_sop, .in_port, .in_data, .out_valid, .out_sop, .out_eop,
    .out_data, .sent, .recv, .stalls, .checks(tchecks), .failures(tfails));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int tenures = 0, cells_out = 0, run = 0, max_run = 0;
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 4; p++) if (out_eop[p]) cells_out++;
    if (bus_xfer) begin
      run = run + 1;
      if (run > max_run) max_run = run;
      if (bus_tenure_end) begin tenures++; run = 0; end
    end
    if (rst_n && !saturate) link_rdy <= 4'($urandom) | 4'($urandom);
    if (measure && sent[0] - recv[0] > 1 && sent[1] - recv[1] > 1 &&
        sent[2] - recv[2] > 1 && sent[3] - recv[3] > 1) begin
      cycles++;
      if (bus_xfer) begin busy++; words[bus_owner]++; end
      for (int p = 0; p < 4; p++) reqcyc[p]++;   // every port has cells waiting
    end
  end

  task automatic drain();
    int n = 0;
    enable = 0;
    while (n < 5000 && (sent[0] != recv[0] || sent[1] != recv[1] || sent[2] != recv[2] || sent[3] != recv[3])) begin
      @(posedge clk); n++;
    end
    repeat (20) @(posedge clk);
    for (int p = 0; p < 4; p++) chk(sent[p] == recv[p], "all cells delivered");
    chk(free_slots == 64, "all slots returned");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real lat[4];
    for (int p = 0; p < 4; p++) begin words[p] = 0; reqcyc[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: random traffic
    enable = 1;
    while (sent[0] + sent[1] + sent[2] + sent[3] < 300) @(posedge clk);
    drain();
    // phase 2: saturation
    saturate = 1; link_rdy = 4'h0;
    for (int r = 0; r < 30; r++) begin
      automatic int target = sent[0] + sent[1] + sent[2] + sent[3] + 60;
      link_rdy = 4'h0; enable = 1;
      while (sent[0] + sent[1] + sent[2] + sent[3] < target) @(posedge clk);
      enable = 0;
      @(negedge clk);
      link_rdy = 4'hf; measure = 1;
      drain();
      measure = 0;
    end
    begin
      automatic real want[4] = '{5.0 / 64, 6.0 / 64, 21.0 / 64, 32.0 / 64};
      for (int p = 0; p < 4; p++) begin
        automatic real share = real'(words[p]) / real'(busy);
        lat[p] = real'(reqcyc[p]) / real'(words[p]);
        $display("port %0d: bus share %f (tickets %f) cycles/word %f", p + 1, share, want[p], lat[p]);
        chk(share > want[p] - 0.04 && share < want[p] + 0.04, "share follows tickets");
      end
    end
    chk(lat[3] < lat[0] && lat[3] < lat[1] && lat[3] < lat[2], "port 4 lowest latency");
    chk(real'(busy) / real'(cycles) > 0.95, "bus busy under saturation");
    chk(max_run == 8, "tenures capped at 8 words");
    chk(tenures > cells_out, "12-word cells split over tenures");
    $display("bus utilisation %f, tenures %0d, cells %0d, stalls %0d", real'(busy) / real'(cycles), tenures, cells_out, stalls);
    checks += tchecks; failures += tfails;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
