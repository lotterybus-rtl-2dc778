// tb_atm_cell_scheduler: sends 12-word cells to random ports and checks that
// each cell's words land in the payload memory (modelled here) at the
// address pushed into the right port's queue, that no slot is handed out
// twice before it is released, that free_slots counts correctly, that a cell
// waits while its queue is full or while all 64 slots are taken, and that
// released slots are reused.
module tb_atm_cell_scheduler;
  import lottery_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sop = 0, in_ready;
  logic [1:0] in_port = 0;
  data_t in_data = 0;
  logic mem_we;
  logic [9:0] mem_addr, q_din;
  data_t mem_wdata;
  logic [3:0] q_push, q_full = 0, rel_valid = 0;
  logic [3:0][9:0] rel_addr = '0;
  logic [6:0] free_slots;
  data_t mem [1024];
  logic [63:0] taken = 0;
  int cell_port [int];            // cell id -> port
  logic [9:0] outstanding [$];
  int checks = 0, failures = 0, cells_pushed = 0, stall_full = 0, stall_slots = 0;
  bit hold_release = 0;
  always #5 clk = ~clk;

  atm_cell_scheduler dut (.clk, .rst_n, .in_valid, .in_ready, .in_sop, .in_port, .in_data,
    .mem_we, .mem_addr, .mem_wdata, .q_push, .q_din, .q_full, .rel_valid, .rel_addr, .free_slots);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // memory model, queue monitor and slot release
  always @(posedge clk) if (rst_n) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    rel_valid <= 0;
    if (q_push != 0) begin
      int id;
      chk($onehot(q_push), "one queue pushed");
      chk(q_din[3:0] == 0 && taken[q_din[9:4]] == 0, "fresh slot");
      taken[q_din[9:4]] <= 1'b1;
      outstanding.push_back(q_din);
      cells_pushed++;
      // the last word is written at this edge: check the rest now, the last below
      id = int'(mem[q_din][31:16]);
      chk(cell_port.exists(id) && q_push == (4'b1 << cell_port[id]), "right port");
      for (int k = 0; k < 11; k++)
        chk(mem[q_din + 10'(k)] == {16'(id), 16'(k)}, $sformatf("payload word %0d of cell %0d at %0d: %h t=%0t", k, id, q_din, mem[q_din + 10'(k)], $time));
      chk(mem_we && mem_addr == q_din + 10'd11 && mem_wdata == {16'(id), 16'd11}, "last word");
    end
    if (!hold_release && outstanding.size() > 0 && ($urandom % 3) == 0) begin
      automatic int i = $urandom % outstanding.size();
      automatic int p = $urandom % 4;
      rel_valid[p] <= 1'b1;
      rel_addr[p]  <= outstanding[i];
      taken[outstanding[i][9:4]] <= 1'b0;
      outstanding.delete(i);
    end
  end

  // the free-slot count trails the model by the release in flight
  always @(negedge clk) if (rst_n) begin
    automatic int busy = $countones(taken) + (in_valid && !in_sop ? 1 : 0);
    checks++;
    if (int'(free_slots) + $countones(taken) + $countones(rel_valid) != 64 &&
        int'(free_slots) + $countones(taken) + $countones(rel_valid) != 63) begin
      failures++; $display("FAIL free_slots %0d taken %0d", free_slots, $countones(taken));
    end
  end

  int sent = 0;
  task automatic send_cell(int id, int port);
    sent++;
    cell_port[id] = port;
    for (int k = 0; k < 12; k++) begin
      @(negedge clk);
      in_valid = 1; in_sop = (k == 0); in_port = 2'(port); in_data = {16'(id), 16'(k)};
      #1;
      while (!in_ready) begin
        if (k == 0 && q_full[port]) stall_full++;
        else if (k == 0) stall_slots++;
        @(negedge clk);
      end
      @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(free_slots == 64, "all slots free");
    for (int c = 0; c < 200; c++) send_cell(c, $urandom % 4);
    // queue 2 full: a cell for it must wait
    fork
      begin q_full[2] = 1; repeat (30) @(posedge clk); #1 q_full[2] = 0; end
      send_cell(1000, 2);
    join
    // no releases: slots run out and the next cell waits
    hold_release = 1;
    repeat (5) @(posedge clk);
    while (free_slots > 0) send_cell(2000 + outstanding.size(), 1);
    fork
      begin repeat (40) @(posedge clk); #1 hold_release = 0; end
      send_cell(3000, 3);
    join
    repeat (20) @(posedge clk);
    chk(stall_full > 0, "waited on a full queue");
    chk(stall_slots > 0, "waited for a free slot");
    chk(cells_pushed == sent, "every cell queued");
    $display("cells %0d stalls full %0d slots %0d", cells_pushed, stall_full, stall_slots);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
