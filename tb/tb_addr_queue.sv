// tb_addr_queue: random pushes and pops against a SystemVerilog queue,
// including pushes while full and pops while empty, checking head, empty,
// full and count every cycle.
module tb_addr_queue;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [9:0] din = 0, dout;
  logic empty, full;
  logic [4:0] count;
  logic [9:0] model [$];
  int checks = 0, failures = 0, full_seen = 0, empty_pop = 0;
  always #5 clk = ~clk;

  addr_queue #(.W(10), .DEPTH(16)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .count);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s count=%0d model=%0d", what, count, model.size()); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      automatic int bias = (n / 500) % 2;  // alternate filling and draining
      @(negedge clk);
      chk(int'(count) == model.size(), "count");
      chk(empty == (model.size() == 0) && full == (model.size() == 16), "flags");
      if (model.size() > 0) chk(dout == model[0], "head");
      push = ($urandom % 4) < (bias ? 3 : 1);
      pop  = ($urandom % 4) < (bias ? 1 : 3);
      din  = 10'($urandom);
      if (push && full) full_seen++;
      if (pop && empty) empty_pop++;
      begin
        automatic bit was_full = full, was_empty = empty;
        @(posedge clk);
        if (pop && !was_empty) void'(model.pop_front());
        if (push && !was_full) model.push_back(din);
      end
    end
    chk(full_seen > 0 && empty_pop > 0, "both limits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
