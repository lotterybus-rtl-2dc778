// tb_ticket_adder_tree: random request maps and ticket counts against
// sequentially added partial sums.
module tb_ticket_adder_tree;
  int checks = 0, failures = 0;
  logic [3:0] req;
  logic [3:0][3:0] tickets;
  logic [3:0][5:0] psum;
  logic [5:0] total;

  ticket_adder_tree dut (.req, .tickets, .psum, .total);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      automatic int s = 0;
      req = 4'($urandom); tickets = 16'($urandom);
      if (n == 0) begin req = 4'hf; tickets = 16'hffff; end
      #1;
      for (int i = 0; i < 4; i++) begin
        if (req[i]) s += int'(tickets[i]);
        checks++;
        if (int'(psum[i]) != s) begin failures++; $display("FAIL psum[%0d]=%0d want %0d", i, psum[i], s); end
      end
      checks++;
      if (int'(total) != s) begin failures++; $display("FAIL total"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
