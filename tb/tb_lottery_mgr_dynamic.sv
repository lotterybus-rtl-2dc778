// tb_lottery_mgr_dynamic: random request maps and ticket holdings; checks
// the one-cycle grant, that the drawn ticket is below the total in play and
// the winner's range holds it, that a zero-ticket master never wins, and
// that win shares follow the holdings both before (1:2:3:4) and after
// (4:3:2:1) the holdings change at run time.
module tb_lottery_mgr_dynamic;
  logic clk = 0, rst_n = 0, draw = 0;
  logic [3:0] req = 0, gnt;
  logic [3:0][3:0] tickets = 0;
  logic [1:0] gnt_idx;
  logic gnt_valid;
  logic [5:0] ticket_no;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lottery_mgr_dynamic dut (.clk, .rst_n, .draw, .req, .tickets, .gnt, .gnt_idx, .gnt_valid, .ticket_no);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s req=%b gnt=%b t=%0d", what, req, gnt, ticket_no); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic share_run(logic [3:0][3:0] tk);
    automatic int wins[4] = '{0, 0, 0, 0};
    automatic int n = 20000, s = 0;
    tickets = tk; req = 4'hf; draw = 1;
    for (int i = 0; i < 4; i++) s += int'(tk[i]);
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1;
      for (int i = 0; i < 4; i++) if (gnt[i]) wins[i]++;
    end
    for (int i = 0; i < 4; i++) begin
      automatic real share = real'(wins[i]) / real'(n);
      automatic real want  = real'(tk[i]) / real'(s);
      $display("tickets %0d: share %f expected %f", tk[i], share, want);
      chk(share > want - 0.015 && share < want + 0.015, "share follows tickets");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    tickets = {4'd4, 4'd3, 4'd2, 4'd1}; req = 4'b1000; draw = 1;
    @(posedge clk); #1;
    chk(gnt == 4'b1000 && gnt_idx == 3 && gnt_valid, "one-cycle grant");
    draw = 0; req = 4'b0001;
    repeat (3) @(posedge clk); #1;
    chk(gnt == 4'b1000, "held");
    draw = 1;
    for (int k = 0; k < 3000; k++) begin
      automatic logic [3:0] m = 4'($urandom);
      automatic logic [3:0][3:0] tk = 16'($urandom);
      int p[4], s, w;
      if (k % 5 == 0) tk[1] = 0;
      req = m; tickets = tk;
      s = 0;
      for (int i = 0; i < 4; i++) begin if (m[i]) s += int'(tk[i]); p[i] = s; end
      @(posedge clk); #1;
      w = -1;
      for (int i = 3; i >= 0; i--)
        if (int'(ticket_no) < p[i] && (i == 0 || int'(ticket_no) >= p[i-1])) w = i;
      chk(s == 0 ? (gnt == 0 && !gnt_valid) : (int'(ticket_no) < s && gnt == (4'b1 << w)), "winner");
      if (tk[1] == 0) chk(!gnt[1], "zero tickets never win");
    end
    share_run({4'd4, 4'd3, 4'd2, 4'd1});
    share_run({4'd1, 4'd2, 4'd3, 4'd4});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
