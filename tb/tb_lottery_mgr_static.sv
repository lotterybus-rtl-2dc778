// tb_lottery_mgr_static: draws lotteries among random request maps and
// checks (1) the grant appears on the edge after the draw and holds without
// one, (2) exactly the master whose scaled range holds the drawn ticket wins,
// recomputed here from the holdings 1:2:3:4, (3) only requesting masters
// win, none when nobody requests, and (4) with all four requesting over many
// draws each master's share of wins is within 1.5 points of its scaled
// ticket share (6:13:19:26 of 64).
module tb_lottery_mgr_static;
  logic clk = 0, rst_n = 0, draw = 0;
  logic [3:0] req = 0, gnt;
  logic [1:0] gnt_idx;
  logic gnt_valid;
  logic [7:0] ticket_no;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lottery_mgr_static dut (.clk, .rst_n, .draw, .req, .gnt, .gnt_idx, .gnt_valid, .ticket_no);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s req=%b gnt=%b t=%0d", what, req, gnt, ticket_no); end
  endtask

  function automatic int edge_of(logic [3:0] m, int i);
    int t[4] = '{1, 2, 3, 4};
    int s = 0, p = 0, k = 0;
    for (int j = 0; j < 4; j++) if (m[j]) begin s += t[j]; if (j <= i) p += t[j]; end
    if (s == 0) return 0;
    while ((1 << k) < s) k++;
    return int'($floor(real'(p) * real'(1 << (k + 2)) / real'(s) + 0.5));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic int wins[4] = '{0, 0, 0, 0};
    automatic int n = 20000;
    logic [3:0] held;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    chk(gnt == 0 && !gnt_valid, "idle after reset");
    // single draw: grant on the next edge, then held
    req = 4'b0100; draw = 1;
    @(posedge clk); #1;
    chk(gnt == 4'b0100 && gnt_idx == 2 && gnt_valid, "one-cycle grant");
    draw = 0; req = 4'b0011;
    repeat (3) @(posedge clk); #1;
    chk(gnt == 4'b0100, "grant held without draw");
    // random request maps
    for (int k = 0; k < 3000; k++) begin
      automatic logic [3:0] m = 4'($urandom);
      int w;
      req = m; draw = 1;
      @(posedge clk); #1;
      w = -1;
      for (int i = 3; i >= 0; i--)
        if (int'(ticket_no) < edge_of(m, i) && (i == 0 || int'(ticket_no) >= edge_of(m, i-1))) w = i;
      chk(m == 0 ? (gnt == 0 && !gnt_valid) : (w >= 0 && gnt == (4'b1 << w) && gnt_valid), "winner");
      chk((gnt & ~m) == 0, "only requesters win");
    end
    // proportional share
    req = 4'b1111;
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1;
      for (int i = 0; i < 4; i++) if (gnt[i]) wins[i]++;
    end
    held = gnt;
    for (int i = 0; i < 4; i++) begin
      automatic real share = real'(wins[i]) / real'(n);
      automatic real want  = real'(edge_of(4'hf, i) - (i == 0 ? 0 : edge_of(4'hf, i-1))) / 64.0;
      $display("master %0d: share %f expected %f", i + 1, share, want);
      chk(share > want - 0.015 && share < want + 0.015, "share follows tickets");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
