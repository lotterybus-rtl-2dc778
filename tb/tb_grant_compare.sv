// tb_grant_compare: random partial sums and ticket numbers against a
// reference range search, plus the four-master example (1,3,4 tickets in
// play: number 5 goes to C4, number 0 makes every comparator fire and goes
// to C1) and the no-hit case.
module tb_grant_compare;
  int checks = 0, failures = 0;
  logic [7:0] rnd;
  logic [3:0][8:0] psum;
  logic [3:0] lt, gnt;

  grant_compare #(.N(4), .PS_W(9), .R_W(8)) dut (.rnd, .psum, .lt, .gnt);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s rnd=%0d gnt=%b", what, rnd, gnt); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    psum = {9'd8, 9'd4, 9'd1, 9'd1};
    rnd = 5; #1; chk(gnt == 4'b1000, "5 -> C4");
    rnd = 0; #1; chk(gnt == 4'b0001 && lt == 4'b1111, "0 -> C1, all fire");
    rnd = 8; #1; chk(gnt == 4'b0000, "out of range");
    for (int n = 0; n < 2000; n++) begin
      int a[4], exp_i;
      a[0] = $urandom % 40;
      for (int i = 1; i < 4; i++) a[i] = a[i-1] + ($urandom % 60);
      for (int i = 0; i < 4; i++) psum[i] = 9'(a[i]);
      rnd = 8'($urandom % 256); #1;
      exp_i = -1;
      for (int i = 3; i >= 0; i--) if (a[i] > int'(rnd) && (i == 0 || a[i-1] <= int'(rnd))) exp_i = i;
      chk(exp_i < 0 ? gnt == 0 : gnt == (4'b1 << exp_i), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
