// tb_ticket_lut: checks every request map of the 1:2:3:4 table against
// partial sums recomputed with real arithmetic, the worked example of
// holdings 1:2:4 scaled to 5:9:18 (total 32), and the 1:2:3:4 example with
// C2 idle (request map C1,C3,C4, 8 tickets in play).
module tb_ticket_lut;
  int checks = 0, failures = 0;
  logic [3:0] req;
  logic [3:0][8:0] psum;
  logic [7:0] mask;
  logic [2:0] req3;
  logic [2:0][8:0] psum3;
  logic [7:0] mask3;

  ticket_lut dut (.req, .psum, .mask);
  ticket_lut #(.N(3), .TICKETS({4'd4, 4'd2, 4'd1})) dut3 (.req(req3), .psum(psum3), .mask(mask3));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s req=%b", what, req); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic int t[4] = '{1, 2, 3, 4};
    for (int m = 0; m < 16; m++) begin
      int s, p, k, tot;
      req = 4'(m); #1;
      s = 0;
      for (int j = 0; j < 4; j++) if (m[j]) s += t[j];
      k = 0; while ((1 << k) < s) k++;
      tot = (s == 0) ? 0 : (1 << (k + 2));
      chk(mask == 8'((s == 0) ? 0 : tot - 1), "mask");
      p = 0;
      for (int i = 0; i < 4; i++) begin
        real x;
        if (m[i]) p += t[i];
        x = (s == 0) ? 0.0 : real'(p) * real'(tot) / real'(s);
        chk(int'(psum[i]) == int'($floor(x + 0.5)), $sformatf("psum[%0d]", i));
        if (m[i] && i > 0) chk(psum[i] > psum[i-1], "requesting master owns tickets");
      end
      chk(int'(psum[3]) == tot, "total is a power of two");
    end
    // Fig 8 request map: C1, C3, C4 requesting (8 tickets)
    req = 4'b1101; #1;
    chk(psum[0] == 4 && psum[1] == 4 && psum[2] == 16 && psum[3] == 32 && mask == 31, "C1,C3,C4 map");
    // 1:2:4 scaled to 5:9:18
    req3 = 3'b111; #1;
    chk(psum3[0] == 5 && psum3[1] == 14 && psum3[2] == 32 && mask3 == 31, "1:2:4 -> 5:9:18");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
