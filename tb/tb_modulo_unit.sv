// tb_modulo_unit: random 16-bit numbers and 6-bit ranges against the %
// operator, the edge values, and 0 for an empty range.
module tb_modulo_unit;
  int checks = 0, failures = 0;
  logic [15:0] r;
  logic [5:0] t, rem;

  modulo_unit #(.R_W(16), .T_W(6)) dut (.r, .t, .rem);

  task automatic chk(bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL r=%0d t=%0d rem=%0d", r, t, rem); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    r = 16'hffff; t = 6'd63; #1; chk(rem == 6'(16'hffff % 63));
    r = 16'd5;    t = 6'd8;  #1; chk(rem == 5);
    r = 16'd1234; t = 6'd0;  #1; chk(rem == 0);
    r = 16'd1234; t = 6'd1;  #1; chk(rem == 0);
    for (int n = 0; n < 5000; n++) begin
      r = 16'($urandom); t = 6'(1 + $urandom % 63); #1;
      chk(int'(rem) == int'(r) % int'(t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
