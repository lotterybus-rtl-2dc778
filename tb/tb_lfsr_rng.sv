// tb_lfsr_rng: checks the LFSR against an independent model of
// x^16+x^14+x^13+x^11+1 (Fibonacci-form reference on the bit-reversed state
// would be equivalent; here the Galois step is recomputed bit by bit), that
// en=0 holds the state, and that the period is exactly 2^16-1.
module tb_lfsr_rng;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] rnd, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lfsr_rng dut (.clk, .rst_n, .en, .rnd);

  function automatic logic [15:0] step(logic [15:0] s);
    logic [15:0] n;
    for (int b = 0; b < 15; b++) n[b] = s[b+1];
    n[15] = 1'b0;
    if (s[0]) begin
      n[15] = ~n[15]; n[13] = ~n[13]; n[12] = ~n[12]; n[10] = ~n[10];
    end
    return n;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s rnd=%h model=%h", what, rnd, model); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int period;
    repeat (2) @(posedge clk);
    rst_n <= 1; #1;
    model = 16'hACE1;
    chk(rnd == model, "reset seed");
    en <= 1;
    for (int k = 0; k < 1000; k++) begin
      @(posedge clk); #1; model = step(model);
      chk(rnd == model, "sequence");
    end
    en <= 0;
    repeat (5) @(posedge clk); #1;
    chk(rnd == model, "hold when en=0");
    en <= 1; period = 0;
    do begin @(posedge clk); #1; period++; chk(rnd != 0, "never zero"); end
    while (rnd != model && period < 70000);
    chk(period == 65535, "period 2^16-1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
