// tb_shared_mem: random writes and reads against a reference array; read
// data must appear exactly one cycle after the read access and hold while
// the memory is not selected.
module tb_shared_mem;
  import lottery_pkg::*;
  logic clk = 0;
  lb_sreq_t s_req = '0;
  data_t rdata;
  data_t ref_mem [64];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  shared_mem #(.AW(6)) dut (.clk, .s_req, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      ref_mem[a] = $urandom;
      s_req = '{sel: 1'b1, we: 1'b1, addr: addr_t'(a) | 16'hC000, wdata: ref_mem[a]};
    end
    for (int n = 0; n < 3000; n++) begin
      automatic int a = $urandom % 64;
      automatic bit w = ($urandom % 3) == 0;
      @(negedge clk);
      s_req = '{sel: 1'b1, we: w, addr: addr_t'(a), wdata: $urandom};
      if (w) ref_mem[a] = s_req.wdata;
      else begin
        @(negedge clk);
        s_req.sel = 1'b0;
        checks++;
        if (rdata != ref_mem[a]) begin failures++; $display("FAIL addr %0d", a); end
        @(negedge clk);
        checks++;
        if (rdata != ref_mem[a]) begin failures++; $display("FAIL hold %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
