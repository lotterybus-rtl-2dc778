// tb_dp_shared_mem: port A writes and port B reads/writes in the same
// cycles, against a reference array; reads return one cycle later, and when
// both ports write one word port B's value stays.
module tb_dp_shared_mem;
  import lottery_pkg::*;
  logic clk = 0;
  logic a_we = 0;
  logic [5:0] a_addr = 0;
  data_t a_wdata = 0, b_rdata;
  lb_sreq_t b_req = '0;
  data_t ref_mem [64];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dp_shared_mem #(.AW(6)) dut (.clk, .a_we, .a_addr, .a_wdata, .b_req, .b_rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      a_we = 1; a_addr = 6'(a); a_wdata = $urandom; ref_mem[a] = a_wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      automatic int ra = $urandom % 64;
      automatic int wa = $urandom % 64;
      automatic bit bw = ($urandom % 4) == 0;
      @(negedge clk);
      a_we = 1; a_addr = 6'(wa); a_wdata = $urandom;
      b_req = '{sel: 1'b1, we: bw, addr: addr_t'(ra), wdata: $urandom};
      if (!bw && ra != wa) begin
        automatic data_t want = ref_mem[ra];
        ref_mem[wa] = a_wdata;
        @(negedge clk);
        a_we = 0; b_req.sel = 0;
        checks++;
        if (b_rdata != want) begin failures++; $display("FAIL read %0d", ra); end
      end else begin
        ref_mem[wa] = a_wdata;
        if (bw) ref_mem[ra] = b_req.wdata;
      end
    end
    @(negedge clk); a_we = 0;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      b_req = '{sel: 1'b1, we: 1'b0, addr: addr_t'(a), wdata: '0};
      @(negedge clk);
      b_req.sel = 0;
      checks++;
      if (b_rdata != ref_mem[a]) begin failures++; $display("FAIL final %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
