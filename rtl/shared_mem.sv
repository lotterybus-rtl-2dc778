// shared_mem: a single-ported on-chip memory on the shared bus (a slave).
//
// Words are written in the cycle s_req.sel and s_req.we are high, and read
// data appear on rdata in the cycle after a read access, matching the slave
// timing of lottery_bus. The low AW bits of the bus address index the array;
// the depth (2^AW words, 1024 by default) is this design's own choice, as
// the slaves of the evaluation system are given no size.
module shared_mem
  import lottery_pkg::*;
#(
  parameter int unsigned AW = 10
) (
  input  logic     clk,
  input  lb_sreq_t s_req,
  output data_t    rdata
);

  data_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (s_req.sel) begin
      if (s_req.we) mem[s_req.addr[AW-1:0]] <= s_req.wdata;
      else          rdata <= mem[s_req.addr[AW-1:0]];
    end
  end

endmodule
