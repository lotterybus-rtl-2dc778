// dp_shared_mem: dual-ported payload memory of the ATM switch.
//
// Port A is the write port of the cell scheduler, which stores arriving cell
// payloads; port B is a slave of the shared bus, through which the output
// ports read the cells (it also accepts writes). Both ports work in the same
// cycle. A read on port B returns data one cycle later. If both ports write
// the same word in one cycle, port B's value is kept. That the payload
// memory is dual-ported follows the ATM switch example; its size (2^AW
// words, 1024 by default) and the port behaviour are this design's own.
module dp_shared_mem
  import lottery_pkg::*;
#(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  // port A: scheduler writes
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  data_t         a_wdata,
  // port B: bus slave
  input  lb_sreq_t      b_req,
  output data_t         b_rdata
);

  data_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_req.sel) begin
      if (b_req.we) mem[b_req.addr[AW-1:0]] <= b_req.wdata;
      else          b_rdata <= mem[b_req.addr[AW-1:0]];
    end
  end

endmodule
