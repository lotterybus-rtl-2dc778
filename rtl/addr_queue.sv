// addr_queue: an output port's local queue of cell addresses.
//
// A first-in first-out buffer of DEPTH entries of W bits: the cell scheduler
// pushes the starting address of each cell bound for the port, and the port
// pops it with its dequeue signal. The head entry is always visible on dout
// (show-ahead). A push while full and a pop while empty are ignored; a push
// and a pop in the same cycle both happen. Queueing cell addresses per port
// in a local memory follows the ATM switch example; the depth (16) and the
// interface are this design's own. Reset is synchronous, active low, and
// empties the queue.
module addr_queue #(
  parameter int unsigned W     = 10,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned PW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [CW-1:0] count
);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic          do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

endmodule
