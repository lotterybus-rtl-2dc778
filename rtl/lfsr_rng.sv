// lfsr_rng: random number generator of the lottery manager.
//
// A Galois linear feedback shift register that advances once per cycle while
// en is high and presents its state as the random number. Using an LFSR,
// so that a power-of-two range comes for free, follows the lottery manager
// design; the width (16), the polynomial x^16+x^14+x^13+x^11+1 (maximal
// length, period 2^16-1) and the seed are this design's own choices. The
// output is a register, so the random number is ready at the start of each
// cycle and never sits in the arbitration path (the generator is pipelined).
//
// Ports: clk, rst_n (active-low, synchronous), en (advance), rnd (state).
module lfsr_rng #(
  parameter int unsigned     W    = 16,
  parameter logic [W-1:0]    POLY = 16'hB400,  // Galois taps
  parameter logic [W-1:0]    SEED = 16'hACE1   // any nonzero value
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] rnd
);

  always_ff @(posedge clk) begin
    if (!rst_n)  rnd <= SEED;
    else if (en) rnd <= (rnd >> 1) ^ (rnd[0] ? POLY : '0);
  end

  initial assert (SEED != '0) else $error("lfsr_rng: SEED must be nonzero");

endmodule
