// grant_compare: comparison and grant generation of a lottery manager.
//
// The winning ticket number rnd is compared in parallel with the N partial
// sums r1*t1 + ... + ri*ti; comparator i outputs 1 when rnd is below its
// partial sum. Several comparators can fire for one number, so a priority
// selector keeps the lowest-numbered one: that master's range
// [psum[i-1], psum[i]) holds rnd. The result is a one-hot grant, or zero when
// no comparator fires (no request, or rnd outside the total). This structure
// follows the static and dynamic lottery manager diagrams; it is purely
// combinational, and the lottery managers register its output.
//
// Ports: rnd and psum in, lt (raw comparator outputs) and gnt out.
module grant_compare #(
  parameter int unsigned N    = lottery_pkg::NUM_MASTERS,
  parameter int unsigned PS_W = 9,
  parameter int unsigned R_W  = 8
) (
  input  logic [R_W-1:0]          rnd,
  input  logic [N-1:0][PS_W-1:0]  psum,
  output logic [N-1:0]            lt,
  output logic [N-1:0]            gnt
);

  localparam int unsigned CW = (PS_W > R_W) ? PS_W : R_W;

  always_comb begin
    for (int i = 0; i < N; i++)
      lt[i] = CW'(rnd) < CW'(psum[i]);
  end

  // priority selector: lowest index wins
  always_comb begin
    gnt = '0;
    for (int i = N - 1; i >= 0; i--)
      if (lt[i]) gnt = N'(1) << i;
  end

endmodule
