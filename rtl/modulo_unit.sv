// modulo_unit: modulo hardware of the dynamic lottery manager.
//
// Reduces the R_W-bit random number r into the range [0, t) of the tickets
// currently held by the requesting masters, giving r mod t. For t = 0 (no
// request) the result is 0. Reducing the random number with modulo
// arithmetic follows the dynamic lottery manager; building it as a
// combinational remainder (long division, one conditional subtract per
// bit of r) is this design's own choice. With R_W much wider than t the
// bias of r mod t is below t / 2^R_W.
//
// Ports: r, t in; rem out. Purely combinational.
module modulo_unit #(
  parameter int unsigned R_W = lottery_pkg::RNG_W,
  parameter int unsigned T_W = 6
) (
  input  logic [R_W-1:0] r,
  input  logic [T_W-1:0] t,
  output logic [T_W-1:0] rem
);

  logic [T_W:0] acc;

  always_comb begin
    acc = '0;
    for (int b = R_W - 1; b >= 0; b--) begin
      acc = {acc[T_W-1:0], r[b]};
      if (acc >= {1'b0, t}) acc = acc - {1'b0, t};
    end
    rem = (t == '0) ? '0 : acc[T_W-1:0];
  end

endmodule
