// ticket_lut: precomputed ticket ranges of the static lottery manager.
//
// With fixed ticket holdings t1..tN, the partial sums r1*t1 + ... + ri*ti
// can only take one set of values per request map, so they are tabulated
// instead of added at run time: look-up tables 1..N give the partial sum
// seen by each master's comparator, look-up table N+1 gives a mask that
// confines the random number to the range of that request map.
//
// So that the random number can be a masked LFSR value, every request map's
// ranges are scaled to a power-of-two total 2^K, with
//   K       = clog2(S) + EXTRA,   S = sum of tickets of the requesting masters
//   psum[i] = round(P_i * 2^K / S),  P_i = r1*t1 + ... + ri*ti
//   mask    = 2^K - 1.
// Rounding the partial sums (not each share) makes psum[N-1] exactly 2^K,
// so every masked random number lands in some master's range, and keeps each
// share within one ticket of the exact ratio. EXTRA = 2 reproduces the scaling
// of holdings 1:2:4 (T=7) to 5:9:18 (T=32). Tabulating per request map and
// scaling to a power of two follow the static lottery manager design; the
// scaling formula and EXTRA are this design's own choice.
//
// Ports: req (request map, bit i = master i+1) in, psum and mask out.
// Purely combinational: a constant ROM addressed by the request map.
module ticket_lut #(
  parameter int unsigned N        = lottery_pkg::NUM_MASTERS,
  parameter int unsigned TW       = lottery_pkg::TICKET_W,
  parameter logic [N*TW-1:0] TICKETS = {4'd4, 4'd3, 4'd2, 4'd1},  // t1 in the low bits
  parameter int unsigned EXTRA    = 2,
  localparam int unsigned PS_W    = $clog2(N * (2**TW - 1)) + EXTRA + 1,
  localparam int unsigned MK_W    = PS_W - 1
) (
  input  logic [N-1:0]           req,
  output logic [N-1:0][PS_W-1:0] psum,
  output logic [MK_W-1:0]        mask
);

  function automatic int unsigned tickets_of(int unsigned j);
    return int'(TICKETS[j*TW +: TW]);
  endfunction

  function automatic int unsigned range_sum(int unsigned m, int unsigned upto);
    int unsigned s = 0;
    for (int unsigned j = 0; j < N; j++)
      if (m[j] && j <= upto) s += tickets_of(j);
    return s;
  endfunction

  function automatic int unsigned scale_bits(int unsigned m);
    int unsigned s = range_sum(m, N - 1);
    return (s == 0) ? 0 : $clog2(s) + EXTRA;
  endfunction

  function automatic int unsigned lut_entry(int unsigned m, int unsigned i);
    int unsigned s = range_sum(m, N - 1);
    int unsigned p = range_sum(m, i);
    int unsigned k = scale_bits(m);
    if (s == 0) return 0;
    return ((p << (k + 1)) + s) / (2 * s);
  endfunction

  logic [N-1:0][PS_W-1:0] rom_psum [2**N];
  logic [MK_W-1:0]        rom_mask [2**N];

  for (genvar m = 0; m < 2**N; m++) begin : g_map
    for (genvar i = 0; i < N; i++) begin : g_ent
      localparam int unsigned V = lut_entry(m, i);
      assign rom_psum[m][i] = PS_W'(V);
    end
    localparam int unsigned K = scale_bits(m);
    assign rom_mask[m] = MK_W'((1 << K) - 1);
  end

  assign psum = rom_psum[req];
  assign mask = rom_mask[req];

endmodule
