// ticket_adder_tree: current ticket ranges of the dynamic lottery manager.
//
// Each master's ticket count is ANDed with its request line (r_i*t_i), and
// a tree of adders forms all partial sums r1*t1 + ... + ri*ti; the last one
// is the total T of tickets held by the requesting masters. The bit-wise AND
// followed by an adder tree is the dynamic lottery manager's structure; the
// tree shape (a log-depth parallel prefix, Kogge-Stone) is this design's own
// choice. Purely combinational.
//
// Ports: req (bit i = master i+1), tickets (t_i), psum (partial sums), total.
module ticket_adder_tree #(
  parameter int unsigned N   = lottery_pkg::NUM_MASTERS,
  parameter int unsigned TW  = lottery_pkg::TICKET_W,
  localparam int unsigned SW = TW + ((N > 1) ? $clog2(N) : 1),
  localparam int unsigned L  = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]          req,
  input  logic [N-1:0][TW-1:0]  tickets,
  output logic [N-1:0][SW-1:0]  psum,
  output logic [SW-1:0]         total
);

  logic [N-1:0][SW-1:0] lvl [L+1];

  // bit-wise AND
  for (genvar i = 0; i < N; i++) begin : g_and
    assign lvl[0][i] = SW'(tickets[i] & {TW{req[i]}});
  end

  // prefix adder tree
  for (genvar l = 0; l < L; l++) begin : g_lvl
    for (genvar i = 0; i < N; i++) begin : g_node
      if (i >= (1 << l)) begin : g_add
        assign lvl[l+1][i] = lvl[l][i] + lvl[l][i - (1 << l)];
      end else begin : g_pass
        assign lvl[l+1][i] = lvl[l][i];
      end
    end
  end

  assign psum  = lvl[L];
  assign total = lvl[L][N-1];

endmodule
