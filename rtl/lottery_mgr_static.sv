// lottery_mgr_static: lottery manager with statically assigned tickets.
//
// Each master i holds a fixed number of lottery tickets t_i. When asked to
// draw, the manager grants the bus to one requesting master, master i with
// probability r_i*t_i / sum_j(r_j*t_j). The request map addresses look-up
// tables holding the partial ticket sums and a range mask for that map
// (ticket_lut, scaled to a power-of-two total); the free-running LFSR value,
// masked, is the winning ticket; parallel comparators and a priority selector
// turn it into a one-hot grant (grant_compare). This is the structure of the
// static lottery manager; registering the random number and the grant is
// this design's choice of pipelining.
//
// Timing: draw and req sampled at a rising edge give gnt, gnt_valid and
// ticket_no at the next; they then hold until the next draw. A draw with no
// request clears the grant. Ports: clk, rst_n (synchronous, active low),
// draw, req (bit i = master i+1), gnt (one-hot), gnt_idx, gnt_valid,
// ticket_no (winning ticket of the last draw, for observation).
module lottery_mgr_static #(
  parameter int unsigned     N       = lottery_pkg::NUM_MASTERS,
  parameter int unsigned     TW      = lottery_pkg::TICKET_W,
  parameter logic [N*TW-1:0] TICKETS = {4'd4, 4'd3, 4'd2, 4'd1},
  parameter int unsigned     EXTRA   = 2,
  parameter int unsigned     RNG_W   = lottery_pkg::RNG_W,
  parameter logic [RNG_W-1:0] SEED   = 16'hACE1,
  localparam int unsigned    PS_W    = $clog2(N * (2**TW - 1)) + EXTRA + 1,
  localparam int unsigned    MK_W    = PS_W - 1,
  localparam int unsigned    IDX_W   = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              draw,
  input  logic [N-1:0]      req,
  output logic [N-1:0]      gnt,
  output logic [IDX_W-1:0]  gnt_idx,
  output logic              gnt_valid,
  output logic [MK_W-1:0]   ticket_no
);

  logic [RNG_W-1:0]       rnd;
  logic [N-1:0][PS_W-1:0] psum;
  logic [MK_W-1:0]        mask, win_ticket;
  logic [N-1:0]           lt, sel;

  lfsr_rng #(.W(RNG_W), .SEED(SEED)) u_rng (
    .clk, .rst_n, .en(1'b1), .rnd
  );

  ticket_lut #(.N(N), .TW(TW), .TICKETS(TICKETS), .EXTRA(EXTRA)) u_lut (
    .req, .psum, .mask
  );

  assign win_ticket = rnd[MK_W-1:0] & mask;

  grant_compare #(.N(N), .PS_W(PS_W), .R_W(MK_W)) u_cmp (
    .rnd(win_ticket), .psum, .lt, .gnt(sel)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gnt       <= '0;
      gnt_valid <= 1'b0;
      gnt_idx   <= '0;
      ticket_no <= '0;
    end else if (draw) begin
      gnt       <= sel;
      gnt_valid <= |sel;
      ticket_no <= win_ticket;
      gnt_idx   <= '0;
      for (int i = 0; i < N; i++)
        if (sel[i]) gnt_idx <= IDX_W'(i);
    end
  end

  // exactly one grant when anyone requests, none otherwise
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n)
                   draw |-> ((|req) == (|sel)));

endmodule
