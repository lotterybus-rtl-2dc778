// lottery_mgr_dynamic: lottery manager with dynamically assigned tickets.
//
// The masters report their current ticket holdings t_i on every cycle, so
// the ranges cannot be tabulated. Each draw ANDs the tickets with the request
// lines and sums them in an adder tree (ticket_adder_tree), giving the
// partial sums and the total T; the LFSR value R is reduced to R mod T by the
// modulo hardware (modulo_unit); the comparators and priority selector of the
// static manager turn it into a one-hot grant (grant_compare). Master i wins
// with probability r_i*t_i / T. This follows the dynamic lottery manager
// diagram; registering the random number and the grant is this design's
// choice of pipelining. A requesting master with zero tickets never wins; if
// every requesting master holds zero tickets nobody is granted.
//
// Timing: draw, req and tickets sampled at a rising edge give gnt, gnt_valid
// and ticket_no at the next; they hold until the next draw.
module lottery_mgr_dynamic #(
  parameter int unsigned      N     = lottery_pkg::NUM_MASTERS,
  parameter int unsigned      TW    = lottery_pkg::TICKET_W,
  parameter int unsigned      RNG_W = lottery_pkg::RNG_W,
  parameter logic [RNG_W-1:0] SEED  = 16'hACE1,
  localparam int unsigned     SW    = TW + ((N > 1) ? $clog2(N) : 1),
  localparam int unsigned     IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 draw,
  input  logic [N-1:0]         req,
  input  logic [N-1:0][TW-1:0] tickets,
  output logic [N-1:0]         gnt,
  output logic [IDX_W-1:0]     gnt_idx,
  output logic                 gnt_valid,
  output logic [SW-1:0]        ticket_no
);

  logic [RNG_W-1:0]     rnd;
  logic [N-1:0][SW-1:0] psum;
  logic [SW-1:0]        total, win_ticket;
  logic [N-1:0]         lt, sel;

  lfsr_rng #(.W(RNG_W), .SEED(SEED)) u_rng (
    .clk, .rst_n, .en(1'b1), .rnd
  );

  ticket_adder_tree #(.N(N), .TW(TW)) u_sum (
    .req, .tickets, .psum, .total
  );

  modulo_unit #(.R_W(RNG_W), .T_W(SW)) u_mod (
    .r(rnd), .t(total), .rem(win_ticket)
  );

  grant_compare #(.N(N), .PS_W(SW), .R_W(SW)) u_cmp (
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

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n)
                   draw |-> ((total != '0) == (|sel)));

endmodule
