// lottery_bus: a shared system bus arbitrated by a lottery manager.
//
// N_M masters share one address/data/control channel to N_S slaves. The
// lottery manager (static or dynamic tickets, chosen by DYNAMIC) picks the
// owner; the owner moves one word per cycle for up to MAX_XFER cycles, the
// maximum transfer size that keeps a master with much data from monopolising
// the bus, or until its message ends. The lottery for the next owner is drawn
// in the last cycle of the current tenure, so the new owner's first word
// follows the old owner's last word with no idle cycle: arbitration is
// pipelined with the data transfers. Lottery arbitration, the maximum
// transfer size and the pipelining follow the LOTTERYBUS architecture; the
// handshake below and the address map are this design's own.
//
// Master handshake: a master raises req with we/addr/wdata of its next word
// and len = words it has ready to move back to back, this one included
// (>= 1; a following message counts if it is ready too), and holds them
// until m_rsp.gnt, which marks the word as taken in that cycle. It then
// presents its next word (or drops req). Read data come back one cycle after
// the word was taken, with m_rsp.rvalid. A master whose last ready word is
// taken (len = 1) is left out of the draw made in that cycle, since its
// request is about to drop.
// Slaves: s_req.sel marks an access in that cycle; the slave returns read
// data in s_rdata one cycle later. The top log2(N_S) address bits pick the
// slave. Timing: a request raised on an idle bus is drawn in the cycle it is
// first seen, and its first word is taken in the next cycle.
module lottery_bus
  import lottery_pkg::*;
#(
  parameter int unsigned       N_M      = NUM_MASTERS,
  parameter int unsigned       N_S      = 4,
  parameter bit                DYNAMIC  = 1'b0,
  parameter logic [N_M*TICKET_W-1:0] TICKETS = {4'd4, 4'd3, 4'd2, 4'd1},
  parameter int unsigned       EXTRA    = 2,
  parameter int unsigned       MAX_XFER = 8,
  parameter logic [RNG_W-1:0]  SEED     = 16'hACE1,
  localparam int unsigned      IDX_W    = (N_M > 1) ? $clog2(N_M) : 1,
  localparam int unsigned      SIDX_W   = (N_S > 1) ? $clog2(N_S) : 1,
  localparam int unsigned      CNT_W    = $clog2(MAX_XFER + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  lb_mreq_t [N_M-1:0]            m_req,
  output lb_mrsp_t [N_M-1:0]            m_rsp,
  input  logic [N_M-1:0][TICKET_W-1:0]  tickets,   // used when DYNAMIC
  output lb_sreq_t [N_S-1:0]            s_req,
  input  data_t    [N_S-1:0]            s_rdata,
  // observation
  output logic [IDX_W-1:0]              owner,
  output logic                          owner_valid,
  output logic                          xfer,       // a word moves this cycle
  output logic                          tenure_end  // last word of a tenure
);

  logic [N_M-1:0]    reqv, draw_req, gnt;
  logic              draw, msg_end;
  logic [CNT_W-1:0]  cnt;
  lb_mreq_t          cur;
  logic [SIDX_W-1:0] sidx;

  for (genvar i = 0; i < N_M; i++) begin : g_reqv
    assign reqv[i] = m_req[i].req;
  end

  assign cur        = m_req[owner];
  assign xfer       = owner_valid && cur.req;
  assign msg_end    = owner_valid && (!cur.req || cur.len <= len_t'(1));
  assign tenure_end = owner_valid && (msg_end || cnt == CNT_W'(MAX_XFER - 1));
  assign draw       = !owner_valid || tenure_end;
  assign draw_req   = reqv & ~(msg_end ? gnt : '0);

  if (DYNAMIC) begin : g_dyn
    lottery_mgr_dynamic #(.N(N_M), .TW(TICKET_W), .RNG_W(RNG_W), .SEED(SEED)) u_lm (
      .clk, .rst_n, .draw, .req(draw_req), .tickets,
      .gnt, .gnt_idx(owner), .gnt_valid(owner_valid), .ticket_no()
    );
  end else begin : g_stat
    lottery_mgr_static #(.N(N_M), .TW(TICKET_W), .TICKETS(TICKETS), .EXTRA(EXTRA),
                         .RNG_W(RNG_W), .SEED(SEED)) u_lm (
      .clk, .rst_n, .draw, .req(draw_req),
      .gnt, .gnt_idx(owner), .gnt_valid(owner_valid), .ticket_no()
    );
  end

  // words moved in the current tenure
  always_ff @(posedge clk) begin
    if (!rst_n || draw) cnt <= '0;
    else if (xfer)      cnt <= cnt + 1'b1;
  end

  // address decode and slave side
  if (N_S > 1) begin : g_dec
    assign sidx = cur.addr[ADDR_W-1 -: SIDX_W];
  end else begin : g_one
    assign sidx = '0;
  end

  always_comb begin
    for (int j = 0; j < N_S; j++) begin
      s_req[j].sel   = xfer && (sidx == SIDX_W'(j));
      s_req[j].we    = cur.we;
      s_req[j].addr  = cur.addr;
      s_req[j].wdata = cur.wdata;
    end
  end

  // read return path: one cycle after the access
  logic              rd_pend;
  logic [IDX_W-1:0]  rd_m;
  logic [SIDX_W-1:0] rd_s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_pend <= 1'b0;
      rd_m    <= '0;
      rd_s    <= '0;
    end else begin
      rd_pend <= xfer && !cur.we;
      rd_m    <= owner;
      rd_s    <= sidx;
    end
  end

  always_comb begin
    for (int i = 0; i < N_M; i++) begin
      m_rsp[i].gnt    = gnt[i] && xfer;
      m_rsp[i].rvalid = rd_pend && (rd_m == IDX_W'(i));
      m_rsp[i].rdata  = s_rdata[rd_s];
    end
  end

  // a tenure never exceeds the maximum transfer size
  assert property (@(posedge clk) disable iff (!rst_n) cnt < CNT_W'(MAX_XFER));
  // a granted master presents a nonzero length
  assert property (@(posedge clk) disable iff (!rst_n) xfer |-> cur.len != '0);

endmodule
