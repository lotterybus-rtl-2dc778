// tb_bus_master: a self-checking traffic generator for one bus master.
//
// It moves messages of 1..LMAX words over the bus: first a write message to
// a random spot of its own address region, then a read message of the same
// words, checking that every word comes back as written. Between messages it
// stays idle 0..GAP_MAX cycles (0 keeps the bus saturated). It counts words
// moved, cycles spent waiting with a request up, and its own data checks.
// Handshake as in lottery_bus: hold req/we/addr/wdata/len until m_rsp.gnt.
module tb_bus_master
  import lottery_pkg::*;
#(
  parameter int unsigned ID      = 0,
  parameter int unsigned LMAX    = 16,
  parameter addr_t       REGION  = '0,
  parameter int unsigned GAP_MAX = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     enable,
  output lb_mreq_t m_req,
  input  lb_mrsp_t m_rsp,
  output int       words,
  output int       wait_cycles,
  output int       msgs,
  output int       checks,
  output int       failures
);

  typedef enum logic [1:0] {GAP, WR, RD, DRAIN} st_t;
  st_t st;
  int  len, issued, received, gap, epoch;
  addr_t base;

  function automatic data_t pattern(int e, int k);
    return {8'(ID), 12'(e), 12'(k)};
  endfunction

  always_comb begin
    m_req       = '0;
    m_req.req   = (st == WR || st == RD) && issued < len;
    m_req.we    = (st == WR);
    m_req.addr  = base + addr_t'(issued);
    m_req.wdata = pattern(epoch, issued);
    m_req.len   = len_t'(len - issued + (st == WR ? len : 0));  // the read follows
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      st <= GAP; gap <= 0; epoch <= 0; len <= 0; issued <= 0; received <= 0;
      base <= REGION; words <= 0; wait_cycles <= 0; msgs <= 0; checks <= 0; failures <= 0;
    end else begin
      if (m_req.req && !m_rsp.gnt) wait_cycles <= wait_cycles + 1;
      if (m_rsp.gnt) words <= words + 1;
      if (m_rsp.gnt && !m_req.req) begin
        failures <= failures + 1;
        $display("master %0d: grant without request", ID);
      end
      if (m_rsp.rvalid) begin
        checks <= checks + 1;
        if (st == GAP || st == WR || m_rsp.rdata != pattern(epoch, received)) begin
          failures <= failures + 1;
          $display("master %0d: read %h expected %h", ID, m_rsp.rdata, pattern(epoch, received));
        end
        received <= received + 1;
      end
      case (st)
        GAP: if (gap > 0) gap <= gap - 1;
             else if (enable) begin
               len    <= 1 + int'($urandom % LMAX);
               base   <= REGION + addr_t'($urandom % 512);
               issued <= 0;
               epoch  <= epoch + 1;
               st     <= WR;
             end
        WR: if (m_rsp.gnt) begin
              if (issued + 1 == len) begin
                st <= RD; issued <= 0; received <= 0;
              end else issued <= issued + 1;
            end
        RD: if (m_rsp.gnt) begin
              issued <= issued + 1;
              if (issued + 1 == len) st <= DRAIN;
            end
        DRAIN: if (received == len || (m_rsp.rvalid && received + 1 == len)) begin
                 msgs <= msgs + 1;
                 gap  <= (GAP_MAX == 0) ? 0 : int'($urandom % (GAP_MAX + 1));
                 st   <= GAP;
               end
        default: st <= GAP;
      endcase
    end
  end

endmodule
