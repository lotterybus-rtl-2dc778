// atm_port: an output port of the ATM switch with its bus interface.
//
// The port polls its address queue. When the queue holds a cell it pops the
// cell's starting address (the dequeue signal), requests the shared bus and
// reads the CELL_WORDS words of the cell from the payload memory, one bus
// word per granted cycle, then sends each returned word onto its output link
// (out_valid, with out_sop on the first and out_eop on the last word). A new
// cell is only taken while link_rdy says the output link can accept one, so
// a slow or stalled link leaves its cells queued. After
// the last word it returns the memory slot to the cell scheduler
// (rel_valid/rel_addr). It takes the next cell from its queue in the cycle
// the current cell's last word is granted, so back-to-back cells keep its
// request up, and the length it shows the bus then includes the next cell. The poll-dequeue-request-forward
// sequence follows the ATM switch example; the link is taken to accept a
// word every cycle, and the cell size and the memory's bus address MEM_BASE
// are this design's own. A cell may need several bus tenures when it is
// longer than the bus's maximum transfer size; the port then simply keeps
// its request up.
// The port only reads, so we and wdata of its bus request are constant 0,
// the upper address and length bits are constant, out_data is the bus read
// data passed straight through, and rel_addr is slot aligned (low bits 0).
module atm_port
  import lottery_pkg::*;
#(
  parameter int unsigned CELL_WORDS = 12,
  parameter int unsigned MEM_AW     = 10,
  parameter addr_t       MEM_BASE   = '0,
  localparam int unsigned WC_W      = $clog2(CELL_WORDS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // address queue
  input  logic              q_empty,
  input  logic [MEM_AW-1:0] q_head,
  output logic              q_pop,
  // bus master side
  output lb_mreq_t          m_req,
  input  lb_mrsp_t          m_rsp,
  // output link
  input  logic              link_rdy,
  output logic              out_valid,
  output logic              out_sop,
  output logic              out_eop,
  output data_t             out_data,
  // slot release
  output logic              rel_valid,
  output logic [MEM_AW-1:0] rel_addr
);

  // Fetch side: the cell whose words are being requested. Receive side: the
  // cell whose words are coming back (one cycle behind). The next cell is
  // taken in the cycle the current cell's last word is granted, so the
  // request stays up across cells when the queue holds more.
  logic              tx_active, rx_active, take;
  logic [MEM_AW-1:0] tx_base, rx_base;
  logic [WC_W-1:0]   issued, received;
  logic              last_gnt;

  assign last_gnt = m_rsp.gnt && (issued == WC_W'(CELL_WORDS - 1));
  assign take     = (!tx_active || last_gnt) && !q_empty && link_rdy;
  assign q_pop    = take;

  always_comb begin
    m_req       = '0;
    m_req.req   = tx_active;
    m_req.we    = 1'b0;
    m_req.addr  = MEM_BASE + addr_t'(tx_base) + addr_t'(issued);
    // the next cell counts as ready when it will be taken at the last word
    m_req.len   = len_t'(CELL_WORDS) - len_t'(issued)
                + ((issued == WC_W'(CELL_WORDS - 1) && !q_empty && link_rdy)
                   ? len_t'(CELL_WORDS) : len_t'(0));
  end

  assign out_valid = m_rsp.rvalid;
  assign out_data  = m_rsp.rdata;
  assign out_sop   = m_rsp.rvalid && (received == '0);
  assign out_eop   = m_rsp.rvalid && (received == WC_W'(CELL_WORDS - 1));
  assign rel_valid = out_eop;
  assign rel_addr  = rx_base;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_active <= 1'b0;
      tx_base   <= '0;
      issued    <= '0;
    end else if (take) begin
      tx_active <= 1'b1;
      tx_base   <= q_head;
      issued    <= '0;
    end else if (last_gnt) begin
      tx_active <= 1'b0;
      issued    <= '0;
    end else if (m_rsp.gnt) begin
      issued    <= issued + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_active <= 1'b0;
      rx_base   <= '0;
      received  <= '0;
    end else begin
      if (m_rsp.gnt && issued == '0) begin
        rx_active <= 1'b1;
        rx_base   <= tx_base;
      end else if (out_eop) begin
        rx_active <= 1'b0;
      end
      if (out_eop)           received <= '0;
      else if (m_rsp.rvalid) received <= received + 1'b1;
    end
  end

  // read data only come back for words this port asked for
  assert property (@(posedge clk) disable iff (!rst_n) m_rsp.rvalid |-> rx_active);
  assert property (@(posedge clk) disable iff (!rst_n) m_rsp.gnt |-> tx_active);

endmodule
