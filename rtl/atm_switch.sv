// atm_switch: cell forwarding unit of a 4-port output-queued ATM switch.
//
// Arriving cells go to the cell scheduler, which writes each payload into the
// dual-ported shared payload memory and the cell's starting address into the
// queue of its output port. Each output port polls its queue, dequeues an
// address, wins the shared bus in a lottery and reads the cell out of the
// shared memory onto its output link. The bus's lottery manager uses static
// tickets in the ratio 1:1:4:6 for ports 1..4: port 4's traffic is to cross
// the switch with low latency, and ports 1, 2 and 3 share the rest of the
// bandwidth 1:1:4. This arrangement, and the ticket ratio, follow the ATM
// switch example; the sizes (12-word cells, 64 cell slots, 16-entry queues,
// 8-word maximum transfer) are this design's own. The shared memory is the
// bus's only slave.
//
// Ports: the cell input stream (see atm_cell_scheduler), the four output
// links with their ready inputs (see atm_port), and bus observation signals.
// The input takes one word per cycle and the bus moves one word per cycle,
// so the bus becomes the bottleneck, and the tickets decide the shares, when
// output links have held cells back and several queues are full at once.
module atm_switch
  import lottery_pkg::*;
#(
  parameter int unsigned CELL_WORDS = 12,
  parameter int unsigned SLOT_W     = 6,
  parameter int unsigned OFF_W      = 4,
  parameter int unsigned QDEPTH     = 16,
  parameter int unsigned MAX_XFER   = 8,
  parameter logic [4*TICKET_W-1:0] TICKETS = {4'd6, 4'd4, 4'd1, 4'd1},
  localparam int unsigned NP        = 4,
  localparam int unsigned MEM_AW    = SLOT_W + OFF_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic             in_sop,
  input  logic [1:0]       in_port,
  input  data_t            in_data,
  input  logic [NP-1:0]    link_rdy,
  output logic [NP-1:0]    out_valid,
  output logic [NP-1:0]    out_sop,
  output logic [NP-1:0]    out_eop,
  output data_t [NP-1:0]   out_data,
  output logic [1:0]       bus_owner,
  output logic             bus_owner_valid,
  output logic             bus_xfer,
  output logic             bus_tenure_end,
  output logic [SLOT_W:0]  free_slots
);

  logic              mem_we;
  logic [MEM_AW-1:0] mem_addr, q_din;
  data_t             mem_wdata;
  logic [NP-1:0]     q_push, q_pop, q_empty, q_full, rel_valid;
  logic [NP-1:0][MEM_AW-1:0] q_head, rel_addr;
  lb_mreq_t [NP-1:0] m_req;
  lb_mrsp_t [NP-1:0] m_rsp;
  lb_sreq_t [0:0]    s_req;
  data_t    [0:0]    s_rdata;

  atm_cell_scheduler #(.N_PORTS(NP), .CELL_WORDS(CELL_WORDS), .SLOT_W(SLOT_W),
                       .OFF_W(OFF_W)) u_sched (
    .clk, .rst_n, .in_valid, .in_ready, .in_sop, .in_port, .in_data,
    .mem_we, .mem_addr, .mem_wdata, .q_push, .q_din, .q_full,
    .rel_valid, .rel_addr, .free_slots
  );

  for (genvar p = 0; p < NP; p++) begin : g_port
    addr_queue #(.W(MEM_AW), .DEPTH(QDEPTH)) u_q (
      .clk, .rst_n, .push(q_push[p]), .din(q_din), .pop(q_pop[p]),
      .dout(q_head[p]), .empty(q_empty[p]), .full(q_full[p]), .count()
    );
    atm_port #(.CELL_WORDS(CELL_WORDS), .MEM_AW(MEM_AW), .MEM_BASE('0)) u_port (
      .clk, .rst_n, .q_empty(q_empty[p]), .q_head(q_head[p]), .q_pop(q_pop[p]),
      .m_req(m_req[p]), .m_rsp(m_rsp[p]), .link_rdy(link_rdy[p]),
      .out_valid(out_valid[p]), .out_sop(out_sop[p]), .out_eop(out_eop[p]),
      .out_data(out_data[p]), .rel_valid(rel_valid[p]), .rel_addr(rel_addr[p])
    );
  end

  lottery_bus #(.N_M(NP), .N_S(1), .DYNAMIC(1'b0), .TICKETS(TICKETS),
                .MAX_XFER(MAX_XFER)) u_bus (
    .clk, .rst_n, .m_req, .m_rsp, .tickets('0), .s_req, .s_rdata,
    .owner(bus_owner), .owner_valid(bus_owner_valid), .xfer(bus_xfer),
    .tenure_end(bus_tenure_end)
  );

  dp_shared_mem #(.AW(MEM_AW)) u_mem (
    .clk, .a_we(mem_we), .a_addr(mem_addr), .a_wdata(mem_wdata),
    .b_req(s_req[0]), .b_rdata(s_rdata[0])
  );

endmodule
