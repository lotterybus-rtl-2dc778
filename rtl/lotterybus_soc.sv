// lotterybus_soc: the two LOTTERYBUS systems side by side.
//
// 1. An ATM switch cell forwarding unit (atm_switch) whose four output ports
//    share one bus under a lottery manager with static tickets 1:1:4:6.
// 2. A four-master, four-slave shared bus (lottery_bus with four shared_mem
//    slaves) whose lottery manager takes dynamically assigned tickets: the
//    masters' bus requests and their current ticket counts are ports of this
//    module, so any SoC components (or traffic generators) can drive them.
//    Each slave owns a quarter of the 16-bit address space.
// Pairing the static manager with the ATM example and the dynamic manager
// with the four-master/four-slave system is this design's own choice; both
// managers and both systems come from the LOTTERYBUS architecture.
module lotterybus_soc
  import lottery_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // ATM switch
  input  logic                 atm_in_valid,
  output logic                 atm_in_ready,
  input  logic                 atm_in_sop,
  input  logic [1:0]           atm_in_port,
  input  data_t                atm_in_data,
  input  logic [3:0]           atm_link_rdy,
  output logic [3:0]           atm_out_valid,
  output logic [3:0]           atm_out_sop,
  output logic [3:0]           atm_out_eop,
  output data_t [3:0]          atm_out_data,
  output logic [1:0]           atm_bus_owner,
  output logic                 atm_bus_owner_valid,
  output logic                 atm_bus_xfer,
  output logic                 atm_bus_tenure_end,
  output logic [6:0]           atm_free_slots,
  // dynamic-ticket bus
  input  lb_mreq_t [3:0]       dyn_m_req,
  output lb_mrsp_t [3:0]       dyn_m_rsp,
  input  logic [3:0][TICKET_W-1:0] dyn_tickets,
  output logic [1:0]           dyn_bus_owner,
  output logic                 dyn_bus_owner_valid,
  output logic                 dyn_bus_xfer,
  output logic                 dyn_bus_tenure_end
);

  atm_switch u_atm (
    .clk, .rst_n,
    .in_valid(atm_in_valid), .in_ready(atm_in_ready), .in_sop(atm_in_sop),
    .in_port(atm_in_port), .in_data(atm_in_data),
    .link_rdy(atm_link_rdy), .out_valid(atm_out_valid), .out_sop(atm_out_sop), .out_eop(atm_out_eop),
    .out_data(atm_out_data),
    .bus_owner(atm_bus_owner), .bus_owner_valid(atm_bus_owner_valid),
    .bus_xfer(atm_bus_xfer), .bus_tenure_end(atm_bus_tenure_end),
    .free_slots(atm_free_slots)
  );

  lb_sreq_t [3:0] s_req;
  data_t    [3:0] s_rdata;

  lottery_bus #(.N_M(4), .N_S(4), .DYNAMIC(1'b1), .SEED(16'h1D2B)) u_dyn_bus (
    .clk, .rst_n, .m_req(dyn_m_req), .m_rsp(dyn_m_rsp), .tickets(dyn_tickets),
    .s_req, .s_rdata,
    .owner(dyn_bus_owner), .owner_valid(dyn_bus_owner_valid),
    .xfer(dyn_bus_xfer), .tenure_end(dyn_bus_tenure_end)
  );

  for (genvar j = 0; j < 4; j++) begin : g_slave
    shared_mem #(.AW(10)) u_mem (.clk, .s_req(s_req[j]), .rdata(s_rdata[j]));
  end

endmodule
