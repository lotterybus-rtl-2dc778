// atm_cell_scheduler: stores arriving ATM cells and queues them per port.
//
// Cells arrive one 32-bit word per cycle on a valid/ready stream; the first
// word is marked by in_sop and comes with the cell's output port, in_port.
// The scheduler takes a free cell slot of the shared payload memory (the
// lowest free one in a bitmap of NSLOTS slots), writes the CELL_WORDS words
// of the cell there through the memory's write port, and after the last word
// pushes the slot's starting address into the output port's address queue.
// An output port hands the slot back with rel_valid/rel_addr once it has
// read the cell. A cell is only started when a slot is free and its queue
// has room (otherwise in_ready is low on its first word); words that arrive
// outside a cell are dropped. Writing payloads to the shared memory and
// starting addresses to the output queues follows the ATM switch example;
// slot management, the stream interface and the cell size are this
// design's own (a 48-byte payload is 12 words of 32 bits). Slot s occupies
// words s*2^OFF_W .. s*2^OFF_W + CELL_WORDS - 1.
// mem_wdata is in_data passed straight through, and q_din is slot aligned,
// so its low OFF_W bits are always 0.
module atm_cell_scheduler
  import lottery_pkg::*;
#(
  parameter int unsigned N_PORTS    = 4,
  parameter int unsigned CELL_WORDS = 12,
  parameter int unsigned SLOT_W     = 6,
  parameter int unsigned OFF_W      = 4,
  localparam int unsigned NSLOTS    = 2**SLOT_W,
  localparam int unsigned MEM_AW    = SLOT_W + OFF_W,
  localparam int unsigned PIDX_W    = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // cell input stream
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic                      in_sop,
  input  logic [PIDX_W-1:0]         in_port,
  input  data_t                     in_data,
  // payload memory write port
  output logic                      mem_we,
  output logic [MEM_AW-1:0]         mem_addr,
  output data_t                     mem_wdata,
  // output queues
  output logic [N_PORTS-1:0]        q_push,
  output logic [MEM_AW-1:0]         q_din,
  input  logic [N_PORTS-1:0]        q_full,
  // slot release from the output ports
  input  logic [N_PORTS-1:0]        rel_valid,
  input  logic [N_PORTS-1:0][MEM_AW-1:0] rel_addr,
  // status
  output logic [SLOT_W:0]           free_slots
);

  logic [NSLOTS-1:0] free_map;
  logic              in_cell, any_free, accept, start, finish;
  logic [SLOT_W-1:0] fs, cur_slot;
  logic [PIDX_W-1:0] cur_port;
  logic [OFF_W-1:0]  wcnt;

  initial assert (CELL_WORDS <= 2**OFF_W && CELL_WORDS >= 2)
    else $error("atm_cell_scheduler: CELL_WORDS must fit a slot");

  // lowest free slot
  always_comb begin
    fs       = '0;
    any_free = 1'b0;
    for (int s = NSLOTS - 1; s >= 0; s--)
      if (free_map[s]) begin
        fs       = SLOT_W'(s);
        any_free = 1'b1;
      end
  end

  always_comb begin
    free_slots = '0;
    for (int s = 0; s < NSLOTS; s++) free_slots += (SLOT_W + 1)'(free_map[s]);
  end

  assign in_ready = in_cell || !in_sop || (any_free && !q_full[in_port]);
  assign accept   = in_valid && in_ready;
  assign start    = accept && !in_cell && in_sop;
  assign finish   = accept && in_cell && (wcnt == OFF_W'(CELL_WORDS - 1));

  assign mem_we    = start || (accept && in_cell);
  assign mem_addr  = start ? {fs, OFF_W'(0)} : {cur_slot, wcnt};
  assign mem_wdata = in_data;

  assign q_din = {cur_slot, OFF_W'(0)};
  always_comb begin
    q_push = '0;
    if (finish) q_push[cur_port] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_cell  <= 1'b0;
      cur_slot <= '0;
      cur_port <= '0;
      wcnt     <= '0;
    end else if (start) begin
      in_cell  <= 1'b1;
      cur_slot <= fs;
      cur_port <= in_port;
      wcnt     <= OFF_W'(1);
    end else if (accept && in_cell) begin
      wcnt <= wcnt + 1'b1;
      if (finish) in_cell <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) free_map <= '1;
    else begin
      for (int p = 0; p < N_PORTS; p++)
        if (rel_valid[p]) free_map[rel_addr[p][MEM_AW-1:OFF_W]] <= 1'b1;
      if (start) free_map[fs] <= 1'b0;
    end
  end

endmodule
