// lottery_pkg: types and constants shared by the LOTTERYBUS blocks.
//
// The bus is a single shared channel carrying, for the master that owns it,
// one word per cycle: a request flag, a write enable, an address, write data
// and the number of words the master has ready to move back to back
// (1 means its request drops after this word). The lottery manager uses the
// request flags to pick the owner; the bus controller uses the length to
// end a tenure, and to leave a master that is about to go quiet out of the
// next lottery, without an idle cycle.
// Widths here (16-bit address, 32-bit data, 8-bit length) are this design's
// own choice; the 4-bit ticket width and the four masters follow the
// static and dynamic lottery manager diagrams.
package lottery_pkg;

  localparam int unsigned NUM_MASTERS = 4;   // four SoC masters C1..C4
  localparam int unsigned TICKET_W    = 4;   // ticket count width per master
  localparam int unsigned ADDR_W      = 16;  // bus address width
  localparam int unsigned DATA_W      = 32;  // bus word width
  localparam int unsigned LEN_W       = 8;   // remaining-words field width
  localparam int unsigned RNG_W       = 16;  // LFSR width

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [LEN_W-1:0]  len_t;
  typedef logic [TICKET_W-1:0] ticket_t;

  // Master -> bus: held stable while req is high and the master is not granted.
  typedef struct packed {
    logic  req;    // master has at least one word to move
    logic  we;     // 1: write, 0: read
    addr_t addr;   // word address (top bits select the slave)
    data_t wdata;  // write data
    len_t  len;    // words ready back to back, including this one (>= 1)
  } lb_mreq_t;

  // Bus -> master.
  typedef struct packed {
    logic  gnt;     // the word presented this cycle is taken by the bus
    logic  rvalid;  // read data for the word taken the cycle before
    data_t rdata;
  } lb_mrsp_t;

  // Bus -> slave: one access per cycle, read data expected one cycle later.
  typedef struct packed {
    logic  sel;
    logic  we;
    addr_t addr;   // full bus address; the slave uses its low bits
    data_t wdata;
  } lb_sreq_t;

endpackage
