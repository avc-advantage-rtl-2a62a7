// Shared types and helpers of the AVC Advantage board model.
//
// The Z80 bus is modelled as a synchronous, one-cycle request: in the cycle a
// request is presented, exactly one of mreq (memory) or iorq (I/O) is high,
// together with rd or wr.  m1 marks an opcode fetch.  For I/O cycles addr[7:0]
// is the port number and addr[15:8] carries the Z80's upper address byte (the
// B or A register), which several devices use as an extra address.  Writes
// take effect at the clock edge that ends the request; every device answers a
// read with registered data in the following cycle (bus_rsp_t.hit tells
// whether it claimed the cycle).  This request/response timing is a choice of
// this model; the real board follows Z80 bus timing.
package avc_pkg;

  typedef struct packed {
    logic        mreq;
    logic        iorq;
    logic        rd;
    logic        wr;
    logic        m1;
    logic [15:0] addr;
    logic [7:0]  wdata;
  } bus_req_t;

  typedef struct packed {
    logic       hit;
    logic [7:0] data;
  } bus_rsp_t;

  // Request on one cartridge connector (slot side of the motherboard).
  typedef struct packed {
    logic       stb;
    logic       wr;
    logic [2:0] reg_sel;
    logic [7:0] wdata;
  } cart_bus_t;


  function automatic logic io_wr(bus_req_t r, logic [7:0] port);
    return r.iorq && r.wr && r.addr[7:0] == port;
  endfunction

  function automatic logic io_rd(bus_req_t r, logic [7:0] port);
    return r.iorq && r.rd && r.addr[7:0] == port;
  endfunction

endpackage
