// mpsoc_pkg: types and constants shared by the emulated MPSoC and its
// statistics extraction subsystem.
//
// Address map seen by each processing core on its local bus (this design's
// choice; the memory controller decodes the top nibble of the address):
//   0x0xxx_xxxx  private main memory, non-cacheable (BRAM)
//   0x1xxx_xxxx  private main memory, cacheable (through the I- and D-caches)
//   0x2xxx_xxxx  shared main memory (over the shared interconnect)
// Every other range answers at once with read data 0 and counts as an error.
//
// All memory-side handshakes (mem_req_t / mem_rsp_t) follow one rule: the
// requester holds req (and the other fields) stable until it sees a
// one-cycle ack, and drops req in the cycle after the ack.
//
// Origin: the three memory kinds per core (private non-cacheable, private
// cacheable behind L1 caches, shared) follow the framework description; the
// address map, the struct layouts, the statistics-bus address width and the
// event numbering are this design's own.
package mpsoc_pkg;

  localparam int unsigned XLEN = 32;

  typedef enum logic [1:0] {
    RGN_PRIV   = 2'd0,
    RGN_CACHED = 2'd1,
    RGN_SHARED = 2'd2,
    RGN_NONE   = 2'd3
  } region_e;

  // Processor local bus request (one word, no byte enables).
  typedef struct packed {
    logic            req;
    logic            we;
    logic            fetch;   // instruction fetch (goes to the I-cache)
    logic [XLEN-1:0] addr;
    logic [XLEN-1:0] wdata;
  } core_req_t;

  typedef struct packed {
    logic            ack;
    logic [XLEN-1:0] rdata;
  } core_rsp_t;

  // Memory-side request / response (physical clock domain).
  typedef struct packed {
    logic            req;
    logic            we;
    logic [XLEN-1:0] addr;
    logic [XLEN-1:0] wdata;
  } mem_req_t;

  typedef struct packed {
    logic            ack;
    logic [XLEN-1:0] rdata;
  } mem_rsp_t;

  // Dedicated statistics bus.
  localparam int unsigned STATS_AW = 12;  // word address; MSB selects the sensor bank

  typedef struct packed {
    logic                req;
    logic                we;
    logic [STATS_AW-1:0] addr;
    logic [XLEN-1:0]     wdata;
  } stats_req_t;

  // Event lines of a processing subsystem, counted by its count-logging
  // sniffer (index = bit in the event vector = word in its buffer window).
  localparam int unsigned EV_ACTIVE   = 0;  // core cycle doing work
  localparam int unsigned EV_STALLED  = 1;  // core cycle waiting for memory
  localparam int unsigned EV_IDLE     = 2;  // core cycle reported idle by the core
  localparam int unsigned EV_PRIV     = 3;  // non-cacheable private memory access
  localparam int unsigned EV_IC_HIT   = 4;
  localparam int unsigned EV_IC_MISS  = 5;
  localparam int unsigned EV_DC_HIT   = 6;
  localparam int unsigned EV_DC_MISS  = 7;
  localparam int unsigned EV_SHARED   = 8;  // shared memory access
  localparam int unsigned EV_SUPPRESS = 9;  // physical cycle with the core clock suppressed
  localparam int unsigned NEV_SUB     = 10;

  function automatic region_e decode_region(input logic [3:0] top_nibble);
    unique case (top_nibble)
      4'h0:    return RGN_PRIV;
      4'h1:    return RGN_CACHED;
      4'h2:    return RGN_SHARED;
      default: return RGN_NONE;
    endcase
  endfunction

endpackage
