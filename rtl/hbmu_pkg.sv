// hbmu_pkg -- types and constants shared by the hardware bus monitoring unit.
//
// The bus monitor (BM) observes one AXI bus and keeps, per address range, a
// performance-counter (PC) set: transaction count, transfer size, read and
// write latency distributions, valid-cycle and busy-cycle counts.  The
// numbers of PC sets (3), read latency intervals (8), write latency
// intervals (4), global clock counters (4, 64 bit) and the 32-bit width of
// the latency counters follow the monitor description; the AXI field widths
// and the 32-bit width of the other counters are this design's choice.
package hbmu_pkg;

  localparam int unsigned AXI_ADDR_W  = 32;  // AXI address width
  localparam int unsigned AXI_ID_W    = 4;   // AXI transaction ID width
  localparam int unsigned CNT_W       = 32;  // width of every PC counter
  localparam int unsigned GCC_W       = 64;  // width of a global clock counter
  localparam int unsigned NUM_PC      = 3;   // PC sets (address ranges S0..S2)
  localparam int unsigned NUM_RD_BINS = 8;   // read latency intervals
  localparam int unsigned NUM_WR_BINS = 4;   // write latency intervals
  localparam int unsigned NUM_GCC     = 4;   // global clock counters
  localparam int unsigned BYTES_W     = 16;  // bytes of one burst: (len+1)<<size <= 256*128

  // Signals of one AXI bus as seen by a passive monitor.  Data payloads are
  // not needed: only handshakes, burst shape, address and ID are observed.
  typedef struct packed {
    logic [AXI_ADDR_W-1:0] araddr;
    logic [AXI_ID_W-1:0]   arid;
    logic [7:0]            arlen;
    logic [2:0]            arsize;
    logic                  arvalid;
    logic                  arready;
    logic                  rvalid;
    logic                  rready;
    logic                  rlast;
    logic [AXI_ADDR_W-1:0] awaddr;
    logic [AXI_ID_W-1:0]   awid;
    logic [7:0]            awlen;
    logic [2:0]            awsize;
    logic                  awvalid;
    logic                  awready;
    logic                  wvalid;
    logic                  wready;
    logic                  wlast;
    logic                  bvalid;
    logic                  bready;
  } axi_mon_t;

  // Events the transaction detector sends to one PC set in one cycle.
  typedef struct packed {
    logic               rd_req;    // read address accepted
    logic [BYTES_W-1:0] rd_bytes;  // its burst size in bytes
    logic               wr_req;    // write address accepted
    logic [BYTES_W-1:0] wr_bytes;
    logic               rd_beat;   // read data beat transferred
    logic               rd_first;  // first beat of a read burst: rd_lat valid
    logic [CNT_W-1:0]   rd_lat;    // AR handshake to first R beat, cycles
    logic               rd_done;   // last read beat: rd_busy valid
    logic [CNT_W-1:0]   rd_busy;   // AR handshake to last R beat, inclusive
    logic               wr_beat;   // write data beat transferred
    logic               wr_done;   // last write beat: wr_busy valid
    logic [CNT_W-1:0]   wr_busy;   // AW handshake to last W beat, inclusive
    logic               wr_resp;   // write response transferred: wr_lat valid
    logic [CNT_W-1:0]   wr_lat;    // AW handshake to B handshake, cycles
  } pc_event_t;

  // The counters of one PC set.
  typedef struct packed {
    logic [CNT_W-1:0] tcr_rd;   // read transactions
    logic [CNT_W-1:0] tcr_wr;   // write transactions
    logic [CNT_W-1:0] tsr_rd;   // bytes read
    logic [CNT_W-1:0] tsr_wr;   // bytes written
    logic [CNT_W-1:0] vc_rd;    // cycles with a read data beat
    logic [CNT_W-1:0] vc_wr;    // cycles with a write data beat
    logic [CNT_W-1:0] bc_rd;    // sum of read transaction lengths, cycles
    logic [CNT_W-1:0] bc_wr;    // sum of write transaction lengths, cycles
    logic [NUM_RD_BINS-1:0][CNT_W-1:0] rlc;  // read latency distribution
    logic [NUM_WR_BINS-1:0][CNT_W-1:0] wlc;  // write latency distribution
  } pc_counts_t;

  // Address range and source filter of one PC set.
  typedef struct packed {
    logic [AXI_ADDR_W-1:0] base;
    logic [AXI_ADDR_W-1:0] limit;   // inclusive
    logic                  id_en;   // count only transactions with this ID
    logic [AXI_ID_W-1:0]   id;
  } pc_range_t;

  // Burst size in bytes of an AXI burst: (len + 1) << size.
  function automatic logic [BYTES_W-1:0] burst_bytes(input logic [7:0] len,
                                                     input logic [2:0] size);
    logic [BYTES_W-1:0] beats;
    beats = BYTES_W'(len) + BYTES_W'(1);
    return beats << size;
  endfunction

endpackage
