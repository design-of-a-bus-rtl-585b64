// axi_pkg: types and constants shared by the AXI masters, slaves, interconnect
// and performance monitor.
//
// Channel payloads follow the channel widths of the design: with VALID and READY
// added, AW and AR are 56 bits, W 43, B 8 and R 41 (4-bit IDs, 32-bit address and
// data, 4-bit burst length, 3-bit size, 2-bit burst, 2-bit lock, 4-bit cache,
// 3-bit prot, 4-bit write strobe, 2-bit response). The address map that splits
// the address space between slaves, and the performance-counter record layout,
// are this design's own choices.
package axi_pkg;

  localparam int unsigned ID_W    = 4;
  localparam int unsigned ADDR_W  = 32;
  localparam int unsigned DATA_W  = 32;
  localparam int unsigned STRB_W  = DATA_W / 8;
  localparam int unsigned LEN_W   = 4;   // beats per burst = LEN + 1, up to 16
  localparam int unsigned SIZE_W  = 3;   // bytes per beat = 2**SIZE
  localparam int unsigned CNT_W   = 32;  // width of every performance counter

  // Address map: bits [31:28] of an address select the slave region.
  localparam int unsigned REGION_LSB = 28;
  localparam int unsigned REGION_W   = 4;

  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10,
    BURST_RSVD  = 2'b11
  } burst_e;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } resp_e;

  // Address/control payload, shared by the AW and AR channels (54 bits).
  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
    logic [SIZE_W-1:0] size;
    burst_e            burst;
    logic [1:0]        lock;
    logic [3:0]        cache;
    logic [2:0]        prot;
  } ax_t;

  // Write data payload (41 bits).
  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
    logic              last;
  } w_t;

  // Write response payload (6 bits).
  typedef struct packed {
    logic [ID_W-1:0] id;
    resp_e           resp;
  } b_t;

  // Read data payload (39 bits).
  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [DATA_W-1:0] data;
    resp_e             resp;
    logic              last;
  } r_t;

  // One performance-counter register set (Write or Read side of one PC_n).
  typedef struct packed {
    logic [CNT_W-1:0] xfer_cnt;   // transfer (transaction) count
    logic [CNT_W-1:0] size_cnt;   // total transfer size in bytes
    logic [CNT_W-1:0] valid_cnt;  // total valid count: data beats moved
    logic [CNT_W-1:0] busy_cnt;   // total busy count: cycles a transaction is open
    logic [CNT_W-1:0] lat_cnt;    // accumulated latency in cycles
  } perf_cnt_t;

  // Counter increments produced in one cycle by a perf_event_unit. Each event
  // carries the index of the counter bank it belongs to.
  typedef struct packed {
    logic                xfer;       // an address handshake happened
    logic [CNT_W-1:0]    size;       // bytes of that transaction
    logic [REGION_W-1:0] xfer_bank;  // bank of that transaction
    logic                xfer_hit;   // its address maps to a bank
    logic                beat;       // a data handshake happened
    logic                busy;       // a transaction is open this cycle
    logic                lat_done;   // a transaction finished
    logic [CNT_W-1:0]    lat;        // its latency in cycles
    logic [REGION_W-1:0] data_bank;  // bank of beat/busy/lat events
    logic                data_hit;   // that bank exists
  } perf_ev_t;

  // Bytes moved by one burst: (LEN + 1) * 2**SIZE.
  function automatic logic [CNT_W-1:0] burst_bytes(logic [LEN_W-1:0] len,
                                                   logic [SIZE_W-1:0] size);
    return CNT_W'((32'(len) + 32'd1) << size);
  endfunction

  // Address of the beat after `addr` in a burst that started at `start`.
  // Number of bytes = 2**SIZE, burst length = LEN + 1, aligned address =
  // floor(addr / bytes) * bytes; WRAP bursts wrap at a boundary aligned to
  // bytes * length.
  function automatic logic [ADDR_W-1:0] next_addr(logic [ADDR_W-1:0] addr,
                                                  logic [ADDR_W-1:0] start,
                                                  logic [LEN_W-1:0]  len,
                                                  logic [SIZE_W-1:0] size,
                                                  burst_e            burst);
    logic [ADDR_W-1:0] nbytes, aligned, total, lower, incr;
    nbytes  = ADDR_W'(1) << size;
    aligned = addr & ~(nbytes - 1);
    incr    = aligned + nbytes;
    total   = nbytes * (ADDR_W'(len) + 1);
    lower   = start & ~(total - 1);
    case (burst)
      BURST_FIXED: return addr;
      BURST_WRAP:  return (incr >= lower + total) ? lower : incr;
      default:     return incr;
    endcase
  endfunction

endpackage
