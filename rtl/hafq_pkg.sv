// hafq_pkg: shared widths, record layouts and enums of the HAFQ traffic manager.
//
// The three 32-bit per-queue records follow the SRAM memory map of the HAFQ
// scheme: a zombie-list entry {pointer[31:22], packet counter[21:12],
// flow key[11:0]}, a flow-count-estimation word {total of packet counters[31:20],
// average arrival rate[19:8], miss probability[7:0]} and a scheduling word
// {queue length[31:24], number of flows[23:12], allocated bandwidth[11:0]}.
// The scaling of each field is this design's choice and is given next to it.
// The packet descriptor (flow ID, length, buffer handle) is this design's own:
// the traffic manager moves descriptors, the packet bodies live elsewhere.
package hafq_pkg;

  localparam int unsigned FLOW_ID_W = 32;  // flow identifier carried by a packet
  localparam int unsigned KEY_W     = 12;  // zombie-list flow key
  localparam int unsigned CNT_W     = 10;  // zombie-list packet counter
  localparam int unsigned PTR_W     = 10;  // zombie-list pointer field (reserved)
  localparam int unsigned TOTAL_W   = 12;  // total of packet counters
  localparam int unsigned AVG_W     = 12;  // average arrival rate, unsigned 10.2
  localparam int unsigned AVG_FRAC  = 2;
  localparam int unsigned MISS_W    = 8;   // miss probability (1-p), units of 1/256
  localparam int unsigned QLEN_W    = 8;   // queue length in packets
  localparam int unsigned NFLOW_W   = 12;  // estimated number of flows
  localparam int unsigned BW_W      = 12;  // allocated bandwidth: DRR quantum in units
  localparam int unsigned QUANTUM_UNIT = 64;  // bytes per allocated-bandwidth unit
  localparam int unsigned LEN_W     = 16;  // packet length in bytes
  localparam int unsigned HANDLE_W  = 16;  // handle of the packet body in packet memory
  localparam int unsigned RND_W     = 32;  // random word width

  typedef struct packed {
    logic [PTR_W-1:0] pointer;
    logic [CNT_W-1:0] count;   // 0 marks an empty entry
    logic [KEY_W-1:0] key;
  } zombie_t;

  typedef struct packed {
    logic [TOTAL_W-1:0] total;
    logic [AVG_W-1:0]   avg_rate;
    logic [MISS_W-1:0]  miss_prob;
  } est_word_t;

  typedef struct packed {
    logic [QLEN_W-1:0]  qlen;
    logic [NFLOW_W-1:0] nflows;
    logic [BW_W-1:0]    alloc_bw;
  } sched_word_t;

  typedef struct packed {
    logic [FLOW_ID_W-1:0] flow_id;
    logic [LEN_W-1:0]     len;
    logic [HANDLE_W-1:0]  handle;
  } pkt_desc_t;

  typedef enum logic [1:0] {
    ZL_NOSWAP = 2'd0,
    ZL_HIT    = 2'd1,
    ZL_SWAP   = 2'd2
  } zl_event_e;

  typedef enum logic [1:0] {
    DROP_NONE  = 2'd0,
    DROP_PREF  = 2'd1,  // preferential drop of a high-rate flow
    DROP_QFULL = 2'd2,  // queue at its length limit
    DROP_POOL  = 2'd3   // shared buffer pool exhausted
  } drop_e;

endpackage
