// maple_pkg: types and constants shared by the MAPLE memory-access engine.
//
// MAPLE is reached by cores through memory-mapped loads and stores into one
// 4 KB page. Inside that page, address bits 8..3 carry the operation code
// (64 load codes and 64 store codes) and bits 11..9 the queue id. Sizes that
// follow the design description: 8 queues sharing a 1 KB scratchpad of
// 4-byte entries (256 entries, 32 per queue by default), a 16-entry fully
// associative TLB and 64-byte chunks for the LIMA unit. Everything else here
// (opcode numbering, message formats, Sv39 page tables, 40-bit physical
// addresses, transaction-id layout) is this implementation's own choice.
package maple_pkg;

  // ---------------- sizes ----------------
  localparam int unsigned NUM_QUEUES  = 8;    // queues per MAPLE unit
  localparam int unsigned SP_ENTRIES  = 256;  // 1 KB of 4-byte entries
  localparam int unsigned TLB_ENTRIES = 16;   // fully associative TLB
  localparam int unsigned ENTRY_W     = 32;   // queue entry width (4 bytes)
  localparam int unsigned DATA_W      = 64;   // core load/store data (RV64)
  localparam int unsigned LINE_W      = 512;  // 64-byte chunk / cache line
  localparam int unsigned VA_W        = 39;   // Sv39 virtual address
  localparam int unsigned PA_W        = 40;   // physical address
  localparam int unsigned PPN_W       = PA_W - 12;
  localparam int unsigned SRC_W       = 8;    // NoC source id of a core
  localparam int unsigned TAG_W       = 4;    // core transaction tag
  localparam int unsigned QID_W       = 3;    // queue id field (addr 11..9)
  localparam int unsigned IDX_W       = 8;    // scratchpad index

  // ---------------- operation codes (address bits 8..3) ----------------
  typedef logic [5:0] opcode_t;
  // loads
  localparam opcode_t LD_CONSUME      = 6'd0;
  localparam opcode_t LD_CONSUME2     = 6'd1;  // two entries in one 64-bit load
  localparam opcode_t LD_OPEN         = 6'd8;
  localparam opcode_t LD_CLOSE        = 6'd9;
  localparam opcode_t LD_FAULT_VA     = 6'd16;
  localparam opcode_t LD_STATUS       = 6'd17;
  localparam opcode_t LD_CNT_PRODUCE  = 6'd20;
  localparam opcode_t LD_CNT_CONSUME  = 6'd21;
  localparam opcode_t LD_CNT_TLBMISS  = 6'd22;
  localparam opcode_t LD_CNT_FULLSTL  = 6'd23;
  // stores
  localparam opcode_t ST_PRODUCE      = 6'd0;
  localparam opcode_t ST_PRODUCE_PTR  = 6'd1;  // coherent load through the LLC
  localparam opcode_t ST_PREFETCH     = 6'd2;  // speculative prefetch into LLC
  localparam opcode_t ST_PRODUCE_PTRD = 6'd3;  // non-coherent load from DRAM
  localparam opcode_t ST_INIT         = 6'd8;  // data[3:0] = log2 entries/queue
  localparam opcode_t ST_PT_BASE      = 6'd9;  // page-table root PPN
  localparam opcode_t ST_TLB_FLUSH    = 6'd10;
  localparam opcode_t ST_FAULT_DONE   = 6'd11;
  localparam opcode_t ST_LIMA_A       = 6'd16;
  localparam opcode_t ST_LIMA_B       = 6'd17;
  localparam opcode_t ST_LIMA_BEGIN   = 6'd18;
  localparam opcode_t ST_LIMA_END     = 6'd19; // start LIMA, prefetch to LLC
  localparam opcode_t ST_LIMA_END_Q   = 6'd20; // start LIMA_PRODUCE into qid

  // ---------------- core side (MMIO) ----------------
  typedef struct packed {
    logic [SRC_W-1:0]  src;     // requesting core
    logic [TAG_W-1:0]  tag;     // core transaction tag, returned in response
    logic              store;   // 1 = store, 0 = load
    logic [11:0]       offset;  // byte offset in MAPLE's page
    logic [DATA_W-1:0] data;    // store data
  } core_req_t;

  typedef struct packed {
    logic [SRC_W-1:0]  src;
    logic [TAG_W-1:0]  tag;
    logic [DATA_W-1:0] data;    // load data (0 for a store ack)
  } core_resp_t;

  // decoded operation passed to a pipeline
  typedef struct packed {
    logic [SRC_W-1:0]  src;
    logic [TAG_W-1:0]  tag;
    logic              store;
    opcode_t           opcode;
    logic [QID_W-1:0]  qid;
    logic [DATA_W-1:0] data;
  } op_t;

  // ---------------- memory side ----------------
  typedef enum logic [1:0] {SZ_WORD = 2'd0, SZ_DWORD = 2'd1, SZ_LINE = 2'd2} mem_size_e;
  typedef enum logic [1:0] {TX_PRODUCE = 2'd0, TX_PTW = 2'd1, TX_LIMA = 2'd2} tx_src_e;

  typedef struct packed {
    tx_src_e           src;
    logic [IDX_W-1:0]  idx;     // scratchpad entry for TX_PRODUCE
  } txid_t;

  typedef struct packed {
    logic [PA_W-1:0]   addr;
    mem_size_e         size;
    logic              prefetch;  // fill the LLC only, no response
    logic              noncoh;    // bypass the LLC, go to DRAM
    txid_t             txid;
  } mem_req_t;

  // Sub-line responses are right-aligned in data.
  typedef struct packed {
    txid_t             txid;
    logic [LINE_W-1:0] data;
  } mem_resp_t;

  // ---------------- produce pipeline ----------------
  typedef enum logic [1:0] {PK_DATA = 2'd0, PK_PTR = 2'd1, PK_PREFETCH = 2'd2} prod_kind_e;

  typedef struct packed {
    prod_kind_e        kind;
    logic              noncoh;
    logic              need_ack;  // 0 for LIMA-generated pointers
    logic [QID_W-1:0]  qid;
    logic [DATA_W-1:0] data;      // data word or virtual address
    logic [SRC_W-1:0]  src;
    logic [TAG_W-1:0]  tag;
  } prod_op_t;

endpackage
