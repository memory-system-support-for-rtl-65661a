// dca_pkg: types and constants shared by the Impulse-style memory controller
// with dynamic cache line assembly (DCA).
//
// Fixed by the described system: 32-bit physical addresses, 128-byte L2 cache
// lines, an eight-byte data path between the controller and DRAM, 4 KB pages,
// eight sets of remapping registers. The encodings of the register fields, the
// page-table entry layout and the memory-port tag layout are this design's own.
package dca_pkg;

  localparam int PA_W       = 32;
  localparam int WORD_BYTES = 8;                      // DRAM <-> MMC bus width
  localparam int WORD_W     = 8 * WORD_BYTES;
  localparam int LINE_BYTES = 128;                    // L2 line size
  localparam int LINE_WORDS = LINE_BYTES / WORD_BYTES; // 16
  localparam int LINE_W     = 8 * LINE_BYTES;
  localparam int LINE_OFS   = 7;                      // log2(LINE_BYTES)
  localparam int WIDX_W     = 4;                      // log2(LINE_WORDS)
  localparam int PAGE_BITS  = 12;                     // 4 KB base pages
  localparam int NUM_MAPS   = 8;                      // control register sets
  localparam int ID_W       = 12;                     // memory-port request tag

  typedef logic [PA_W-1:0]   addr_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [LINE_W-1:0] line_t;

  // What the entries of an indirection vector hold.
  typedef enum logic [1:0] {
    IV_PHYS  = 2'd0,   // real physical addresses: AddrCalc and MTLB bypassed
    IV_VIRT  = 2'd1,   // virtual addresses inside the special virtual region
    IV_INDEX = 2'd2    // array indices, scaled by the object size
  } iv_kind_e;

  // One set of remapping control registers.
  typedef struct packed {
    logic     valid;
    logic     dca;        // 1: address region lives in shadow space (DCA)
    addr_t    data_base;  // shadow address of the data (alias) region
    addr_t    addr_base;  // shadow address of the address region (DCA only)
    addr_t    iv_pa;      // real physical address holding / backing the IV
    logic [23:0] n_elems; // elements in each region
    logic [2:0] addr_log2; // log2 bytes per IV entry (2 or 3)
    logic [2:0] obj_log2;  // log2 bytes per gathered object (2..7)
    iv_kind_e kind;
    addr_t    vbase;      // start of the special virtual region (IV_VIRT)
    addr_t    obj_pv;     // pseudo-virtual base of the array (IV_INDEX)
  } map_cfg_t;

  // Register fields written through the configuration port.
  typedef enum logic [3:0] {
    F_CTRL     = 4'd0,   // [0] valid [1] dca [4:2] addr_log2 [7:5] obj_log2 [9:8] kind
    F_DATABASE = 4'd1,
    F_ADDRBASE = 4'd2,
    F_IVPA     = 4'd3,
    F_NELEMS   = 4'd4,
    F_VBASE    = 4'd5,
    F_OBJPV    = 4'd6,
    F_PTBASE   = 4'd7,   // memory controller page table base (global)
    F_FLUSH    = 4'd8    // write: invalidate MTLB and IV buffer (global)
  } cfg_field_e;

  // Word-wide DRAM port. Reads return one response carrying the request tag;
  // writes return nothing.
  typedef struct packed {
    logic            we;
    addr_t           addr;   // byte address, word aligned
    word_t           wdata;
    logic [7:0]      wstrb;
    logic [ID_W-1:0] id;
  } mem_req_t;

  typedef struct packed {
    word_t           rdata;
    logic [ID_W-1:0] id;
  } mem_rsp_t;

  // Line-wide system-bus transaction as seen by the controller.
  typedef struct packed {
    logic  we;      // 1: write-back of a full line, 0: line fill
    addr_t addr;    // line aligned
    line_t wline;
  } bus_req_t;

  // Shadow-engine tag kinds (bits [10:9] of the engine's tag).
  typedef enum logic [1:0] {
    K_IVLOAD = 2'd0,  // IV line word -> IV buffer
    K_PTE    = 2'd1,  // page-table entry -> MTLB
    K_GATHER = 2'd2,  // gathered object word -> scatter/gather buffer
    K_LINE   = 2'd3   // plain line word -> scatter/gather buffer
  } tag_kind_e;

  // One-cycle event pulses from the shadow engine, for statistics and tests.
  typedef struct packed {
    logic iv_capture;  // DCA write-back captured into the IV buffer
    logic iv_hit;      // data-region access found its IV line in the buffer
    logic iv_miss;     // ... and had to load it from memory
    logic mtlb_miss;   // MTLB refill started
    logic gather;      // data-region line fill completed
    logic scatter;     // data-region write-back completed
    logic addr_read;   // address-region line read
    logic unmapped;    // shadow access that matched no remapping
  } shadow_ev_t;

endpackage
