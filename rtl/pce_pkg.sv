// pce_pkg: types and constants shared by the Pointer-Chasing Engine (PCE).
//
// The FIND instruction carries every field a PCE needs to walk a linked
// structure (structure type, base address, data offset, data size, next
// address offset, gold key, structure size, operand size).  The field list
// follows the FIND definition of the design; the field widths and the
// encodings below are this implementation's choice:
//   * virtual addresses and stored pointers are 64-bit words, 8-byte aligned;
//   * physical addresses are 33 bits (8 GB HMC 2.0 cube);
//   * offsets and sizes are 16-bit byte counts;
//   * the operand size is given as its log2 in bytes (6 = 64 B .. 13 = 8 KB).
// A search context (ctx_t) is what travels between vaults in an Internal
// Find: the decoded instruction plus the progress of the walk.
package pce_pkg;

  localparam int unsigned VA_W   = 64;  // virtual address / pointer width
  localparam int unsigned PA_W   = 33;  // physical address width (8 GB)
  localparam int unsigned WORD_W = 64;  // key and pointer word width
  localparam int unsigned INTLV_LG = 8; // 256-byte vault interleave
  localparam int unsigned OPLG_MIN = 6; // 64-byte operand
  localparam int unsigned OPLG_MAX = 13;// 8192-byte operand

  typedef enum logic [1:0] {
    ST_LIST  = 2'd0,
    ST_HASH  = 2'd1,
    ST_BTREE = 2'd2
  } stype_e;

  typedef struct packed {
    stype_e            stype;
    logic [VA_W-1:0]   base;        // virtual address of the first node
    logic [15:0]       data_off;    // offset of the data / key array
    logic [15:0]       data_size;   // data bytes (list, hash) or key count (b+tree)
    logic [15:0]       next_off;    // offset of next pointer / child array
    logic [WORD_W-1:0] gold;        // key searched for
    logic [15:0]       struct_size; // node size in bytes
    logic [3:0]        op_lg;       // log2 of the operand (window) size in bytes
  } find_t;

  typedef enum logic [1:0] {
    PH_DATA = 2'd0,  // compare node data with gold
    PH_NEXT = 2'd1,  // follow the next pointer
    PH_KEY  = 2'd2,  // scan b+tree keys
    PH_PTR  = 2'd3   // follow the chosen b+tree child pointer
  } phase_e;

  typedef struct packed {
    logic [31:0] nodes;    // nodes visited
    logic [31:0] hits;     // words found in a vector register
    logic [31:0] loads;    // window loads issued
    logic [31:0] fwds;     // Internal Finds sent
  } stats_t;

  typedef struct packed {
    find_t           ins;
    logic            xlated;  // node holds a physical address
    logic [PA_W-1:0] node;    // current node (physical once xlated)
    phase_e          phase;
    logic [4:0]      idx;     // b+tree key index
    logic [4:0]      cnt;     // b+tree keys <= gold
    logic            eq_seen; // b+tree key equal to gold seen in this node
    logic [4:0]      eq_idx;
    stats_t          st;
  } ctx_t;

  typedef struct packed {
    logic            found;
    logic            fault;   // address outside the direct segment or bad FIND
    logic [PA_W-1:0] node;    // physical address of the matching node
    logic [4:0]      slot;    // matching key index (b+tree)
    stats_t          st;
  } result_t;

endpackage
