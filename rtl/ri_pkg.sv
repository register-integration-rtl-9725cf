// ri_pkg: shared widths, constants and record types of the register-integration renamer.
//
// The renamer keeps the results of squashed instructions alive in the physical register
// file and re-uses them when the same instruction is renamed again with the same physical
// inputs. The records below are the ones passed between its parts: a decoded instruction
// from fetch, an integration-table (IT) entry, an instruction-ordering-buffer (ROB) entry
// and a renamed instruction handed on to issue.
//
// Default sizes follow the evaluated machine: 8-wide rename, 64 architectural registers
// (Alpha), a 128-entry ROB, a 256-entry direct-mapped IT and therefore 64 + 128 + 256 = 448
// physical registers. Field widths are fixed here for those sizes; module parameters may
// only shrink the counts. PC and data addresses are 64 bits (Alpha). The register-number
// and address widths are this design's choice; the document gives no encoding.
package ri_pkg;

  localparam int unsigned DEF_WIDTH     = 8;    // instructions renamed per cycle
  localparam int unsigned DEF_NUM_ARCH  = 64;   // architectural registers
  localparam int unsigned DEF_ROB_SIZE  = 128;  // instructions in flight
  localparam int unsigned DEF_IT_SIZE   = 256;  // integration-table entries
  localparam int unsigned DEF_NUM_PREGS = DEF_NUM_ARCH + DEF_ROB_SIZE + DEF_IT_SIZE; // 448
  localparam int unsigned DEF_RECOVER_BW = 8;   // instructions recovered per cycle
  localparam int unsigned DEF_COMMIT_BW  = 8;   // instructions committed per cycle
  localparam int unsigned DEF_SNOOP_PORTS = 4;  // store addresses snooped per cycle
  localparam int unsigned DEF_CPL_PORTS   = 8;  // completions accepted per cycle

  localparam int unsigned PC_W     = 64;
  localparam int unsigned ADDR_W   = 64;
  localparam int unsigned AREG_W   = $clog2(DEF_NUM_ARCH);
  localparam int unsigned PREG_W   = $clog2(DEF_NUM_PREGS);
  localparam int unsigned ROBIDX_W = $clog2(DEF_ROB_SIZE);
  // Memory addresses are compared for store invalidation at 8-byte granularity.
  localparam int unsigned ADDR_LSB = 3;

  typedef logic [AREG_W-1:0]   areg_t;
  typedef logic [PREG_W-1:0]   preg_t;
  typedef logic [PC_W-1:0]     pc_t;
  typedef logic [ADDR_W-1:0]   addr_t;
  typedef logic [ROBIDX_W-1:0] robidx_t;

  // Decoded instruction as it arrives from fetch/decode.
  typedef struct packed {
    logic  valid;
    pc_t   pc;
    logic  src1_v;
    areg_t src1;
    logic  src2_v;
    areg_t src2;
    logic  dst_v;
    areg_t dst;
    logic  is_load;
    logic  is_store;
    logic  is_branch;
  } fetch_insn_t;

  // One integration-table entry: a squashed, completed instruction instance.
  typedef struct packed {
    logic  valid;
    pc_t   pc;
    logic  i1_v;
    preg_t i1;
    logic  i2_v;
    preg_t i2;
    logic  o_v;
    preg_t o;
    pc_t   jump_target;   // resolved next PC of a branch
    addr_t mem_addr;      // data address of a load or store
    logic  is_load;
    logic  is_store;
    logic  is_branch;
  } it_entry_t;

  // Instruction-ordering-buffer entry.
  typedef struct packed {
    pc_t   pc;
    logic  p1_v;
    preg_t p1;
    logic  p2_v;
    preg_t p2;
    logic  dst_v;
    areg_t dst;
    preg_t pd;            // physical register holding this instruction's result
    preg_t old_pd;        // previous mapping of dst, freed at commit
    logic  completed;
    logic  is_load;
    logic  is_store;
    logic  is_branch;
    pc_t   jump_target;
    addr_t mem_addr;
  } rob_entry_t;

  // Renamed instruction leaving the Rename/Integrate stage.
  typedef struct packed {
    logic    valid;
    logic    integrated;   // result re-used; needs no issue or execution
    robidx_t rob_idx;
    pc_t     pc;
    logic    p1_v;
    preg_t   p1;
    logic    p2_v;
    preg_t   p2;
    logic    dst_v;
    areg_t   dst;
    preg_t   pd;
    preg_t   old_pd;
    logic    is_load;
    logic    is_store;
    logic    is_branch;
    pc_t     jump_target;  // valid when integrated and is_branch
    addr_t   mem_addr;     // valid when integrated and is_load/is_store
  } renamed_insn_t;

  // Commit report, one per retired instruction.
  typedef struct packed {
    logic    valid;
    robidx_t rob_idx;
    pc_t     pc;
    logic    dst_v;
    areg_t   dst;
    preg_t   pd;
    preg_t   old_pd;
  } commit_t;

endpackage
