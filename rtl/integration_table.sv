// integration_table: the Integration Table (IT), a PC-indexed, direct-mapped record of
// squashed instructions whose results are still held in physical registers.
//
// Each entry names one squashed, completed instruction instance: its PC, the physical
// registers it read (I1, I2) and wrote (O), the resolved target of a branch and the data
// address of a load or store. The IT owns the O register of every valid entry: it was not
// returned to the free list at recovery.
//
// Operations, all applied at the clock edge:
//   lookup  WIDTH combinational read ports, indexed by PC bits [2 +: log2(IT_SIZE)]; the
//           entry is returned with hit = valid and full-PC tag match. The integration test
//           itself (input comparison) is done by the integration circuit.
//   remove  an integrated entry is cleared; ownership of O passes back to the ROB, so the
//           register is not freed.
//   insert  during recovery, up to RECOVER_BW squashed completed instructions per cycle,
//           in recovery order (youngest first). A valid entry at the target index is
//           evicted and its O released to the free list; later insert ports win.
//   snoop   SNOOP_PORTS store addresses per cycle are compared with every load entry; a
//           match invalidates the entry and releases O (store invalidation).
//   inv     entries that read a register released in the previous cycle (inv_mask) are
//           dropped and release O. A released register may be renamed again, and an entry
//           naming it as an input would otherwise match an unrelated new value. The
//           document does not discuss this case; the rule is this design's addition.
//   squashed stores  an inserted store acts as a snoop on the loads already in the table
//           (younger squashed loads that may have forwarded from it). Also this design's
//           addition, for the same reason.
// A removal in the same cycle as a snoop hit keeps the removal: the integrated load is in
// the memory ordering buffer, which catches the conflict.
//
// Sizes follow the main configuration (256 entries, direct-mapped). The 8-byte address
// granularity of the snoop and the index/tag split are this design's choices.
module integration_table
  import ri_pkg::*;
#(
  parameter int unsigned IT_SIZE     = DEF_IT_SIZE,
  parameter int unsigned WIDTH       = DEF_WIDTH,
  parameter int unsigned RECOVER_BW  = DEF_RECOVER_BW,
  parameter int unsigned SNOOP_PORTS = DEF_SNOOP_PORTS,
  parameter int unsigned NUM_PREGS   = DEF_NUM_PREGS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup
  input  pc_t                  lk_pc  [WIDTH],
  output it_entry_t            lk_ent [WIDTH],
  output logic                 lk_hit [WIDTH],
  // removal of integrated entries (index derived from the PC)
  input  logic                 rm_en  [WIDTH],
  input  pc_t                  rm_pc  [WIDTH],
  // insertion during recovery
  input  logic                 ins_en  [RECOVER_BW],
  input  it_entry_t            ins_ent [RECOVER_BW],
  // store-address snooping
  input  logic                 sn_en   [SNOOP_PORTS],
  input  addr_t                sn_addr [SNOOP_PORTS],
  // registers released in the previous cycle
  input  logic [NUM_PREGS-1:0] inv_mask,
  // registers released by the IT this cycle
  output logic [NUM_PREGS-1:0] free_mask,
  // event counts of this cycle
  output logic [$clog2(RECOVER_BW+1)-1:0] n_evict,
  output logic [$clog2(IT_SIZE+1)-1:0]    n_snoop_inv,
  output logic [$clog2(IT_SIZE+1)-1:0]    n_input_inv
);

  localparam int unsigned IDX_W = $clog2(IT_SIZE);
  typedef logic [IDX_W-1:0] idx_t;

  function automatic idx_t index_of(pc_t pc);
    return pc[2 +: IDX_W];
  endfunction

  it_entry_t mem_q [IT_SIZE];
  it_entry_t mem_d [IT_SIZE];

  always_comb begin
    for (int s = 0; s < WIDTH; s++) begin
      lk_ent[s] = mem_q[index_of(lk_pc[s])];
      lk_hit[s] = lk_ent[s].valid && (lk_ent[s].pc == lk_pc[s]);
    end
  end

  logic removed [IT_SIZE];
  logic sn_hit, in_hit;

  always_comb begin
    free_mask   = '0;
    n_evict     = '0;
    n_snoop_inv = '0;
    n_input_inv = '0;
    for (int e = 0; e < IT_SIZE; e++) begin
      mem_d[e]   = mem_q[e];
      removed[e] = 1'b0;
    end
    for (int s = 0; s < WIDTH; s++) begin
      if (rm_en[s]) removed[index_of(rm_pc[s])] = 1'b1;
    end
    for (int e = 0; e < IT_SIZE; e++) begin
      sn_hit = 1'b0;
      in_hit = 1'b0;
      for (int p = 0; p < SNOOP_PORTS; p++) begin
        if (sn_en[p] && mem_q[e].is_load &&
            (mem_q[e].mem_addr[ADDR_W-1:ADDR_LSB] == sn_addr[p][ADDR_W-1:ADDR_LSB]))
          sn_hit = 1'b1;
      end
      if ((mem_q[e].i1_v && inv_mask[mem_q[e].i1]) ||
          (mem_q[e].i2_v && inv_mask[mem_q[e].i2]))
        in_hit = 1'b1;
      if (removed[e]) begin
        mem_d[e].valid = 1'b0;
      end else if (mem_q[e].valid && (sn_hit || in_hit)) begin
        mem_d[e].valid = 1'b0;
        if (mem_q[e].o_v) free_mask[mem_q[e].o] = 1'b1;
        if (sn_hit) n_snoop_inv = n_snoop_inv + 1'b1;
        else        n_input_inv = n_input_inv + 1'b1;
      end
    end
    // Inserts in recovery order; each evicts what is at its index.
    for (int k = 0; k < RECOVER_BW; k++) begin
      if (ins_en[k]) begin
        if (mem_d[index_of(ins_ent[k].pc)].valid) begin
          if (mem_d[index_of(ins_ent[k].pc)].o_v)
            free_mask[mem_d[index_of(ins_ent[k].pc)].o] = 1'b1;
          n_evict = n_evict + 1'b1;
        end
        mem_d[index_of(ins_ent[k].pc)]       = ins_ent[k];
        mem_d[index_of(ins_ent[k].pc)].valid = 1'b1;
        // A squashed store leaves the window: loads already in the table that are younger
        // may have taken their value from it.
        if (ins_ent[k].is_store) begin
          for (int e = 0; e < IT_SIZE; e++) begin
            if (mem_d[e].valid && mem_d[e].is_load &&
                (mem_d[e].mem_addr[ADDR_W-1:ADDR_LSB] == ins_ent[k].mem_addr[ADDR_W-1:ADDR_LSB])) begin
              mem_d[e].valid = 1'b0;
              if (mem_d[e].o_v) free_mask[mem_d[e].o] = 1'b1;
              n_snoop_inv = n_snoop_inv + 1'b1;
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int e = 0; e < IT_SIZE; e++) mem_q[e] <= '0;
    end else begin
      for (int e = 0; e < IT_SIZE; e++) mem_q[e] <= mem_d[e];
    end
  end

  // Only a hit entry may be removed.
  for (genvar s = 0; s < WIDTH; s++) begin : g_rm_chk
    a_remove_hit: assert property (@(posedge clk) disable iff (!rst_n)
      rm_en[s] |-> (mem_q[index_of(rm_pc[s])].valid && mem_q[index_of(rm_pc[s])].pc == rm_pc[s]));
  end

endmodule
