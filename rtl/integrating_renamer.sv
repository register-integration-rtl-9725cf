// integrating_renamer: the Rename/Integrate stage of an out-of-order core with register
// integration, together with the structures it manipulates: map table, free list,
// integration table (IT) and instruction ordering buffer (ROB).
//
// Each cycle a group of up to WIDTH decoded instructions is renamed. In the same cycle the
// map table is read for every input and output, the IT is read by PC, and the integration
// circuit decides, slot by slot, whether the instruction is a re-trace of a squashed
// instance whose physical inputs are the same. An integrated instruction takes the
// squashed instance's output register as its new mapping, is written into the ROB already
// complete (with the stored jump target and data address) and its IT entry is removed.
// Other instructions get a fresh register from the free list. The renamed group is
// presented on disp[] one cycle later; integrated slots are marked and need no issue or
// execution. For an integrated branch, disp[].jump_target is its resolved next PC, so the
// front end can start any recovery at once; for an integrated load or store,
// disp[].mem_addr goes to the memory ordering buffer.
//
// Recovery (sq_en) is serial, RECOVER_BW instructions per cycle from the youngest: map
// mappings are restored, completed squashed instructions enter the IT with their output
// register, and the others release theirs. Renaming stalls while recovering, when the ROB
// has fewer than WIDTH free slots, or when the free list has fewer than WIDTH free
// registers (fe_ready low). Stores present their address on the snoop ports when it
// becomes known; matching load entries leave the IT.
//
// Interface timing: a group is taken at a clock edge where fe_valid && fe_ready. A squash
// request is accepted in any cycle and blocks renaming in that cycle. Completions and
// snoops are single-cycle pulses. Commits are reported on cmt[] in the cycle they happen.
// Renaming in one cycle (the document expects at least two pipeline stages) and the
// event counters on ev_* are this design's choices.
module integrating_renamer
  import ri_pkg::*;
#(
  parameter int unsigned WIDTH       = DEF_WIDTH,
  parameter int unsigned NUM_ARCH    = DEF_NUM_ARCH,
  parameter int unsigned ROB_SIZE    = DEF_ROB_SIZE,
  parameter int unsigned IT_SIZE     = DEF_IT_SIZE,
  parameter int unsigned NUM_PREGS   = NUM_ARCH + ROB_SIZE + IT_SIZE,
  parameter int unsigned RECOVER_BW  = DEF_RECOVER_BW,
  parameter int unsigned COMMIT_BW   = DEF_COMMIT_BW,
  parameter int unsigned SNOOP_PORTS = DEF_SNOOP_PORTS,
  parameter int unsigned CPL_PORTS   = DEF_CPL_PORTS
) (
  input  logic          clk,
  input  logic          rst_n,
  // from fetch/decode
  input  logic          fe_valid,
  input  fetch_insn_t   fe_insn  [WIDTH],
  output logic          fe_ready,
  // to issue / memory ordering buffer / branch resolution
  output renamed_insn_t disp     [WIDTH],
  // completions from the execution core
  input  logic          cpl_en   [CPL_PORTS],
  input  robidx_t       cpl_idx  [CPL_PORTS],
  input  pc_t           cpl_jt   [CPL_PORTS],
  input  addr_t         cpl_addr [CPL_PORTS],
  // mis-speculation recovery request
  input  logic          sq_en,
  input  robidx_t       sq_idx,
  input  logic          sq_excl,
  output logic          recovering,
  // store addresses for IT invalidation
  input  logic          sn_en    [SNOOP_PORTS],
  input  addr_t         sn_addr  [SNOOP_PORTS],
  // retirement
  output commit_t       cmt      [COMMIT_BW],
  // per-cycle event counts
  output logic [7:0]    ev_integrated,
  output logic [7:0]    ev_allocated,
  output logic [7:0]    ev_it_inserted,
  output logic [7:0]    ev_it_evicted,
  output logic [8:0]    ev_snoop_inv,
  output logic [8:0]    ev_input_inv,
  output logic [7:0]    ev_recovered_nc,
  output logic          ev_stall
);

  localparam int unsigned CW = $clog2(WIDTH+1);

  // ---------------- map table ----------------
  areg_t rd_areg [3*WIDTH];
  preg_t rd_preg [3*WIDTH];
  logic  mwr_en  [WIDTH];
  areg_t mwr_a   [WIDTH];
  preg_t mwr_p   [WIDTH];
  logic  rc_en   [RECOVER_BW];
  areg_t rc_areg [RECOVER_BW];
  preg_t rc_preg [RECOVER_BW];

  map_table #(.WIDTH(WIDTH), .NUM_ARCH(NUM_ARCH), .RECOVER_BW(RECOVER_BW),
              .RD_PORTS(3*WIDTH)) u_map (
    .clk, .rst_n, .rd_areg, .rd_preg,
    .wr_en(mwr_en), .wr_areg(mwr_a), .wr_preg(mwr_p),
    .rc_en, .rc_areg, .rc_preg);

  // ---------------- free list ----------------
  preg_t                cand [WIDTH];
  logic                 cand_ok;
  logic [CW-1:0]        alloc_cnt, alloc_take;
  logic [NUM_PREGS-1:0] fl_free, fl_freed_q, rob_free, it_free;
  logic [$clog2(NUM_PREGS+1)-1:0] free_count;

  free_list #(.WIDTH(WIDTH), .NUM_ARCH(NUM_ARCH), .NUM_PREGS(NUM_PREGS)) u_fl (
    .clk, .rst_n, .cand, .cand_ok, .alloc_cnt(alloc_take), .free_mask(fl_free),
    .freed_q(fl_freed_q), .free_count);

  assign fl_free = rob_free | it_free;

  // ---------------- integration table ----------------
  pc_t       lk_pc  [WIDTH];
  it_entry_t lk_ent [WIDTH];
  logic      lk_hit [WIDTH];
  logic      rm_en  [WIDTH];
  logic      ins_en [RECOVER_BW];
  it_entry_t ins_ent[RECOVER_BW];
  logic [$clog2(RECOVER_BW+1)-1:0] n_evict, n_rec_nc;
  logic [$clog2(IT_SIZE+1)-1:0]    n_snoop_inv, n_input_inv;

  integration_table #(.IT_SIZE(IT_SIZE), .WIDTH(WIDTH), .RECOVER_BW(RECOVER_BW),
                      .SNOOP_PORTS(SNOOP_PORTS), .NUM_PREGS(NUM_PREGS)) u_it (
    .clk, .rst_n, .lk_pc, .lk_ent, .lk_hit, .rm_en, .rm_pc(lk_pc),
    .ins_en, .ins_ent, .sn_en, .sn_addr, .inv_mask(fl_freed_q), .free_mask(it_free),
    .n_evict, .n_snoop_inv, .n_input_inv);

  // ---------------- integration circuit ----------------
  fetch_insn_t grp    [WIDTH];
  preg_t       map_p1 [WIDTH];
  preg_t       map_p2 [WIDTH];
  preg_t       map_old[WIDTH];
  preg_t       p1     [WIDTH];
  preg_t       p2     [WIDTH];
  preg_t       pd     [WIDTH];
  preg_t       old_pd [WIDTH];
  logic        integ  [WIDTH];

  always_comb begin
    for (int s = 0; s < WIDTH; s++) begin
      grp[s]              = fe_insn[s];
      grp[s].valid        = fe_insn[s].valid && fe_valid;
      lk_pc[s]            = fe_insn[s].pc;
      rd_areg[3*s]        = fe_insn[s].src1;
      rd_areg[3*s+1]      = fe_insn[s].src2;
      rd_areg[3*s+2]      = fe_insn[s].dst;
      map_p1[s]           = rd_preg[3*s];
      map_p2[s]           = rd_preg[3*s+1];
      map_old[s]          = rd_preg[3*s+2];
    end
  end

  integration_circuit #(.WIDTH(WIDTH), .IT_SIZE(IT_SIZE)) u_ic (
    .insn(grp), .map_p1, .map_p2, .map_old, .it_ent(lk_ent), .it_hit(lk_hit), .cand,
    .p1, .p2, .pd, .old_pd, .integ, .alloc_cnt);

  // ---------------- reorder buffer ----------------
  logic        disp_en  [WIDTH];
  rob_entry_t  disp_ent [WIDTH];
  robidx_t     tail_idx;
  logic [$clog2(ROB_SIZE+1)-1:0] rob_free_slots;

  reorder_buffer #(.ROB_SIZE(ROB_SIZE), .WIDTH(WIDTH), .COMMIT_BW(COMMIT_BW),
                   .RECOVER_BW(RECOVER_BW), .CPL_PORTS(CPL_PORTS), .NUM_PREGS(NUM_PREGS)) u_rob (
    .clk, .rst_n, .disp_en, .disp_ent, .tail_idx, .free_slots(rob_free_slots),
    .cpl_en, .cpl_idx, .cpl_jt, .cpl_addr, .sq_en, .sq_idx, .sq_excl, .recovering,
    .rc_en, .rc_areg, .rc_preg, .ins_en, .ins_ent, .cmt, .free_mask(rob_free),
    .n_recovered_nc(n_rec_nc));

  // ---------------- stage control ----------------
  logic          go;
  renamed_insn_t ren [WIDTH];
  robidx_t       ridx;

  assign fe_ready = !recovering && !sq_en && cand_ok &&
                    (rob_free_slots >= ($clog2(ROB_SIZE+1))'(WIDTH));
  assign go       = fe_valid && fe_ready;
  assign alloc_take = go ? alloc_cnt : '0;

  always_comb begin
    ridx = tail_idx;
    for (int s = 0; s < WIDTH; s++) begin
      rm_en[s]  = go && integ[s];
      mwr_en[s] = go && grp[s].valid && grp[s].dst_v;
      mwr_a[s]  = grp[s].dst;
      mwr_p[s]  = pd[s];
      disp_en[s] = go && grp[s].valid;

      disp_ent[s]             = '0;
      disp_ent[s].pc          = grp[s].pc;
      disp_ent[s].p1_v        = grp[s].src1_v;
      disp_ent[s].p1          = p1[s];
      disp_ent[s].p2_v        = grp[s].src2_v;
      disp_ent[s].p2          = p2[s];
      disp_ent[s].dst_v       = grp[s].dst_v;
      disp_ent[s].dst         = grp[s].dst;
      disp_ent[s].pd          = pd[s];
      disp_ent[s].old_pd      = old_pd[s];
      disp_ent[s].completed   = integ[s];
      disp_ent[s].is_load     = grp[s].is_load;
      disp_ent[s].is_store    = grp[s].is_store;
      disp_ent[s].is_branch   = grp[s].is_branch;
      disp_ent[s].jump_target = integ[s] ? lk_ent[s].jump_target : '0;
      disp_ent[s].mem_addr    = integ[s] ? lk_ent[s].mem_addr : '0;

      ren[s]             = '0;
      ren[s].valid       = go && grp[s].valid;
      ren[s].integrated  = integ[s];
      ren[s].rob_idx     = ridx;
      ren[s].pc          = grp[s].pc;
      ren[s].p1_v        = grp[s].src1_v;
      ren[s].p1          = p1[s];
      ren[s].p2_v        = grp[s].src2_v;
      ren[s].p2          = p2[s];
      ren[s].dst_v       = grp[s].dst_v;
      ren[s].dst         = grp[s].dst;
      ren[s].pd          = pd[s];
      ren[s].old_pd      = old_pd[s];
      ren[s].is_load     = grp[s].is_load;
      ren[s].is_store    = grp[s].is_store;
      ren[s].is_branch   = grp[s].is_branch;
      ren[s].jump_target = disp_ent[s].jump_target;
      ren[s].mem_addr    = disp_ent[s].mem_addr;
      if (grp[s].valid) ridx = ridx + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < WIDTH; s++) disp[s] <= '0;
    end else begin
      for (int s = 0; s < WIDTH; s++) disp[s] <= ren[s];
    end
  end

  // ---------------- event counts ----------------
  always_comb begin
    ev_integrated  = '0;
    ev_allocated   = 8'(alloc_take);
    ev_it_inserted = '0;
    for (int s = 0; s < WIDTH; s++) ev_integrated = ev_integrated + 8'(rm_en[s]);
    for (int k = 0; k < RECOVER_BW; k++) ev_it_inserted = ev_it_inserted + 8'(ins_en[k]);
    ev_it_evicted   = 8'(n_evict);
    ev_snoop_inv    = 9'(n_snoop_inv);
    ev_input_inv    = 9'(n_input_inv);
    ev_recovered_nc = 8'(n_rec_nc);
    ev_stall        = fe_valid && !fe_ready;
  end

endmodule
