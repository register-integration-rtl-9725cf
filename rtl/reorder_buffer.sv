// reorder_buffer: the instruction ordering buffer, extended with the two recovery paths
// that integration needs.
//
// A circular buffer of ROB_SIZE entries, written WIDTH per cycle at the tail by the rename
// stage, marked complete by the execution core, and retired in order from the head.
//
// Commit: up to COMMIT_BW completed instructions per cycle leave the head; each releases
// the old mapping of its output to the free list.
//
// Recovery: sq_en names the oldest instruction to squash (sq_idx). The buffer then walks
// back from the youngest instruction to sq_idx, RECOVER_BW instructions per cycle (serial
// rollback). For each it restores the previous map-table mapping of its output and:
//   * if it had completed, creates an IT entry from its PC, physical inputs, output,
//     jump target and data address; the output register stays allocated, now owned by
//     the IT;
//   * otherwise releases its output register as usual.
// When sq_excl is set with the request, the instruction at sq_idx itself (a load or value
// mis-speculation) is never entered into the IT, which detaches everything that depended
// on it. A new request during recovery that names an older instruction moves the stop
// point back; a younger one is ignored. Commit continues during recovery but never
// retires an instruction at or after the stop point, nor at or after sq_idx in the request
// cycle. `recovering` is high from the cycle after the request until the walk is done;
// rename must stall meanwhile.
//
// Timing: dispatch, completion, commit and recovery all take effect at the clock edge.
// Sizes follow the evaluated machine (128 entries, 8 recovered per cycle); the commit
// width of 8 is this design's choice.
// ROB_SIZE must be a power of two (this design's choice).
module reorder_buffer
  import ri_pkg::*;
#(
  parameter int unsigned ROB_SIZE   = DEF_ROB_SIZE,
  parameter int unsigned WIDTH      = DEF_WIDTH,
  parameter int unsigned COMMIT_BW  = DEF_COMMIT_BW,
  parameter int unsigned RECOVER_BW = DEF_RECOVER_BW,
  parameter int unsigned CPL_PORTS  = DEF_CPL_PORTS,
  parameter int unsigned NUM_PREGS  = DEF_NUM_PREGS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // dispatch from rename: valid entries go to consecutive slots from the tail
  input  logic                 disp_en  [WIDTH],
  input  rob_entry_t           disp_ent [WIDTH],
  output robidx_t              tail_idx,
  output logic [$clog2(ROB_SIZE+1)-1:0] free_slots,
  // completion from the execution core
  input  logic                 cpl_en   [CPL_PORTS],
  input  robidx_t              cpl_idx  [CPL_PORTS],
  input  pc_t                  cpl_jt   [CPL_PORTS],
  input  addr_t                cpl_addr [CPL_PORTS],
  // squash request
  input  logic                 sq_en,
  input  robidx_t              sq_idx,
  input  logic                 sq_excl,
  output logic                 recovering,
  // recovery outputs: map restore and IT insertion, youngest first
  output logic                 rc_en    [RECOVER_BW],
  output areg_t                rc_areg  [RECOVER_BW],
  output preg_t                rc_preg  [RECOVER_BW],
  output logic                 ins_en   [RECOVER_BW],
  output it_entry_t            ins_ent  [RECOVER_BW],
  // commit report
  output commit_t              cmt      [COMMIT_BW],
  // registers released this cycle (commit and recovery)
  output logic [NUM_PREGS-1:0] free_mask,
  output logic [$clog2(RECOVER_BW+1)-1:0] n_recovered_nc
);

  localparam int unsigned IW = $clog2(ROB_SIZE);
  localparam int unsigned PW = IW + 1;              // pointer with wrap bit
  typedef logic [PW-1:0] ptr_t;

  rob_entry_t ent_q [ROB_SIZE];
  ptr_t       head_q, tail_q, stop_q;
  logic       rec_q, excl_q;
  robidx_t    excl_idx_q;

  ptr_t       count;
  assign count      = tail_q - head_q;
  assign free_slots = ($clog2(ROB_SIZE+1))'(ROB_SIZE) - ($clog2(ROB_SIZE+1))'(count);
  assign tail_idx   = tail_q[IW-1:0];
  assign recovering = rec_q;

  // Squash point as a full pointer (the named entry lies between head and tail).
  ptr_t sq_ptr;
  assign sq_ptr = head_q + ptr_t'(IW'(sq_idx - head_q[IW-1:0]));

  // ---------------- commit ----------------
  ptr_t    cptr;
  logic    cgo;
  ptr_t    n_commit;
  always_comb begin
    cgo      = 1'b1;
    n_commit = '0;
    for (int c = 0; c < COMMIT_BW; c++) begin
      cptr   = head_q + ptr_t'(c);
      cmt[c] = '0;
      if (cgo && (cptr != tail_q) && !(rec_q && (cptr == stop_q)) && !(sq_en && (cptr == sq_ptr)) &&
          ent_q[cptr[IW-1:0]].completed) begin
        cmt[c].valid   = 1'b1;
        cmt[c].rob_idx = cptr[IW-1:0];
        cmt[c].pc      = ent_q[cptr[IW-1:0]].pc;
        cmt[c].dst_v   = ent_q[cptr[IW-1:0]].dst_v;
        cmt[c].dst     = ent_q[cptr[IW-1:0]].dst;
        cmt[c].pd      = ent_q[cptr[IW-1:0]].pd;
        cmt[c].old_pd  = ent_q[cptr[IW-1:0]].old_pd;
        n_commit       = n_commit + 1'b1;
      end else begin
        cgo = 1'b0;
      end
    end
  end

  // ---------------- recovery walk ----------------
  ptr_t       rptr;
  logic       rgo;
  ptr_t       n_rec;
  rob_entry_t re;
  always_comb begin
    rgo            = rec_q;
    n_rec          = '0;
    n_recovered_nc = '0;
    free_mask      = '0;
    for (int k = 0; k < RECOVER_BW; k++) begin
      rptr       = tail_q - ptr_t'(k) - 1'b1;
      re         = ent_q[rptr[IW-1:0]];
      rc_en[k]   = 1'b0;
      rc_areg[k] = re.dst;
      rc_preg[k] = re.old_pd;
      ins_en[k]  = 1'b0;
      ins_ent[k] = '0;
      if (rgo && (tail_q - ptr_t'(k) != stop_q)) begin
        n_rec    = n_rec + 1'b1;
        rc_en[k] = re.dst_v;
        if (re.completed && !(excl_q && rptr[IW-1:0] == excl_idx_q)) begin
          ins_en[k]              = 1'b1;
          ins_ent[k].valid       = 1'b1;
          ins_ent[k].pc          = re.pc;
          ins_ent[k].i1_v        = re.p1_v;
          ins_ent[k].i1          = re.p1;
          ins_ent[k].i2_v        = re.p2_v;
          ins_ent[k].i2          = re.p2;
          ins_ent[k].o_v         = re.dst_v;
          ins_ent[k].o           = re.pd;
          ins_ent[k].jump_target = re.jump_target;
          ins_ent[k].mem_addr    = re.mem_addr;
          ins_ent[k].is_load     = re.is_load;
          ins_ent[k].is_store    = re.is_store;
          ins_ent[k].is_branch   = re.is_branch;
        end else begin
          if (re.dst_v) free_mask[re.pd] = 1'b1;
          n_recovered_nc = n_recovered_nc + 1'b1;
        end
      end else begin
        rgo = 1'b0;
      end
    end
    for (int c = 0; c < COMMIT_BW; c++) begin
      if (cmt[c].valid && cmt[c].dst_v) free_mask[cmt[c].old_pd] = 1'b1;
    end
  end

  // ---------------- state ----------------
  ptr_t dptr;
  ptr_t dslot [WIDTH];
  always_comb begin
    dptr = tail_q;
    for (int s = 0; s < WIDTH; s++) begin
      dslot[s] = dptr;
      if (disp_en[s]) dptr = dptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head_q     <= '0;
      tail_q     <= '0;
      stop_q     <= '0;
      rec_q      <= 1'b0;
      excl_q     <= 1'b0;
      excl_idx_q <= '0;
      for (int e = 0; e < ROB_SIZE; e++) ent_q[e] <= '0;
    end else begin
      for (int p = 0; p < CPL_PORTS; p++) begin
        if (cpl_en[p]) begin
          ent_q[cpl_idx[p]].completed   <= 1'b1;
          ent_q[cpl_idx[p]].jump_target <= cpl_jt[p];
          ent_q[cpl_idx[p]].mem_addr    <= cpl_addr[p];
        end
      end
      head_q <= head_q + n_commit;
      if (rec_q) begin
        tail_q <= tail_q - n_rec;
        if (tail_q - n_rec == stop_q) rec_q <= 1'b0;
      end else begin
        for (int s = 0; s < WIDTH; s++) begin
          if (disp_en[s]) ent_q[dslot[s][IW-1:0]] <= disp_ent[s];
        end
        tail_q <= dptr;
      end
      if (sq_en) begin
        if (!rec_q || (sq_ptr - head_q) < (stop_q - head_q)) begin
          stop_q     <= sq_ptr;
          excl_q     <= sq_excl;
          excl_idx_q <= sq_idx;
        end
        // a request naming the current tail squashes nothing
        if (!rec_q && sq_ptr != tail_q) rec_q <= 1'b1;
        if (rec_q) rec_q <= 1'b1;
      end
    end
  end

  a_no_dispatch_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    (count <= ptr_t'(ROB_SIZE)));

endmodule
