// tb_reorder_buffer: randomised check of the instruction ordering buffer against a model.
//
// The testbench dispatches groups (some entries already complete, as integrated
// instructions are), completes entries at random, and now and then requests a squash at a
// random in-flight instruction, with or without excluding that instruction from the IT;
// during a recovery it sometimes requests a second, older squash point. Each cycle it
// compares the commit reports, the recovery outputs (map restores, IT entries and their
// contents, youngest first, RECOVER_BW per cycle), the released-register mask (old
// mappings at commit, outputs of non-completed squashed instructions), the tail index,
// the free-slot count and the recovering flag with a sequence-numbered model. Default
// sizes; the recovery bandwidth of 8 per cycle is checked by the per-cycle comparison.
module tb_reorder_buffer;
  import ri_pkg::*;

  localparam int ROB = DEF_ROB_SIZE;
  localparam int W   = DEF_WIDTH;
  localparam int CB  = DEF_COMMIT_BW;
  localparam int RB  = DEF_RECOVER_BW;
  localparam int CP  = DEF_CPL_PORTS;
  localparam int NP  = DEF_NUM_PREGS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic disp_en [W]; rob_entry_t disp_ent [W];
  robidx_t tail_idx;
  logic [$clog2(ROB+1)-1:0] free_slots;
  logic cpl_en [CP]; robidx_t cpl_idx [CP]; pc_t cpl_jt [CP]; addr_t cpl_addr [CP];
  logic sq_en, sq_excl, recovering; robidx_t sq_idx;
  logic rc_en [RB]; areg_t rc_areg [RB]; preg_t rc_preg [RB];
  logic ins_en [RB]; it_entry_t ins_ent [RB];
  commit_t cmt [CB];
  logic [NP-1:0] free_mask;
  logic [$clog2(RB+1)-1:0] n_recovered_nc;

  reorder_buffer dut (.clk, .rst_n, .disp_en, .disp_ent, .tail_idx, .free_slots,
                      .cpl_en, .cpl_idx, .cpl_jt, .cpl_addr, .sq_en, .sq_idx, .sq_excl,
                      .recovering, .rc_en, .rc_areg, .rc_preg, .ins_en, .ins_ent, .cmt,
                      .free_mask, .n_recovered_nc);

  int checks = 0, failures = 0;
  int n_commits = 0, n_squash = 0, n_nested = 0, n_ins = 0, n_nc = 0, max_rec_cycle = 0;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model, by absolute sequence number
  rob_entry_t ent [ROB];
  int head = 0, tail = 0, stop = 0;
  bit rec = 0, excl = 0;
  int excl_seq = 0;

  function automatic rob_entry_t rent();
    rob_entry_t e;
    e = '0;
    e.pc = {$urandom, $urandom};
    e.p1_v = $urandom_range(0, 1); e.p1 = preg_t'($urandom_range(0, NP - 1));
    e.p2_v = $urandom_range(0, 1); e.p2 = preg_t'($urandom_range(0, NP - 1));
    e.dst_v = ($urandom_range(0, 4) != 0); e.dst = areg_t'($urandom_range(0, 63));
    e.pd = preg_t'($urandom_range(0, NP - 1)); e.old_pd = preg_t'($urandom_range(0, NP - 1));
    e.is_load = ($urandom_range(0, 4) == 0); e.is_store = !e.is_load && ($urandom_range(0, 5) == 0);
    e.is_branch = !e.is_load && !e.is_store && ($urandom_range(0, 4) == 0);
    e.completed = ($urandom_range(0, 4) == 0);
    if (e.completed) begin e.jump_target = {$urandom, $urandom}; e.mem_addr = {$urandom, $urandom}; end
    return e;
  endfunction

  initial begin
    int sq_pos;
    logic [NP-1:0] want_free;
    for (int s = 0; s < W; s++) begin disp_en[s] = 0; disp_ent[s] = '0; end
    for (int p = 0; p < CP; p++) begin cpl_en[p] = 0; cpl_idx[p] = '0; cpl_jt[p] = '0; cpl_addr[p] = '0; end
    sq_en = 0; sq_idx = '0; sq_excl = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 12000; it++) begin
      bit rec0;
      automatic int ncmt = 0, nrec = 0;
      @(negedge clk);
      // ---- stimulus
      for (int s = 0; s < W; s++) disp_en[s] = 0;
      for (int p = 0; p < CP; p++) cpl_en[p] = 0;
      sq_en = 0; sq_excl = 0;
      sq_pos = -1;
      if (!rec && tail > head && $urandom_range(0, 99) < 4) begin
        sq_pos = $urandom_range(head, tail - 1);
      end else if (rec && stop > head && $urandom_range(0, 99) < 10) begin
        sq_pos = $urandom_range(head, stop - 1);   // older point during recovery
        n_nested++;
      end
      if (sq_pos >= 0) begin
        sq_en = 1; sq_idx = robidx_t'(sq_pos % ROB); sq_excl = $urandom_range(0, 1);
        n_squash++;
      end
      if (!rec && sq_pos < 0 && (ROB - (tail - head)) >= W && $urandom_range(0, 2) != 0) begin
        for (int s = 0; s < W; s++) begin
          disp_en[s] = ($urandom_range(0, 3) != 0);
          disp_ent[s] = rent();
        end
      end
      begin
        automatic int lim = rec ? stop : tail;
        for (int p = 0; p < CP; p++) if (lim > head && $urandom_range(0, 1) == 0) begin
          automatic int q = $urandom_range(head, lim - 1);
          automatic bit dup = 0;
          for (int j = 0; j < p; j++) if (cpl_en[j] && cpl_idx[j] == robidx_t'(q % ROB)) dup = 1;
          if (!dup) begin
            cpl_en[p] = 1; cpl_idx[p] = robidx_t'(q % ROB);
            cpl_jt[p] = {$urandom, $urandom}; cpl_addr[p] = {$urandom, $urandom};
          end
        end
      end
      #1;
      // ---- expected outputs
      want_free = '0;
      chk(recovering == rec, "recovering flag");
      chk(tail_idx == robidx_t'(tail % ROB), "tail index");
      chk(int'(free_slots) == ROB - (tail - head), "free slots");
      for (int c = 0; c < CB; c++) begin
        automatic int pos = head + c;
        automatic bit can = (c == ncmt) && pos != tail && !(rec && pos == stop) &&
                  !(sq_en && pos == sq_pos) && ent[pos % ROB].completed;
        chk(cmt[c].valid == can, "commit valid");
        if (can) begin
          automatic rob_entry_t e = ent[pos % ROB];
          chk(cmt[c].pc == e.pc && cmt[c].pd == e.pd && cmt[c].old_pd == e.old_pd &&
              cmt[c].dst_v == e.dst_v && cmt[c].dst == e.dst &&
              cmt[c].rob_idx == robidx_t'(pos % ROB), "commit contents");
          if (e.dst_v) want_free[e.old_pd] = 1;
          ncmt++;
        end
      end
      for (int k = 0; k < RB; k++) begin
        automatic int pos = tail - 1 - k;
        automatic bit act = rec && (k == nrec) && (tail - k != stop);
        automatic rob_entry_t e = ent[((pos % ROB) + ROB) % ROB];
        automatic bit ins = act && e.completed && !(excl && pos == excl_seq);
        chk(rc_en[k] == (act && e.dst_v), "restore enable");
        if (act && e.dst_v) chk(rc_areg[k] == e.dst && rc_preg[k] == e.old_pd, "restore contents");
        chk(ins_en[k] == ins, "IT insert enable");
        if (ins) begin
          chk(ins_ent[k].pc == e.pc && ins_ent[k].i1_v == e.p1_v && ins_ent[k].i1 == e.p1 &&
              ins_ent[k].i2_v == e.p2_v && ins_ent[k].i2 == e.p2 && ins_ent[k].o_v == e.dst_v &&
              ins_ent[k].o == e.pd && ins_ent[k].jump_target == e.jump_target &&
              ins_ent[k].mem_addr == e.mem_addr && ins_ent[k].is_load == e.is_load &&
              ins_ent[k].is_store == e.is_store && ins_ent[k].valid, "IT entry contents");
          n_ins++;
        end
        if (act && !ins) begin
          if (e.dst_v) want_free[e.pd] = 1;
          n_nc++;
        end
        if (act) nrec++;
      end
      if (nrec > max_rec_cycle) max_rec_cycle = nrec;
      chk(free_mask == want_free, "released registers");
      // ---- model update at the edge
      rec0 = rec;
      @(posedge clk);
      for (int p = 0; p < CP; p++) if (cpl_en[p]) begin
        ent[cpl_idx[p]].completed = 1;
        ent[cpl_idx[p]].jump_target = cpl_jt[p];
        ent[cpl_idx[p]].mem_addr = cpl_addr[p];
      end
      head += ncmt;
      n_commits += ncmt;
      if (rec) begin
        tail -= nrec;
        if (tail == stop) rec = 0;
      end else begin
        for (int s = 0; s < W; s++) if (disp_en[s]) begin ent[tail % ROB] = disp_ent[s]; tail++; end
      end
      if (sq_en) begin
        if (!rec0 || sq_pos < stop) begin
          stop = sq_pos; excl = sq_excl; excl_seq = sq_pos;
        end
        if (!rec0 && sq_pos != tail) rec = 1;
        if (rec0) rec = 1;
      end
    end
    chk(n_commits > 1000 && n_squash > 50 && n_nested > 0 && n_ins > 0 && n_nc > 0,
        "commits, squashes, nested squashes, IT entries and recycled outputs all seen");
    chk(max_rec_cycle == RB, "recovery reaches its full bandwidth");
    $display("commits=%0d squashes=%0d nested=%0d it_entries=%0d recycled=%0d",
             n_commits, n_squash, n_nested, n_ins, n_nc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
