// tb_integrating_renamer: end-to-end test of the integrating renamer at its default sizes
// (8-wide, 64 architectural registers, 128-entry ROB, 256-entry direct-mapped IT, 448
// physical registers).
//
// Phase 1 replays the worked example of the design (X = 0; Y = 1; if (Z == 0); X = 1;
// Y++; X++; W = Y * Y; Z = X * Y): all eight are renamed and completed, the branch is found
// mis-predicted, X = 1 .. Z = X * Y are squashed, and the re-traced Y++ .. Z = X * Y must
// integrate, not integrate, integrate, not integrate, re-using the squashed outputs.
//
// Phase 2 is a randomised run against a golden model. The testbench plays fetch and the
// execution core: it walks a static program of 600 instructions (ALU operations, loads,
// stores and branches over twelve registers and eight data addresses), mis-predicts some
// branches (fetching a few wrong-path instructions followed by the re-convergent region),
// forces some load-ordering squashes (the load itself excluded from the IT), and
// completes instructions after random delays. It keeps a value for every physical
// register, computed when an instruction is dispatched. An integrated instruction is
// checked at dispatch (the re-used register must hold what the instruction would compute
// from its current inputs; branch target and data address must match), and every commit
// is checked against an in-order architectural model (PC sequence and result value). At
// the end, with the ROB drained, every physical register must be either mapped, in the
// IT, or free. Each mechanism (integration, in-group dependent integration, recovery into
// the IT, eviction, store invalidation, input invalidation, non-completed recycling,
// excluded squash, integrated load/store/branch, rename stall) must occur at least once.
//
// The testbench presents each store's address on a snoop port when the store is fetched,
// and ends a fetch group after a store, so no load is renamed in the group of an older
// store; the memory ordering buffer that would catch that case is not modelled.
module tb_integrating_renamer;
  import ri_pkg::*;

  localparam int W   = DEF_WIDTH;
  localparam int NA  = DEF_NUM_ARCH;
  localparam int ROB = DEF_ROB_SIZE;
  localparam int ITS = DEF_IT_SIZE;
  localparam int NP  = DEF_NUM_PREGS;
  localparam int CP  = DEF_CPL_PORTS;
  localparam int SN  = DEF_SNOOP_PORTS;
  localparam int CB  = DEF_COMMIT_BW;
  localparam int P   = 600;          // static program length
  localparam int NALT = 64;          // wrong-path-only instructions
  localparam int TARGET_COMMITS = 30000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          fe_valid;
  fetch_insn_t   fe_insn [W];
  logic          fe_ready;
  renamed_insn_t disp [W];
  logic          cpl_en [CP];
  robidx_t       cpl_idx [CP];
  pc_t           cpl_jt [CP];
  addr_t         cpl_addr [CP];
  logic          sq_en, sq_excl, recovering;
  robidx_t       sq_idx;
  logic          sn_en [SN];
  addr_t         sn_addr [SN];
  commit_t       cmt [CB];
  logic [7:0]    ev_integrated, ev_allocated, ev_it_inserted, ev_it_evicted, ev_recovered_nc;
  logic [8:0]    ev_snoop_inv, ev_input_inv;
  logic          ev_stall;

  integrating_renamer dut (
    .clk, .rst_n, .fe_valid, .fe_insn, .fe_ready, .disp,
    .cpl_en, .cpl_idx, .cpl_jt, .cpl_addr, .sq_en, .sq_idx, .sq_excl, .recovering,
    .sn_en, .sn_addr, .cmt, .ev_integrated, .ev_allocated, .ev_it_inserted, .ev_it_evicted,
    .ev_snoop_inv, .ev_input_inv, .ev_recovered_nc, .ev_stall);

  int checks = 0;
  int failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ program model
  typedef struct {
    pc_t   pc;
    bit    s1v; areg_t s1;
    bit    s2v; areg_t s2;
    bit    dv;  areg_t d;
    bit    ld, st, br;
    addr_t addr;
  } sinsn_t;

  sinsn_t prog [P];
  sinsn_t alt  [NALT];

  function automatic sinsn_t gen(pc_t pc);
    sinsn_t s;
    int k = $urandom_range(0, 99);
    s = '{default: '0};
    s.pc  = pc;
    s.s1v = 1'b1;
    s.s1  = areg_t'($urandom_range(1, 12));
    s.s2v = ($urandom_range(0, 3) != 0);
    s.s2  = areg_t'($urandom_range(1, 12));
    s.addr = addr_t'(64'h8000 + 8 * $urandom_range(0, 7));
    if (k < 12) begin            // load: address register in s1
      s.ld = 1'b1; s.s2v = 1'b0; s.dv = 1'b1; s.d = areg_t'($urandom_range(1, 12));
    end else if (k < 20) begin   // store: address s1, data s2
      s.st = 1'b1; s.s2v = 1'b1;
    end else if (k < 32) begin   // conditional branch on s1
      s.br = 1'b1; s.s2v = 1'b0;
    end else begin
      s.dv = 1'b1; s.d = areg_t'($urandom_range(1, 12));
      if (k < 36) s.s1v = 1'b0;  // immediate move
    end
    return s;
  endfunction

  function automatic logic [63:0] alu(pc_t pc, logic [63:0] a, logic [63:0] b);
    return (a * 64'd3) + (b * 64'd5) + pc + 64'd17;
  endfunction

  function automatic pc_t br_target(pc_t pc, logic [63:0] a);
    return pc + 64'd8 + {58'd0, a[3:0], 2'b00};
  endfunction

  // ------------------------------------------------------------------ machine model
  logic [63:0] val  [NP];     // physical register values
  logic [63:0] arch [NA];     // architectural state at commit
  logic [63:0] memc [8];      // committed memory (eight doublewords)

  typedef struct {
    bit          v;
    bit          wrong;
    int          seq;
    sinsn_t      si;
    logic [63:0] stdata;
  } mir_t;
  mir_t mir [ROB];
  int   rob_head = 0;
  int   rob_tail = 0;
  int   seqno = 0;

  typedef struct { int idx; int seq; longint due; pc_t jt; addr_t addr; } pend_t;
  pend_t pend [$];

  pc_t exp_q [$];              // expected commit PCs (correct path)

  function automatic int aidx(addr_t a);
    return int'((a - 64'h8000) >> 3);
  endfunction

  function automatic logic [63:0] fwd_load(int idx, addr_t a);
    int k = idx;
    while (k != rob_head) begin
      k = (k + ROB - 1) % ROB;
      if (mir[k].v && mir[k].si.st && mir[k].si.addr == a) return mir[k].stdata;
    end
    return memc[aidx(a)];
  endfunction

  // event counters
  int n_integ = 0, n_integ_dep = 0, n_ins = 0, n_evict = 0, n_sinv = 0, n_iinv = 0;
  int n_nc = 0, n_excl = 0, n_int_ld = 0, n_int_st = 0, n_int_br = 0, n_stall = 0;
  int n_mispred = 0, n_commit = 0;

  always @(posedge clk) if (rst_n) begin
    n_integ  <= n_integ + int'(ev_integrated);
    n_ins    <= n_ins + int'(ev_it_inserted);
    n_evict  <= n_evict + int'(ev_it_evicted);
    n_sinv   <= n_sinv + int'(ev_snoop_inv);
    n_iinv   <= n_iinv + int'(ev_input_inv);
    n_nc     <= n_nc + int'(ev_recovered_nc);
    n_stall  <= n_stall + int'(ev_stall);
  end

  // ------------------------------------------------------------------ drive helpers
  task automatic idle_inputs();
    fe_valid = 1'b0;
    for (int s = 0; s < W; s++) fe_insn[s] = '0;
    for (int p = 0; p < CP; p++) begin
      cpl_en[p] = 1'b0; cpl_idx[p] = '0; cpl_jt[p] = '0; cpl_addr[p] = '0;
    end
    sq_en = 1'b0; sq_idx = '0; sq_excl = 1'b0;
    for (int p = 0; p < SN; p++) begin sn_en[p] = 1'b0; sn_addr[p] = '0; end
  endtask

  function automatic fetch_insn_t to_fetch(sinsn_t s);
    fetch_insn_t f;
    f = '0;
    f.valid = 1'b1; f.pc = s.pc;
    f.src1_v = s.s1v; f.src1 = s.s1;
    f.src2_v = s.s2v; f.src2 = s.s2;
    f.dst_v = s.dv; f.dst = s.d;
    f.is_load = s.ld; f.is_store = s.st; f.is_branch = s.br;
    return f;
  endfunction

  // ------------------------------------------------------------------ phase 1: worked example
  task automatic figure_example();
    sinsn_t ex [8];
    robidx_t idx [8];
    preg_t   pd_first [8];
    int got;
    // X, Y, Z, W in architectural registers 1..4
    for (int i = 0; i < 8; i++) ex[i] = '{default: '0};
    for (int i = 0; i < 8; i++) ex[i].pc = pc_t'(64'h4000 + 4 * i);
    ex[0].dv = 1; ex[0].d = 1;                                   // A1: X = 0
    ex[1].dv = 1; ex[1].d = 2;                                   // A2: Y = 1
    ex[2].br = 1; ex[2].s1v = 1; ex[2].s1 = 3;                   // A3: if (Z == 0)
    ex[3].dv = 1; ex[3].d = 1;                                   // A4: X = 1
    ex[4].dv = 1; ex[4].d = 2; ex[4].s1v = 1; ex[4].s1 = 2;      // A5: Y++
    ex[5].dv = 1; ex[5].d = 1; ex[5].s1v = 1; ex[5].s1 = 1;      // A6: X++
    ex[6].dv = 1; ex[6].d = 4; ex[6].s1v = 1; ex[6].s1 = 2; ex[6].s2v = 1; ex[6].s2 = 2; // A7
    ex[7].dv = 1; ex[7].d = 3; ex[7].s1v = 1; ex[7].s1 = 1; ex[7].s2v = 1; ex[7].s2 = 2; // A8
    @(negedge clk);
    idle_inputs();
    fe_valid = 1'b1;
    for (int s = 0; s < 8; s++) fe_insn[s] = to_fetch(ex[s]);
    #1;
    check(fe_ready, "example: first group accepted");
    @(negedge clk);
    idle_inputs();
    for (int s = 0; s < 8; s++) begin
      idx[s] = disp[s].rob_idx;
      pd_first[s] = disp[s].pd;
      check(disp[s].valid && !disp[s].integrated, "example: first pass allocates");
    end
    check(disp[4].p1 == pd_first[1], "example: A5 reads Y from A2");
    check(disp[7].p1 == pd_first[5] && disp[7].p2 == pd_first[4], "example: A8 routed inputs");
    // complete everything
    for (int s = 0; s < 8; s++) begin cpl_en[s] = 1'b1; cpl_idx[s] = idx[s]; end
    @(negedge clk);
    idle_inputs();
    // A3 mis-predicted: squash from A4
    sq_en = 1'b1; sq_idx = idx[3];
    @(negedge clk);
    idle_inputs();
    got = 0;
    while (recovering && got < 50) begin @(negedge clk); got++; end
    check(!recovering, "example: recovery ends");
    @(negedge clk);
    // re-trace A5..A8
    fe_valid = 1'b1;
    for (int s = 0; s < 4; s++) fe_insn[s] = to_fetch(ex[4 + s]);
    #1;
    check(fe_ready, "example: re-trace accepted");
    @(negedge clk);
    idle_inputs();
    check(disp[0].integrated && disp[0].pd == pd_first[4], "example: A5 integrated");
    check(!disp[1].integrated && disp[1].pd != pd_first[5], "example: A6 not integrated");
    check(disp[2].integrated && disp[2].pd == pd_first[6], "example: A7 integrated");
    check(!disp[3].integrated && disp[3].pd != pd_first[7], "example: A8 not integrated");
    check(disp[0].rob_idx == idx[3], "example: ROB slots reused after recovery");
    // integrated A5 and A7 depend only on registers valid after recovery
    check(disp[2].p1 == pd_first[4], "example: A7 reads integrated A5");
  endtask

  // ------------------------------------------------------------------ phase 2: random run
  typedef enum logic [1:0] { NORMAL, WRONG, WAITSQ, RESUME } fmode_e;
  fmode_e mode;
  sinsn_t wlist [$];
  int     cpos;
  bit     wexcl;
  int     first_wrong_idx;
  bit     first_wrong_seen;
  int     wrong_out;          // wrong-path instructions not yet seen on disp
  int     sq_delay;

  bit grp_wrong_q [$];          // per accepted group: fetched on a doomed path
  // The instruction whose resolution triggers the squash (mis-predicted branch, or the
  // violating load) is not completed before the squash, so nothing younger can retire.
  bit hold_branch = 0;
  bit have_held = 0;
  int held_idx = 0;

  task automatic on_dispatch();
    bit any = 0;
    bit gwrong = 0;
    for (int s = 0; s < W; s++) any |= disp[s].valid;
    if (any) begin
      check(grp_wrong_q.size() > 0, "dispatch matches an accepted group");
      if (grp_wrong_q.size() > 0) gwrong = grp_wrong_q.pop_front();
    end
    for (int s = 0; s < W; s++) begin
      if (disp[s].valid) begin
        int i = int'(disp[s].rob_idx);
        sinsn_t si;
        logic [63:0] a, b;
        bit wrong;
        bit hold_this;
        check(i == rob_tail, "dispatch in ROB order");
        rob_tail = (rob_tail + 1) % ROB;
        // identify the static instruction from the PC
        if (disp[s].pc >= 64'h100000) si = alt[int'((disp[s].pc - 64'h100000) >> 2)];
        else si = prog[int'((disp[s].pc - 64'h1000) >> 2)];
        wrong = gwrong;
        if (wrong && !first_wrong_seen) begin
          first_wrong_seen = 1; first_wrong_idx = i;
        end
        if (wrong) wrong_out--;
        mir[i] = '{v: 1'b1, wrong: wrong, seq: seqno, si: si, stdata: '0};
        seqno++;
        hold_this = 0;
        if ((!wrong && hold_branch && si.br) || (wrong && wexcl && first_wrong_idx == i)) begin
          if (!wrong) hold_branch = 0;
          if (disp[s].integrated) begin
            // resolved at rename: stop the doomed path at once
            wlist.delete();
            mode = WAITSQ;
            sq_delay = 0;
          end else begin
            hold_this = 1;
          end
        end
        a = si.s1v ? val[disp[s].p1] : 64'd0;
        b = si.s2v ? val[disp[s].p2] : 64'd0;
        if (disp[s].integrated) begin
          for (int j = 0; j < s; j++) begin
            if (disp[j].valid && disp[j].integrated && disp[j].dst_v &&
                ((si.s1v && disp[s].p1 == disp[j].pd) || (si.s2v && disp[s].p2 == disp[j].pd)))
              begin n_integ_dep++; break; end
          end
          if (si.ld) begin
            n_int_ld++;
            check(disp[s].mem_addr == si.addr, "integrated load address");
            check(val[disp[s].pd] == fwd_load(i, si.addr), "integrated load value");
          end else if (si.st) begin
            n_int_st++;
            check(disp[s].mem_addr == si.addr, "integrated store address");
            mir[i].stdata = b;
          end else if (si.br) begin
            n_int_br++;
            check(disp[s].jump_target == br_target(si.pc, a), "integrated branch target");
          end else begin
            check(val[disp[s].pd] == alu(si.pc, a, b), "integrated result value");
          end
        end else begin
          longint due = cycle + (si.st ? 1 : (si.ld && $urandom_range(0, 99) < 5) ? 80 : $urandom_range(1, 8));
          if (hold_this) begin
            due = 64'h7fff_ffff_ffff;
            have_held = 1;
            held_idx = i;
          end
          if (si.ld) val[disp[s].pd] = fwd_load(i, si.addr);
          else if (si.st) mir[i].stdata = b;
          else if (si.dv) val[disp[s].pd] = alu(si.pc, a, b);
          pend.push_back('{idx: i, seq: mir[i].seq, due: due,
                           jt: si.br ? br_target(si.pc, a) : '0,
                           addr: (si.ld || si.st) ? si.addr : '0});
        end
      end
    end
  endtask

  task automatic on_commit();
    for (int c = 0; c < CB; c++) begin
      if (cmt[c].valid) begin
        int i = int'(cmt[c].rob_idx);
        sinsn_t si = mir[i].si;
        logic [63:0] a, b, g;
        check(i == rob_head && mir[i].v && !mir[i].wrong, "commit from head, correct path");
        if (!(i == rob_head && mir[i].v && !mir[i].wrong))
          $display("  idx=%0d head=%0d v=%0d wrong=%0d pc=%h exp=%h", i, rob_head, mir[i].v,
                   mir[i].wrong, cmt[c].pc, exp_q.size() > 0 ? exp_q[0] : '0);
        check(exp_q.size() > 0 && exp_q[0] == cmt[c].pc, "commit PC sequence");
        if (exp_q.size() > 0) void'(exp_q.pop_front());
        a = si.s1v ? arch[si.s1] : 64'd0;
        b = si.s2v ? arch[si.s2] : 64'd0;
        if (si.ld) begin
          g = memc[aidx(si.addr)];
          check(val[cmt[c].pd] == g, "committed load value");
          arch[si.d] = g;
        end else if (si.st) begin
          memc[aidx(si.addr)] = b;
        end else if (si.dv) begin
          g = alu(si.pc, a, b);
          check(val[cmt[c].pd] == g, "committed result value");
          arch[si.d] = g;
        end
        mir[i].v = 1'b0;
        rob_head = (rob_head + 1) % ROB;
        n_commit++;
      end
    end
  endtask

  task automatic drive_completions();
    int used = 0;
    pend_t keep [$];
    foreach (pend[k]) begin
      if (!mir[pend[k].idx].v || mir[pend[k].idx].seq != pend[k].seq) continue;
      if (used < CP && pend[k].due <= cycle) begin
        cpl_en[used] = 1'b1; cpl_idx[used] = robidx_t'(pend[k].idx);
        cpl_jt[used] = pend[k].jt; cpl_addr[used] = pend[k].addr;
        used++;
      end else keep.push_back(pend[k]);
    end
    pend = keep;
  endtask

  task automatic do_squash();
    int k = first_wrong_idx;
    sq_en = 1'b1; sq_idx = robidx_t'(first_wrong_idx); sq_excl = wexcl;
    if (wexcl) n_excl++;
    if (have_held) begin
      foreach (pend[q]) if (pend[q].idx == held_idx) pend[q].due = cycle;
      have_held = 0;
    end
    n_mispred++;
    while (k != rob_tail) begin
      mir[k].v = 1'b0;
      k = (k + 1) % ROB;
    end
    rob_tail = first_wrong_idx;
  endtask

  task automatic fetch_group();
    fetch_insn_t g [W];
    sinsn_t      gs [W];
    int n = 0;
    int limit = $urandom_range(1, W);
    int taken_from_wlist = 0;
    int ncpos = cpos;
    bit go_wrong = 0, load_sq = 0;
    sinsn_t nxt;
    for (int s = 0; s < W; s++) g[s] = '0;
    while (n < limit) begin
      if (mode == WRONG) begin
        if (taken_from_wlist >= wlist.size()) break;
        nxt = wlist[taken_from_wlist];
      end else begin
        nxt = prog[ncpos];
        // occasionally treat a load as violating memory order: fetch it and what follows
        // as a doomed path and squash from the load itself
        if (nxt.ld && n == 0 && $urandom_range(0, 99) < 12) begin
          load_sq = 1; break;
        end
      end
      gs[n] = nxt; g[n] = to_fetch(nxt); n++;
      if (mode == WRONG) taken_from_wlist++;
      else ncpos = (ncpos + 1) % P;
      if (nxt.st) break;
      if (nxt.br) begin
        if (mode != WRONG && $urandom_range(0, 99) < 40) go_wrong = 1;
        break;
      end
    end
    if (load_sq) begin
      int r = $urandom_range(1, 20);
      wlist.delete();
      for (int k = 0; k < r; k++) wlist.push_back(prog[(cpos + k) % P]);
      mode = WRONG; wexcl = 1; first_wrong_seen = 0; wrong_out = 0;
      return;
    end
    if (n == 0) return;
    fe_valid = 1'b1;
    for (int s = 0; s < W; s++) fe_insn[s] = g[s];
    for (int s = 0; s < n; s++) if (gs[s].st) begin sn_en[0] = 1'b1; sn_addr[0] = gs[s].addr; end
    #1;
    if (fe_ready) begin
      grp_wrong_q.push_back(mode == WRONG);
      if (mode == WRONG) begin
        for (int k = 0; k < n; k++) void'(wlist.pop_front());
        wrong_out += n;
        if (wlist.size() == 0) begin mode = WAITSQ; sq_delay = $urandom_range(0, 12); end
      end else begin
        for (int s = 0; s < n; s++) exp_q.push_back(gs[s].pc);
        cpos = ncpos;
        if (go_wrong) begin
          int x = $urandom_range(1, 3);
          int r = $urandom_range(2, 28);
          int a0 = $urandom_range(0, NALT - 1);
          wlist.delete();
          for (int k = 0; k < x; k++) wlist.push_back(alt[(a0 + k) % NALT]);
          for (int k = 0; k < r; k++) wlist.push_back(prog[(cpos + k) % P]);
          mode = WRONG; wexcl = 0; first_wrong_seen = 0; wrong_out = 0;
          hold_branch = 1;
        end
      end
    end else begin
      // not taken: the group stays offered (fe_valid high) but its store is not yet known
      for (int p = 0; p < SN; p++) sn_en[p] = 1'b0;
    end
  endtask

  task automatic random_run();
    int resume_wait = 0;
    for (int r = 0; r < NA; r++) begin val[r] = 64'(r) * 64'd1000; arch[r] = val[r]; end
    for (int r = NA; r < NP; r++) val[r] = '0;
    for (int k = 0; k < 8; k++) memc[k] = 64'(k) * 64'd77;
    for (int i = 0; i < P; i++) prog[i] = gen(pc_t'(64'h1000 + 4 * i));
    for (int i = 0; i < NALT; i++) alt[i] = gen(pc_t'(64'h100000 + 4 * i));
    for (int i = 0; i < ROB; i++) mir[i].v = 1'b0;
    rob_head = 0; rob_tail = 0; cpos = 0; mode = NORMAL;
    exp_q.delete(); pend.delete(); grp_wrong_q.delete();
    while (n_commit < TARGET_COMMITS || mode != NORMAL) begin
      @(negedge clk);
      idle_inputs();
      on_dispatch();
      if (mode == WAITSQ && wrong_out == 0) begin
        if (sq_delay > 0) sq_delay--;
        else if (first_wrong_seen) begin
          do_squash(); mode = RESUME; resume_wait = 2;
        end else mode = NORMAL;
      end
      #1;                    // commit reports reflect a squash request of this cycle
      on_commit();
      drive_completions();
      if (mode == RESUME) begin
        if (!recovering && !sq_en) begin
          if (resume_wait > 0) resume_wait--; else mode = NORMAL;
        end
      end else if (!sq_en && (mode == NORMAL || mode == WRONG)) begin
        fetch_group();
      end
    end
    // drain: stop fetching, complete everything, let it commit
    mode = RESUME;
    repeat (400) begin
      @(negedge clk);
      idle_inputs();
      on_dispatch();
      on_commit();
      drive_completions();
    end
  endtask

  int held;
  initial begin
    idle_inputs();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    figure_example();
    // restart for the random run
    @(negedge clk);
    rst_n = 1'b0;
    idle_inputs();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    n_integ = 0;
    random_run();
    check(rob_head == rob_tail, "ROB drained");
    check(exp_q.size() == 0, "all correct-path instructions committed");
    // register accounting: mapped + held by the IT + free = all
    held = 0;
    for (int e = 0; e < ITS; e++)
      if (dut.u_it.mem_q[e].valid && dut.u_it.mem_q[e].o_v) held++;
    check(int'(dut.u_fl.free_count) + held + NA == NP, "no physical register leaked");
    $display("events: commits=%0d integrated=%0d dep_integrated=%0d it_inserts=%0d evictions=%0d",
             n_commit, n_integ, n_integ_dep, n_ins, n_evict);
    $display("events: store_inv=%0d input_inv=%0d recycled_nc=%0d excl_squash=%0d squashes=%0d",
             n_sinv, n_iinv, n_nc, n_excl, n_mispred);
    $display("events: int_loads=%0d int_stores=%0d int_branches=%0d stall_cycles=%0d",
             n_int_ld, n_int_st, n_int_br, n_stall);
    check(n_integ > 0, "mechanism: integration");
    check(n_integ_dep > 0, "mechanism: in-group dependent integration");
    check(n_ins > 0, "mechanism: IT insertion on recovery");
    check(n_evict > 0, "mechanism: IT eviction");
    check(n_sinv > 0, "mechanism: store invalidation");
    check(n_iinv > 0, "mechanism: input-register invalidation");
    check(n_nc > 0, "mechanism: non-completed squashed register recycled");
    check(n_excl > 0, "mechanism: excluded load squash");
    check(n_int_ld > 0, "mechanism: integrated load");
    check(n_int_st > 0, "mechanism: integrated store");
    check(n_int_br > 0, "mechanism: integrated branch");
    check(n_stall > 0, "mechanism: rename stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
