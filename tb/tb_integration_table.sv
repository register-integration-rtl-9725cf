// tb_integration_table: randomised check of the integration table against a model.
//
// Each cycle the testbench looks up WIDTH random PCs (from 600 static PCs, so entries
// collide in the 256-entry direct-mapped table), removes some of the entries that hit,
// inserts up to RECOVER_BW squashed instructions (loads, stores and others), snoops store
// addresses and marks random registers as released. The model applies the same rules in
// the documented order (removal wins; snoop and input invalidation release O; inserts in
// port order evict what they displace and an inserted store invalidates matching loads)
// and the lookup results, hit flags and released-register mask are compared every cycle.
// Counts of evictions, snoop invalidations and input invalidations must each be non-zero.
module tb_integration_table;
  import ri_pkg::*;

  localparam int ITS = DEF_IT_SIZE;
  localparam int W   = DEF_WIDTH;
  localparam int RB  = DEF_RECOVER_BW;
  localparam int SN  = DEF_SNOOP_PORTS;
  localparam int NP  = DEF_NUM_PREGS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pc_t       lk_pc [W];
  it_entry_t lk_ent [W];
  logic      lk_hit [W];
  logic      rm_en [W];
  pc_t       rm_pc [W];
  logic      ins_en [RB];
  it_entry_t ins_ent [RB];
  logic      sn_en [SN];
  addr_t     sn_addr [SN];
  logic [NP-1:0] inv_mask, free_mask;
  logic [$clog2(RB+1)-1:0]  n_evict;
  logic [$clog2(ITS+1)-1:0] n_snoop_inv, n_input_inv;

  integration_table dut (.clk, .rst_n, .lk_pc, .lk_ent, .lk_hit, .rm_en, .rm_pc,
                         .ins_en, .ins_ent, .sn_en, .sn_addr, .inv_mask, .free_mask,
                         .n_evict, .n_snoop_inv, .n_input_inv);

  int checks = 0, failures = 0;
  int tot_evict = 0, tot_sinv = 0, tot_iinv = 0, tot_hit = 0;
  it_entry_t model [ITS];

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ix(pc_t pc);
    return int'(pc[9:2]);
  endfunction

  function automatic bit same_granule(addr_t a, addr_t b);
    return a[63:3] == b[63:3];
  endfunction

  function automatic pc_t rpc();
    return pc_t'(64'h2000 + 4 * $urandom_range(0, 599));
  endfunction

  function automatic it_entry_t rent();
    it_entry_t e;
    int k = $urandom_range(0, 9);
    e = '0;
    e.valid = 1'b1;
    e.pc = rpc();
    e.i1_v = ($urandom_range(0, 4) != 0); e.i1 = preg_t'($urandom_range(0, NP - 1));
    e.i2_v = ($urandom_range(0, 1) != 0); e.i2 = preg_t'($urandom_range(0, NP - 1));
    e.is_load = (k < 3); e.is_store = (k == 3 || k == 4); e.is_branch = (k == 5);
    e.o_v = !e.is_store && !e.is_branch;
    e.o = preg_t'($urandom_range(0, NP - 1));
    e.mem_addr = addr_t'(64'h9000 + 8 * $urandom_range(0, 15) + $urandom_range(0, 7));
    e.jump_target = {$urandom, $urandom};
    return e;
  endfunction

  initial begin
    logic [NP-1:0] want_free;
    it_entry_t nxt [ITS];
    bit sh, ih;
    for (int e = 0; e < ITS; e++) model[e] = '0;
    for (int s = 0; s < W; s++) begin lk_pc[s] = '0; rm_en[s] = 0; rm_pc[s] = '0; end
    for (int k = 0; k < RB; k++) begin ins_en[k] = 0; ins_ent[k] = '0; end
    for (int p = 0; p < SN; p++) begin sn_en[p] = 0; sn_addr[p] = '0; end
    inv_mask = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      // stimulus
      for (int s = 0; s < W; s++) begin
        // look up PCs that are likely present half of the time
        if ($urandom_range(0, 1) == 0) lk_pc[s] = model[$urandom_range(0, ITS - 1)].pc;
        else lk_pc[s] = rpc();
        rm_pc[s] = lk_pc[s];
        rm_en[s] = 1'b0;
      end
      for (int k = 0; k < RB; k++) begin
        ins_en[k]  = (it % 4 == 0) ? ($urandom_range(0, 3) != 0) : 1'b0;
        ins_ent[k] = rent();
      end
      for (int p = 0; p < SN; p++) begin
        sn_en[p]   = ($urandom_range(0, 9) == 0);
        sn_addr[p] = addr_t'(64'h9000 + 8 * $urandom_range(0, 15));
      end
      inv_mask = '0;
      if ($urandom_range(0, 3) == 0) inv_mask[$urandom_range(0, NP - 1)] = 1'b1;
      #1;
      // compare lookups; remove some hits (one removal per index)
      for (int s = 0; s < W; s++) begin
        automatic it_entry_t m = model[ix(lk_pc[s])];
        automatic bit mh = m.valid && (m.pc == lk_pc[s]);
        chk(lk_hit[s] == mh, "lookup hit");
        if (mh) begin
          tot_hit++;
          chk(lk_ent[s] == m, "lookup entry");
          if ($urandom_range(0, 2) == 0) begin
            automatic bit dup = 0;
            for (int j = 0; j < s; j++) if (rm_en[j] && ix(rm_pc[j]) == ix(lk_pc[s])) dup = 1;
            if (!dup) rm_en[s] = 1'b1;
          end
        end
      end
      // model the cycle
      want_free = '0;
      for (int e = 0; e < ITS; e++) nxt[e] = model[e];
      for (int e = 0; e < ITS; e++) begin
        automatic bit rmv = 0;
        for (int s = 0; s < W; s++) if (rm_en[s] && ix(rm_pc[s]) == e) rmv = 1;
        sh = 0;
        for (int p = 0; p < SN; p++)
          if (sn_en[p] && model[e].is_load && same_granule(model[e].mem_addr, sn_addr[p])) sh = 1;
        ih = (model[e].i1_v && inv_mask[model[e].i1]) || (model[e].i2_v && inv_mask[model[e].i2]);
        if (rmv) nxt[e].valid = 0;
        else if (model[e].valid && (sh || ih)) begin
          nxt[e].valid = 0;
          if (model[e].o_v) want_free[model[e].o] = 1;
          if (sh) tot_sinv++; else tot_iinv++;
        end
      end
      for (int k = 0; k < RB; k++) if (ins_en[k]) begin
        automatic int e = ix(ins_ent[k].pc);
        if (nxt[e].valid) begin
          if (nxt[e].o_v) want_free[nxt[e].o] = 1;
          tot_evict++;
        end
        nxt[e] = ins_ent[k];
        if (ins_ent[k].is_store)
          for (int q = 0; q < ITS; q++)
            if (nxt[q].valid && nxt[q].is_load && same_granule(nxt[q].mem_addr, ins_ent[k].mem_addr)) begin
              nxt[q].valid = 0;
              if (nxt[q].o_v) want_free[nxt[q].o] = 1;
              tot_sinv++;
            end
      end
      #1;
      chk(free_mask == want_free, "released registers");
      @(posedge clk);
      for (int e = 0; e < ITS; e++) model[e] = nxt[e];
    end
    chk(tot_hit > 0, "lookups hit");
    chk(tot_evict > 0, "evictions happened");
    chk(tot_sinv > 0, "store invalidations happened");
    chk(tot_iinv > 0, "input invalidations happened");
    $display("hits=%0d evictions=%0d store_inv=%0d input_inv=%0d", tot_hit, tot_evict, tot_sinv, tot_iinv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
