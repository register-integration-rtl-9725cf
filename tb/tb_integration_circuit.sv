// tb_integration_circuit: checks the parallel (super-scalar) integration circuit against a
// serial, one-instruction-at-a-time renamer.
//
// The reference renames the group in program order on a private copy of the map: it reads
// each input from the copy, integrates when the IT candidate for the PC names exactly those
// inputs (and the same input/output shape) and has not been taken by an earlier slot, and
// then writes the chosen output into the copy. This is the scalar algorithm of Figure 3
// applied N times in sequence; the circuit must reach the same decisions in parallel.
//
// Groups are random over six architectural registers (dense in-group dependences). IT
// candidates are built from the same serial walk so that chains of integrable
// instructions occur, then some are corrupted. Fresh registers come from a range the map
// and the IT never name, as the free list guarantees. The first group is the worked
// example (Y++; X++; W = Y * Y; Z = X * Y), which must give integrate / allocate /
// integrate / allocate.
module tb_integration_circuit;
  import ri_pkg::*;

  localparam int W   = DEF_WIDTH;
  localparam int ITS = DEF_IT_SIZE;

  fetch_insn_t insn [W];
  preg_t map_p1 [W], map_p2 [W], map_old [W];
  it_entry_t it_ent [W];
  logic it_hit [W];
  preg_t cand [W];
  preg_t p1 [W], p2 [W], pd [W], old_pd [W];
  logic integ [W];
  logic [$clog2(W+1)-1:0] alloc_cnt;

  integration_circuit dut (.insn, .map_p1, .map_p2, .map_old, .it_ent, .it_hit, .cand,
                           .p1, .p2, .pd, .old_pd, .integ, .alloc_cnt);

  int checks = 0, failures = 0;
  int n_int = 0, n_dep_int = 0, n_noint_hit = 0;
  preg_t map [8];

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // serial reference over the current stimulus
  task automatic reference_and_compare();
    preg_t m [8];
    bit    taken [ITS];
    int    na = 0;
    bit    r_int [W];
    preg_t r_pd [W];
    for (int r = 0; r < 8; r++) m[r] = map[r];
    for (int e = 0; e < ITS; e++) taken[e] = 0;
    for (int i = 0; i < W; i++) begin
      preg_t a1 = m[insn[i].src1];
      preg_t a2 = m[insn[i].src2];
      preg_t od = m[insn[i].dst];
      int e = int'(insn[i].pc[9:2]);
      bit ok = insn[i].valid && it_hit[i] && !taken[e] &&
               it_ent[i].i1_v == insn[i].src1_v && it_ent[i].i2_v == insn[i].src2_v &&
               it_ent[i].o_v == insn[i].dst_v &&
               (!insn[i].src1_v || it_ent[i].i1 == a1) &&
               (!insn[i].src2_v || it_ent[i].i2 == a2);
      r_int[i] = ok;
      if (ok) begin
        taken[e] = 1;
        r_pd[i] = it_ent[i].o;
      end else if (insn[i].valid && insn[i].dst_v) begin
        r_pd[i] = cand[na]; na++;
      end else r_pd[i] = '0;
      if (insn[i].valid) begin
        chk(integ[i] == ok, $sformatf("slot %0d integrate decision", i));
        if (insn[i].dst_v) begin
          chk(pd[i] == r_pd[i], $sformatf("slot %0d output", i));
          chk(old_pd[i] == od, $sformatf("slot %0d old mapping", i));
        end
        if (insn[i].src1_v) chk(p1[i] == a1, $sformatf("slot %0d input 1", i));
        if (insn[i].src2_v) chk(p2[i] == a2, $sformatf("slot %0d input 2", i));
        if (ok) n_int++;
        if (ok && insn[i].src1_v) for (int j = 0; j < i; j++)
          if (r_int[j] && insn[j].dst_v && insn[j].dst == insn[i].src1) n_dep_int++;
        if (!ok && it_hit[i]) n_noint_hit++;
      end
      if (insn[i].valid && insn[i].dst_v) m[insn[i].dst] = r_pd[i];
    end
    chk(int'(alloc_cnt) == na, "allocation count");
  endtask

  task automatic drive_map_reads();
    for (int s = 0; s < W; s++) begin
      map_p1[s]  = map[insn[s].src1];
      map_p2[s]  = map[insn[s].src2];
      map_old[s] = map[insn[s].dst];
    end
  endtask

  initial begin
    // ---- worked example: Y++, X++, W = Y * Y, Z = X * Y after recovery
    // X=1, Y=2, Z=3, W=4; map X->50, Y->51, Z->48, W->49
    map[0] = 0; map[1] = 50; map[2] = 51; map[3] = 48; map[4] = 49;
    map[5] = 5; map[6] = 6; map[7] = 7;
    for (int s = 0; s < W; s++) begin
      insn[s] = '0; it_ent[s] = '0; it_hit[s] = 0; cand[s] = preg_t'(400 + s);
    end
    cand[0] = 57; cand[1] = 58;
    insn[0] = '{valid:1, pc:64'h4010, src1_v:1, src1:2, src2_v:0, src2:0, dst_v:1, dst:2, default:0};
    insn[1] = '{valid:1, pc:64'h4014, src1_v:1, src1:1, src2_v:0, src2:0, dst_v:1, dst:1, default:0};
    insn[2] = '{valid:1, pc:64'h4018, src1_v:1, src1:2, src2_v:1, src2:2, dst_v:1, dst:4, default:0};
    insn[3] = '{valid:1, pc:64'h401c, src1_v:1, src1:1, src2_v:1, src2:2, dst_v:1, dst:3, default:0};
    it_ent[0] = '{valid:1, pc:64'h4010, i1_v:1, i1:51, o_v:1, o:53, default:0};
    it_ent[1] = '{valid:1, pc:64'h4014, i1_v:1, i1:52, o_v:1, o:54, default:0};
    it_ent[2] = '{valid:1, pc:64'h4018, i1_v:1, i1:53, i2_v:1, i2:53, o_v:1, o:55, default:0};
    it_ent[3] = '{valid:1, pc:64'h401c, i1_v:1, i1:54, i2_v:1, i2:53, o_v:1, o:56, default:0};
    for (int s = 0; s < 4; s++) it_hit[s] = 1;
    drive_map_reads();
    #1;
    chk(integ[0] && pd[0] == 53, "example: Y++ integrates 53");
    chk(!integ[1] && pd[1] == 57, "example: X++ allocates 57");
    chk(integ[2] && pd[2] == 55, "example: W = Y * Y integrates 55");
    chk(!integ[3] && pd[3] == 58, "example: Z = X * Y allocates 58");
    reference_and_compare();

    // ---- random groups
    for (int it = 0; it < 20000; it++) begin
      preg_t m [8];
      for (int r = 0; r < 8; r++) map[r] = preg_t'($urandom_range(0, 63));
      for (int r = 0; r < 8; r++) m[r] = map[r];
      for (int s = 0; s < W; s++) cand[s] = preg_t'(400 + 5 * s + $urandom_range(0, 4));
      for (int s = 0; s < W; s++) begin
        insn[s] = '0;
        insn[s].valid  = ($urandom_range(0, 7) != 0);
        insn[s].pc     = pc_t'(64'h3000 + 4 * $urandom_range(0, 11));
        insn[s].src1_v = ($urandom_range(0, 5) != 0); insn[s].src1 = areg_t'($urandom_range(0, 5));
        insn[s].src2_v = ($urandom_range(0, 1) != 0); insn[s].src2 = areg_t'($urandom_range(0, 5));
        insn[s].dst_v  = ($urandom_range(0, 5) != 0); insn[s].dst  = areg_t'($urandom_range(0, 5));
        // candidate built from a serial walk where earlier slots "integrated"
        it_ent[s] = '0;
        it_ent[s].valid = 1;
        it_ent[s].pc = insn[s].pc;
        it_ent[s].i1_v = insn[s].src1_v; it_ent[s].i1 = m[insn[s].src1];
        it_ent[s].i2_v = insn[s].src2_v; it_ent[s].i2 = m[insn[s].src2];
        it_ent[s].o_v  = insn[s].dst_v;  it_ent[s].o  = preg_t'(100 + 20 * s + $urandom_range(0, 19));
        case ($urandom_range(0, 9))
          0: it_ent[s].i1 = preg_t'($urandom_range(0, 99));
          1: it_ent[s].i2 = preg_t'($urandom_range(0, 99));
          2: it_ent[s].o_v = !it_ent[s].o_v;
          3: it_ent[s].pc = it_ent[s].pc + 64'h400;  // same index, other tag
          default: ;
        endcase
        it_hit[s] = it_ent[s].valid && it_ent[s].pc == insn[s].pc && ($urandom_range(0, 9) != 0);
        // a shared direct-mapped entry: slots with the same PC see the same entry
        for (int j = 0; j < s; j++) if (insn[j].pc == insn[s].pc) begin
          it_ent[s] = it_ent[j]; it_hit[s] = it_hit[j];
        end
        if (insn[s].valid && insn[s].dst_v && ($urandom_range(0, 1) == 0)) m[insn[s].dst] = it_ent[s].o;
        else if (insn[s].valid && insn[s].dst_v) m[insn[s].dst] = preg_t'(300 + s);
      end
      drive_map_reads();
      #1;
      reference_and_compare();
    end
    chk(n_int > 0 && n_dep_int > 0 && n_noint_hit > 0, "integration, dependent integration and rejection all seen");
    $display("integrated=%0d dependent=%0d rejected_hits=%0d", n_int, n_dep_int, n_noint_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
