// integration_circuit: super-scalar input routing, integration test and output selection
// for one rename group (purely combinational).
//
// For every slot i of the group, in program order:
//   input routing     each logical input takes the map-table mapping, unless an earlier
//                     slot j of the group writes that register; then it takes slot j's
//                     output register (the last such j wins).
//   integration test  the IT entry found for the slot's PC (looked up in parallel with the
//                     map table) is a candidate. It integrates when its inputs equal the
//                     slot's routed inputs: for an input with no in-group producer, against
//                     the map-table mapping; for an input produced by slot j, only if slot
//                     j itself integrated and the entry's input equals slot j's candidate
//                     output. A freshly allocated register never needs comparing: an
//                     instruction cannot integrate while its in-group producer did not.
//                     The presence of each input and of the output must also agree, and an
//                     entry claimed by an earlier slot of the group cannot be claimed again.
//   output selection  an integrated slot's output is the entry's O register; any other slot
//                     with an output takes the next free-list candidate.
// With a direct-mapped IT (one candidate per instruction) this is the document's
// I*(((N(N-1)/2)M+N)*M) comparator arrangement with M = 1.
//
// The old mapping of each output (freed at commit) is routed the same way as the inputs.
// map_p1/map_p2/map_old are the map-table reads of src1/src2/dst of every slot.
module integration_circuit
  import ri_pkg::*;
#(
  parameter int unsigned WIDTH   = DEF_WIDTH,
  parameter int unsigned IT_SIZE = DEF_IT_SIZE
) (
  input  fetch_insn_t insn    [WIDTH],
  input  preg_t       map_p1  [WIDTH],
  input  preg_t       map_p2  [WIDTH],
  input  preg_t       map_old [WIDTH],
  input  it_entry_t   it_ent  [WIDTH],
  input  logic        it_hit  [WIDTH],
  input  preg_t       cand    [WIDTH],
  output preg_t       p1      [WIDTH],
  output preg_t       p2      [WIDTH],
  output preg_t       pd      [WIDTH],
  output preg_t       old_pd  [WIDTH],
  output logic        integ   [WIDTH],
  output logic [$clog2(WIDTH+1)-1:0] alloc_cnt
);

  localparam int unsigned IDX_W = $clog2(IT_SIZE);
  localparam int unsigned IW    = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  int   prod1, prod2;          // in-group producer slot, -1 if none
  logic ok1, ok2, claimed, shape_ok;

  always_comb begin
    alloc_cnt = '0;
    for (int i = 0; i < WIDTH; i++) begin
      integ[i] = 1'b0;
      pd[i]    = '0;
    end
    for (int i = 0; i < WIDTH; i++) begin
      p1[i]     = map_p1[i];
      p2[i]     = map_p2[i];
      old_pd[i] = map_old[i];
      prod1     = -1;
      prod2     = -1;
      claimed   = 1'b0;
      for (int j = 0; j < i; j++) begin
        if (insn[j].valid && insn[j].dst_v) begin
          if (insn[j].dst == insn[i].src1) begin p1[i] = pd[j]; prod1 = j; end
          if (insn[j].dst == insn[i].src2) begin p2[i] = pd[j]; prod2 = j; end
          if (insn[j].dst == insn[i].dst)  old_pd[i] = pd[j];
        end
        if (integ[j] && (insn[j].pc[2 +: IDX_W] == insn[i].pc[2 +: IDX_W])) claimed = 1'b1;
      end
      // input 1
      if (!insn[i].src1_v)  ok1 = 1'b1;
      else if (prod1 < 0)   ok1 = (it_ent[i].i1 == map_p1[i]);
      else                  ok1 = integ[prod1] && (it_ent[i].i1 == it_ent[prod1].o);
      // input 2
      if (!insn[i].src2_v)  ok2 = 1'b1;
      else if (prod2 < 0)   ok2 = (it_ent[i].i2 == map_p2[i]);
      else                  ok2 = integ[prod2] && (it_ent[i].i2 == it_ent[prod2].o);
      shape_ok = (it_ent[i].i1_v == insn[i].src1_v) && (it_ent[i].i2_v == insn[i].src2_v) &&
                 (it_ent[i].o_v == insn[i].dst_v);
      integ[i] = insn[i].valid && it_hit[i] && shape_ok && ok1 && ok2 && !claimed;
      // output selection
      if (integ[i]) begin
        pd[i] = it_ent[i].o;
      end else if (insn[i].valid && insn[i].dst_v) begin
        pd[i]     = cand[IW'(alloc_cnt)];
        alloc_cnt = alloc_cnt + 1'b1;
      end else begin
        pd[i] = '0;
      end
    end
  end

endmodule
