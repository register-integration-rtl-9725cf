// free_list: pool of unallocated physical registers, kept as one bit per register.
//
// Under integration a physical register can be released by three different owners, in any
// order and in any number per cycle: the ROB at commit (the old mapping of the committed
// instruction), the ROB during recovery (the output of a squashed instruction that had not
// completed) and the integration table (the output of an entry evicted without having been
// integrated). A bit vector takes all of them at once: free_mask is ORed into the pool at
// the clock edge.
//
// Allocation: cand[0..WIDTH-1] are the WIDTH lowest-numbered free registers at the start of
// the cycle and cand_ok says that WIDTH of them exist. The rename stage uses the first
// alloc_cnt of them; they leave the pool at the clock edge. A register freed in a cycle can
// be allocated from the next cycle on.
//
// freed_q is free_mask delayed by one cycle. The integration table uses it to drop entries
// whose input registers were released, before those registers can be named again.
//
// Reset: registers 0..NUM_ARCH-1 hold the initial architectural mappings; all others are
// free. The document names the free list and the three release paths (Figure 2, Section
// 3.2); the bit-vector organisation and lowest-first allocation are this design's choice.
module free_list
  import ri_pkg::*;
#(
  parameter int unsigned WIDTH     = DEF_WIDTH,
  parameter int unsigned NUM_ARCH  = DEF_NUM_ARCH,
  parameter int unsigned NUM_PREGS = DEF_NUM_PREGS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output preg_t                cand [WIDTH],
  output logic                 cand_ok,
  input  logic [$clog2(WIDTH+1)-1:0] alloc_cnt,
  input  logic [NUM_PREGS-1:0] free_mask,
  output logic [NUM_PREGS-1:0] freed_q,
  output logic [$clog2(NUM_PREGS+1)-1:0] free_count
);

  localparam int unsigned CW = $clog2(WIDTH+1);
  localparam int unsigned IW = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [NUM_PREGS-1:0] free_q;
  logic [NUM_PREGS-1:0] take;
  logic [CW-1:0]        found;

  // Pick the WIDTH lowest free registers.
  always_comb begin
    found = '0;
    for (int s = 0; s < WIDTH; s++) cand[s] = '0;
    for (int p = 0; p < NUM_PREGS; p++) begin
      if (free_q[p] && (found < CW'(WIDTH))) begin
        cand[IW'(found)] = preg_t'(p);
        found       = found + 1'b1;
      end
    end
    cand_ok = (found == CW'(WIDTH));
  end

  always_comb begin
    take = '0;
    for (int s = 0; s < WIDTH; s++) begin
      if (CW'(s) < alloc_cnt) take[cand[s]] = 1'b1;
    end
  end

  always_comb begin
    free_count = '0;
    for (int p = 0; p < NUM_PREGS; p++) free_count = free_count + free_q[p];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PREGS; p++) free_q[p] <= (p >= NUM_ARCH);
      freed_q <= '0;
    end else begin
      free_q  <= (free_q & ~take) | free_mask;
      freed_q <= free_mask;
    end
  end

  // A register may not be released while it is already free, nor taken beyond the supply.
  a_no_double_free: assert property (@(posedge clk) disable iff (!rst_n)
    (free_mask & free_q) == '0);
  a_alloc_in_supply: assert property (@(posedge clk) disable iff (!rst_n)
    alloc_cnt <= found);

endmodule
