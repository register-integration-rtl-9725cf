// map_table: the sequential (speculative) architectural-to-physical register map.
//
// Each architectural register holds the physical register that currently names its value.
// Reads are combinational from the state at the start of the cycle, so a rename group sees
// the mappings left by earlier groups; in-group dependences are resolved by the
// integration circuit, not here.
//
// Two kinds of update happen at the clock edge:
//   * rename writes, one per group slot; a later slot overrides an earlier one that names
//     the same architectural register (sequential order inside the group);
//   * recovery restores, one per recovery slot. Recovery walks the squashed instructions
//     from youngest to oldest, so slot k is older than slot k-1 and later slots override.
// The stage never renames while recovering, so the two kinds are never active together
// (checked by an assertion).
//
// After reset architectural register r maps to physical register r. The document describes
// the map table's role (Sections 2.1 and 3.3); its port arrangement and reset mapping are
// this design's choice.
module map_table
  import ri_pkg::*;
#(
  parameter int unsigned WIDTH      = DEF_WIDTH,
  parameter int unsigned NUM_ARCH   = DEF_NUM_ARCH,
  parameter int unsigned RECOVER_BW = DEF_RECOVER_BW,
  parameter int unsigned RD_PORTS   = 3 * DEF_WIDTH
) (
  input  logic  clk,
  input  logic  rst_n,
  // combinational reads
  input  areg_t rd_areg [RD_PORTS],
  output preg_t rd_preg [RD_PORTS],
  // rename writes
  input  logic  wr_en   [WIDTH],
  input  areg_t wr_areg [WIDTH],
  input  preg_t wr_preg [WIDTH],
  // recovery restores
  input  logic  rc_en   [RECOVER_BW],
  input  areg_t rc_areg [RECOVER_BW],
  input  preg_t rc_preg [RECOVER_BW]
);

  preg_t map_q [NUM_ARCH];

  always_comb begin
    for (int p = 0; p < RD_PORTS; p++) begin
      rd_preg[p] = map_q[rd_areg[p]];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_ARCH; r++) map_q[r] <= preg_t'(r);
    end else begin
      for (int s = 0; s < WIDTH; s++) begin
        if (wr_en[s]) map_q[wr_areg[s]] <= wr_preg[s];
      end
      for (int k = 0; k < RECOVER_BW; k++) begin
        if (rc_en[k]) map_q[rc_areg[k]] <= rc_preg[k];
      end
    end
  end

  logic any_wr, any_rc;
  always_comb begin
    any_wr = 1'b0;
    any_rc = 1'b0;
    for (int s = 0; s < WIDTH; s++) any_wr |= wr_en[s];
    for (int k = 0; k < RECOVER_BW; k++) any_rc |= rc_en[k];
  end

  a_no_write_during_recovery: assert property (@(posedge clk) disable iff (!rst_n)
    !(any_wr && any_rc));

endmodule
