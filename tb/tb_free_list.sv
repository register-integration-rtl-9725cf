// tb_free_list: randomised check of the physical-register pool against a bit-vector model.
//
// Every cycle the candidates must be the WIDTH lowest free registers, cand_ok must say
// whether WIDTH exist, free_count must equal the model's population and freed_q must echo
// the previous cycle's releases. The testbench allocates a random number of candidates
// and releases a random set of allocated registers (never a free one). After reset
// registers 0..NUM_ARCH-1 must be allocated and all others free. The pool is drained to
// exercise cand_ok going low. Default sizes.
module tb_free_list;
  import ri_pkg::*;

  localparam int W  = DEF_WIDTH;
  localparam int NA = DEF_NUM_ARCH;
  localparam int NP = DEF_NUM_PREGS;
  localparam int CW = $clog2(W + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  preg_t           cand [W];
  logic            cand_ok;
  logic [CW-1:0]   alloc_cnt;
  logic [NP-1:0]   free_mask, freed_q;
  logic [$clog2(NP+1)-1:0] free_count;

  free_list dut (.clk, .rst_n, .cand, .cand_ok, .alloc_cnt, .free_mask, .freed_q, .free_count);

  int checks = 0, failures = 0;
  bit model [NP];
  logic [NP-1:0] last_free;
  int saw_not_ok = 0;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    int n = 0, cnt = 0;
    preg_t want [W];
    for (int s = 0; s < W; s++) want[s] = '0;
    for (int p = 0; p < NP; p++) if (model[p]) begin
      if (n < W) want[n] = preg_t'(p);
      n++;
    end
    cnt = n;
    chk(int'(free_count) == cnt, "free_count");
    chk(cand_ok == (cnt >= W), "cand_ok");
    if (cnt < W) saw_not_ok++;
    for (int s = 0; s < W && s < cnt; s++) chk(cand[s] == want[s], "candidate order");
    chk(freed_q == last_free, "freed_q echoes releases");
  endtask

  initial begin
    alloc_cnt = '0; free_mask = '0; last_free = '0;
    for (int p = 0; p < NP; p++) model[p] = (p >= NA);
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 1500; it++) begin
      automatic int drain = (it >= 500 && it < 700);   // allocate hard, release little
      int k;
      @(negedge clk);
      compare();
      k = $urandom_range(0, W);
      if (!cand_ok) k = 0;
      alloc_cnt = CW'(k);
      free_mask = '0;
      for (int p = 0; p < NP; p++) begin
        if (!model[p] && $urandom_range(0, 99) < (drain ? 0 : 3)) free_mask[p] = 1'b1;
      end
      // never release a register allocated in this same cycle
      for (int s = 0; s < k; s++) free_mask[cand[s]] = 1'b0;
      @(posedge clk);
      for (int s = 0; s < k; s++) model[cand[s]] = 1'b0;
      for (int p = 0; p < NP; p++) if (free_mask[p]) model[p] = 1'b1;
      last_free = free_mask;
    end
    @(negedge clk);
    alloc_cnt = '0; free_mask = '0;
    compare();
    chk(saw_not_ok > 0, "pool ran short at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
