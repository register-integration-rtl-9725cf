// tb_map_table: randomised check of the register map against an array model.
//
// Each cycle either a rename group (up to WIDTH writes, later slots overriding earlier
// ones) or a recovery batch (up to RECOVER_BW restores, later slots overriding earlier
// ones) is applied; all read ports are compared with the model every cycle. The reset
// mapping (register r -> physical r) is checked first. Default sizes.
module tb_map_table;
  import ri_pkg::*;

  localparam int W  = DEF_WIDTH;
  localparam int NA = DEF_NUM_ARCH;
  localparam int RB = DEF_RECOVER_BW;
  localparam int RP = 3 * DEF_WIDTH;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  areg_t rd_areg [RP];
  preg_t rd_preg [RP];
  logic  wr_en [W];  areg_t wr_areg [W];  preg_t wr_preg [W];
  logic  rc_en [RB]; areg_t rc_areg [RB]; preg_t rc_preg [RB];

  map_table dut (.clk, .rst_n, .rd_areg, .rd_preg, .wr_en, .wr_areg, .wr_preg,
                 .rc_en, .rc_areg, .rc_preg);

  int checks = 0, failures = 0;
  preg_t model [NA];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_reads();
    for (int p = 0; p < RP; p++) begin
      rd_areg[p] = areg_t'($urandom_range(0, NA - 1));
    end
    #1;
    for (int p = 0; p < RP; p++) begin
      checks++;
      if (rd_preg[p] !== model[rd_areg[p]]) begin
        failures++;
        if (failures < 10) $display("FAIL: read a%0d got %0d want %0d", rd_areg[p], rd_preg[p], model[rd_areg[p]]);
      end
    end
  endtask

  initial begin
    for (int s = 0; s < W; s++) begin wr_en[s] = 0; wr_areg[s] = '0; wr_preg[s] = '0; end
    for (int k = 0; k < RB; k++) begin rc_en[k] = 0; rc_areg[k] = '0; rc_preg[k] = '0; end
    for (int r = 0; r < NA; r++) model[r] = preg_t'(r);
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    compare_reads();
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      for (int s = 0; s < W; s++) wr_en[s] = 0;
      for (int k = 0; k < RB; k++) rc_en[k] = 0;
      compare_reads();
      if ($urandom_range(0, 3) != 0) begin
        for (int s = 0; s < W; s++) begin
          wr_en[s]   = ($urandom_range(0, 3) != 0);
          wr_areg[s] = areg_t'($urandom_range(0, 15));   // narrow range: frequent overlaps
          wr_preg[s] = preg_t'($urandom_range(0, DEF_NUM_PREGS - 1));
        end
        @(posedge clk);
        for (int s = 0; s < W; s++) if (wr_en[s]) model[wr_areg[s]] = wr_preg[s];
      end else begin
        for (int k = 0; k < RB; k++) begin
          rc_en[k]   = ($urandom_range(0, 3) != 0);
          rc_areg[k] = areg_t'($urandom_range(0, 15));
          rc_preg[k] = preg_t'($urandom_range(0, DEF_NUM_PREGS - 1));
        end
        @(posedge clk);
        for (int k = 0; k < RB; k++) if (rc_en[k]) model[rc_areg[k]] = rc_preg[k];
      end
    end
    @(negedge clk);
    for (int s = 0; s < W; s++) wr_en[s] = 0;
    for (int k = 0; k < RB; k++) rc_en[k] = 0;
    compare_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
