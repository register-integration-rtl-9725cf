// tb_it_size_sweep: end-to-end runs of the integrating renamer with smaller integration
// tables, the sizes of the IT-size sweep (64 and 128 direct-mapped entries, with
// 256 and 320 physical registers: architectural + ROB + IT).
//
// Both sizes run side by side, each as a complete copy of the end-to-end test (worked
// example, then a randomised program with mis-predictions, excluded load squashes and
// store snoops, every dispatch and commit checked against a golden model, register
// accounting at the end, every mechanism required to occur). The 256-entry default is
// covered by the full-size end-to-end testbench. The sweep also reports how many
// instructions each size integrated: a smaller table is expected to integrate fewer,
// which is printed but not checked, since this synthetic program is not a benchmark.
module tb_it_size_sweep;
  import ri_pkg::*;

  logic done64, done128;
  int   c64, f64, c128, f128;

  renamer_sweep_run #(.ITS(64))  u_it64  (.done(done64),  .n_checks(c64),  .n_failures(f64));
  renamer_sweep_run #(.ITS(128)) u_it128 (.done(done128), .n_checks(c128), .n_failures(f128));

  initial begin
    fork
      wait (done64 && done128);
      #8000000;   // watchdog: 800,000 cycles of 10 time units
    join_any
    if (done64 && done128)
      $display("TB_RESULT checks=%0d failures=%0d", c64 + c128, f64 + f128);
    else begin
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", c64 + c128, f64 + f128 + 1);
    end
    $finish;
  end

endmodule
