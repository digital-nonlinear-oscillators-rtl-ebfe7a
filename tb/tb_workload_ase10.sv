// tb_workload_ase10: the generator at the word size of the entropy
// measurements it is meant to reproduce, 10-bit words, with 100,000 bits
// per source (one tenth of the default one-million-bit sequences, which
// keeps the run to a couple of minutes). It runs the end-to-end test
// tb_dno_trng_top once at this size; that test prints the result and ends
// the simulation. The watchdog here only guards against a hang.
module tb_workload_ase10;
  timeunit 1ps;
  timeprecision 1ps;

  tb_dno_trng_top #(.SB(10), .NBITS(100_000), .RUNS(1)) u_run ();

  initial begin : watchdog
    #(64'd10_000 * 64'd500_000);
    $display("FAIL workload watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
