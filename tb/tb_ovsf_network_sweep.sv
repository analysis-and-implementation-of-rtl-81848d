// tb_ovsf_network_sweep: exhaustive detection / false-alarm workload.
//
// Runs ovsf_sweep_harness for the default code length L = 16 (all 65,536 received
// sequences, 16 decoders, T = 0..3) and for L = 8 (256 sequences, 8 decoders). Every
// decoder output is checked against the Hamming-distance rule, no sequence may wake
// two nodes, and the numbers of detecting and false-alarm sequences per number of
// errors must equal the closed-form counts. A network of N_S sleep nodes then has
// p_fa = (N_S - 1) * p_(i->j), with p_(i->j) the weighted false-alarm count per pair.
module tb_ovsf_network_sweep;
  int checks16;
  int failures16;
  bit done16;
  int checks8;
  int failures8;
  bit done8;
  int checks;
  int failures;

  ovsf_sweep_harness #(.L(16)) u_l16 (.checks(checks16), .failures(failures16), .done(done16));
  ovsf_sweep_harness #(.L(8))  u_l8  (.checks(checks8),  .failures(failures8),  .done(done8));

  initial begin
    wait (done16 && done8);
    checks   = checks16 + checks8;
    failures = failures16 + failures8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 4 x 65,536 sequences of about 17 clock periods of 10 time units each.
    #(64'd60_000_000);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks16 + checks8, failures16 + failures8 + 1);
    $finish;
  end
endmodule
