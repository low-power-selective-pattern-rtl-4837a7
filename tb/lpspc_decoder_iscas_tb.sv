// lpspc_decoder_iscas_tb: runs the decoder with encoder size 4, the size
// used for the ISCAS'89 experiments, at the scan-chain lengths of the six
// circuits: 214, 247, 700, 611, 1664 and 1464 scan cells, rounded up to
// whole 16-bit segments (14, 16, 44, 39, 104 and 92 segments). Each size
// runs in its own harness with a generated dictionary (the real
// dictionaries depend on the circuits' test sets), one uncompressed and
// three compressed patterns, and checks every scan bit and the tester-cycle
// count of the compressed patterns.
module lpspc_decoder_iscas_tb;
  localparam int NC = 6;
  logic done [NC];
  int   chk  [NC];
  int   fail [NC];
  int   idle [NC];
  int checks, failures;

  lpspc_decoder_harness #(.NSEG(14))  h_s5378  (.done(done[0]), .checks(chk[0]), .failures(fail[0]), .idle_slots(idle[0]));
  lpspc_decoder_harness #(.NSEG(16))  h_s9234  (.done(done[1]), .checks(chk[1]), .failures(fail[1]), .idle_slots(idle[1]));
  lpspc_decoder_harness #(.NSEG(44))  h_s13207 (.done(done[2]), .checks(chk[2]), .failures(fail[2]), .idle_slots(idle[2]));
  lpspc_decoder_harness #(.NSEG(39))  h_s15850 (.done(done[3]), .checks(chk[3]), .failures(fail[3]), .idle_slots(idle[3]));
  lpspc_decoder_harness #(.NSEG(104)) h_s38417 (.done(done[4]), .checks(chk[4]), .failures(fail[4]), .idle_slots(idle[4]));
  lpspc_decoder_harness #(.NSEG(92))  h_s38584 (.done(done[5]), .checks(chk[5]), .failures(fail[5]), .idle_slots(idle[5]));

  initial begin
    #20ms;
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    #100;
    for (int i = 0; i < NC; i++) wait (done[i]);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NC; i++) begin
      checks += chk[i] + 1;
      failures += fail[i];
      // the tester halt must have happened in every configuration
      if (idle[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
