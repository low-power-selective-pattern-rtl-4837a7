// decoder_fsm_tb: drives the controller alone, with a reference bit counter
// written in the testbench, and checks its control outputs for random
// uncompressed and compressed patterns of the worked-example format
// (5 segments, codeword widths 1,2,2,1,2, 8-bit segments, 40-bit patterns):
//  - an uncompressed pattern gives 40 dout_valid cycles with select = 0;
//  - a compressed pattern gives one load per segment with the right segment
//    number and codeword, then exactly 8 shift cycles with select = 1 and
//    ready = 0 (the tester halt);
//  - pat_done pulses once per pattern with the last scan bit.
// Tester bits are offered at random gaps, only while ready is high.
module decoder_fsm_tb;
  import lpspc_pkg::*;

  localparam int unsigned NSEG = 5, SEG_BITS = 8, SCAN_LEN = 40, CNT_W = 6;
  localparam int unsigned CWL [NSEG] = '{1, 2, 2, 1, 2};

  logic clk = 0, rst_n = 0, din = 0, fsmen = 0, ready;
  logic rst_cnt, inc, iflag, dflag, load, shift, select, dout_valid, pat_done;
  logic [CNT_W-1:0] ilimit, dlimit;
  logic [2:0] seg;
  logic [2:0] cw;
  logic [CNT_W-1:0] cnt;

  int checks = 0, failures = 0;

  decoder_fsm dut (.clk, .rst_n, .din, .fsmen, .ready, .rst_cnt, .inc, .ilimit, .dlimit,
                   .iflag, .dflag, .seg, .cw, .load, .shift, .select, .dout_valid, .pat_done);

  // reference counter
  assign iflag = (cnt == ilimit - 1);
  assign dflag = (cnt == dlimit - 1);
  always_ff @(posedge clk) begin
    if (!rst_n || rst_cnt) cnt <= '0;
    else if (inc) cnt <= dflag ? '0 : cnt + 1;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // observed events
  int raw_bits = 0, shift_bits = 0, halt_cycles = 0, loads = 0, dones = 0;
  int load_seg [$];
  int load_cw  [$];
  always @(posedge clk) if (rst_n) begin
    if (dout_valid && !select) raw_bits++;
    if (dout_valid && select) begin
      shift_bits++;
      checks++;
      if (!shift || ready) begin
        failures++;
        $display("FAIL decoded bit without shift or while ready");
      end
    end
    if (!ready) halt_cycles++;
    if (load) begin
      loads++;
      load_seg.push_back(int'(seg));
      load_cw.push_back(int'(cw));
    end
    if (pat_done) dones++;
  end

  task automatic send_bit(logic b);
    while (!ready || $urandom_range(2) == 0) @(negedge clk);
    din = b; fsmen = 1;
    @(negedge clk);
    fsmen = 0; din = 0;
  endtask

  initial begin
    int exp_raw = 0, exp_shift = 0, exp_dones = 0;
    int exp_seg [$];
    int exp_cw  [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 30; p++) begin
      if ($urandom_range(1) == 0) begin
        send_bit(1'b0);
        for (int i = 0; i < SCAN_LEN; i++) send_bit(1'($urandom));
        exp_raw += SCAN_LEN;
      end else begin
        send_bit(1'b1);
        for (int s = 0; s < NSEG; s++) begin
          int c;
          c = $urandom_range((1 << CWL[s]) - 1);
          for (int b = CWL[s] - 1; b >= 0; b--) send_bit(1'(c >> b));
          exp_seg.push_back(s);
          exp_cw.push_back(c);
          exp_shift += SEG_BITS;
        end
      end
      exp_dones++;
    end
    repeat (20) @(negedge clk);
    check(raw_bits == exp_raw, $sformatf("raw bits %0d expected %0d", raw_bits, exp_raw));
    check(shift_bits == exp_shift,
          $sformatf("decoded bits %0d expected %0d", shift_bits, exp_shift));
    check(halt_cycles == exp_seg.size() * (SEG_BITS + 1),
          $sformatf("halt cycles %0d expected %0d", halt_cycles, exp_seg.size() * (SEG_BITS + 1)));
    check(dones == exp_dones, $sformatf("patterns done %0d expected %0d", dones, exp_dones));
    check(loads == exp_seg.size(), $sformatf("loads %0d expected %0d", loads, exp_seg.size()));
    for (int i = 0; i < exp_seg.size() && i < load_seg.size(); i++) begin
      check(load_seg[i] == exp_seg[i] && load_cw[i] == exp_cw[i],
            $sformatf("load %0d: seg %0d cw %0d expected seg %0d cw %0d", i, load_seg[i],
                      load_cw[i], exp_seg[i], exp_cw[i]));
    end
    check(ready, "ready at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
