// lpspc_decoder_tb: end-to-end test of the decoder at its default size
// (encoder size 3, five 8-bit segments, 40-bit scan patterns, the
// worked-example dictionary).
//
// A tester model offers one bit every PHI system clocks and leaves a slot
// idle while the decoder is not ready. A scan-chain model takes every dout
// bit with dout_valid and compares it with the pattern the testbench expects,
// worked out from its own text copy of the dictionary.
//
// Part 1 runs the worked example: 11 test sets of 40 bits, of which 2 form
// the uncompressed group (as printed in the example, sent after
// minimum-transition filling of their don't-care bits, done here) and 9
// form the compressed group, sent as the
// 8-bit codewords 10001001 ... 01100001. With PHI = 2**M the tester time of
// the compressed group must be (C_total - 1) + sum of codeword bits, plus one
// Select bit per pattern.
// Part 2 sends random uncompressed and compressed patterns with a slower
// decoder clock ratio (PHI = 3), where one codeword halts the tester for
// several slots.
// Counted mechanisms: uncompressed pass-through, compressed decoding,
// tester halts; each must occur.
module lpspc_decoder_tb;
  localparam int NSEG = 5, SEG_BITS = 8, SCAN_LEN = 40;

  logic clk = 0, rst_n = 0, din = 0, fsmen = 0;
  logic ready, dout, dout_valid, pat_done;
  int checks = 0, failures = 0;

  lpspc_decoder dut (.clk, .rst_n, .din, .fsmen, .ready, .dout, .dout_valid, .pat_done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference dictionary ----------------
  int    cwl  [NSEG] = '{1, 2, 2, 1, 2};
  string book [NSEG][4] = '{
    '{"00000000", "00100001", "",         ""        },
    '{"00000000", "00010100", "00111000", "00001000"},
    '{"00000000", "10001101", "10001110", ""        },
    '{"00000000", "10110000", "",         ""        },
    '{"00000000", "11000000", "11010000", ""        }
  };

  // ---------------- scan-chain model ----------------
  bit exp_q [$];
  bit exp_bit;
  int scan_bits = 0, patterns_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (dout_valid) begin
      scan_bits++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected scan bit %b", dout);
      end else begin
        exp_bit = exp_q.pop_front();
        if (dout !== exp_bit) begin
          failures++;
          $display("FAIL scan bit %0d: got %b expected %b", scan_bits, dout, exp_bit);
        end
      end
    end
    if (pat_done) patterns_done++;
  end

  // ---------------- tester model ----------------
  int phi = SEG_BITS;
  int cyc = 0, slot = 0, idle_slots = 0;
  always @(posedge clk) cyc++;

  task automatic send_bit(bit b);
    forever begin
      @(negedge clk);
      if (cyc % phi == 0) begin
        slot++;
        if (ready) break;
        idle_slots++;
      end
    end
    din = b; fsmen = 1;
    @(negedge clk);
    fsmen = 0; din = 0;
  endtask

  int n_raw = 0, n_comp = 0;

  task automatic send_raw(string pat);
    send_bit(1'b0);
    for (int i = 0; i < SCAN_LEN; i++) begin
      exp_q.push_back(pat[i] == "1");
      send_bit(pat[i] == "1");
    end
    n_raw++;
  endtask

  // codeword string: segment codewords back to back, first bit first
  task automatic send_comp(string code);
    int p = 0;
    send_bit(1'b1);
    for (int s = 0; s < NSEG; s++) begin
      int c = 0;
      string pat;
      for (int b = 0; b < cwl[s]; b++) begin
        c = (c << 1) | int'(code[p] == "1");
        send_bit(code[p] == "1");
        p++;
      end
      pat = book[s][c];
      for (int i = 0; i < SEG_BITS; i++) exp_q.push_back(pat[i] == "1");
    end
    n_comp++;
  endtask

  // minimum-transition fill: a don't-care takes the nearest specified value
  // before it (leading don't-cares take the first specified value)
  function automatic string mt_fill(string s);
    string r = s;
    byte last = "0";
    for (int i = 0; i < r.len(); i++)
      if (r[i] == "0" || r[i] == "1") begin last = r[i]; break; end
    for (int i = 0; i < r.len(); i++) begin
      if (r[i] == "0" || r[i] == "1") last = r[i];
      else r[i] = last;
    end
    return r;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  string apr [2] = '{"xx1xxxxx110xxxx1x00011xxx1010xxxxx011011",
                     "xxxxxxx0x00100xxx1x1xxxx10xx10xxxxxx01xx"};
  string tdc [9] = '{"10001001", "00110000", "01000001", "00001110", "01100100",
                     "11101000", "10000000", "00000001", "01100001"};

  initial begin
    int first_slot, tat_tdc, exp_tat, cw_bits, codewords, idle_tdc;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- part 1: worked example, PHI = 2**M ----
    foreach (apr[i]) send_raw(mt_fill(apr[i]));
    first_slot = slot + 1;
    idle_tdc   = idle_slots;
    foreach (tdc[i]) send_comp(tdc[i]);
    tat_tdc  = slot - first_slot + 1;
    idle_tdc = idle_slots - idle_tdc;
    codewords = 9 * NSEG;
    cw_bits   = 9 * 8;
    exp_tat   = (codewords - 1) + cw_bits + 9;
    check(tat_tdc == exp_tat,
          $sformatf("compressed group took %0d tester cycles, expected %0d", tat_tdc, exp_tat));
    check(idle_tdc == codewords - 1,
          $sformatf("tester idled %0d cycles, expected %0d", idle_tdc, codewords - 1));
    repeat (3 * SEG_BITS) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d scan bits missing", exp_q.size()));
    check(scan_bits == 11 * SCAN_LEN, $sformatf("%0d scan bits, expected 440", scan_bits));
    check(patterns_done == 11, $sformatf("%0d patterns done, expected 11", patterns_done));
    $display("worked example: 440 scan bits from %0d tester bits (compressed group %0d cycles)",
             slot, tat_tdc);

    // ---- part 2: random traffic, PHI = 3 ----
    phi = 3;
    for (int p = 0; p < 60; p++) begin
      if ($urandom_range(2) == 0) begin
        string s;
        s = "";
        for (int i = 0; i < SCAN_LEN; i++) s = {s, ($urandom_range(1) != 0) ? "1" : "0"};
        send_raw(s);
      end else begin
        string code;
        code = "";
        for (int i = 0; i < 8; i++) code = {code, ($urandom_range(1) != 0) ? "1" : "0"};
        send_comp(code);
      end
    end
    repeat (4 * SEG_BITS) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d scan bits missing at the end", exp_q.size()));
    check(patterns_done == n_raw + n_comp,
          $sformatf("%0d patterns done, expected %0d", patterns_done, n_raw + n_comp));

    // every mechanism must have happened
    check(n_raw > 0, "no uncompressed pattern");
    check(n_comp > 0, "no compressed pattern");
    check(idle_slots > 0, "the tester was never halted");
    $display("mechanisms: uncompressed=%0d compressed=%0d tester_halt_slots=%0d",
             n_raw, n_comp, idle_slots);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
