// lpspc_decoder_harness: one decoder built with encoder size M = 4
// (16-bit segments) and NSEG segments, together with a tester model and a
// scan-chain checker. Used by lpspc_decoder_iscas_tb to run the decoder at
// the scan-chain lengths of the ISCAS'89 circuits.
//
// Dictionaries for those circuits are not available, so one is generated:
// segment s uses codewords of 1 + (3*s mod 4) bits; entry 0 of every
// segment is all zeros (an all-don't-care segment filled with 0s) and entry
// c > 0 is the 16-bit value book_entry(s, c), a multiplicative hash. The
// checker recomputes the same formula to know which bits to expect.
//
// The harness sends N_RAW uncompressed and N_COMP compressed patterns with a
// system clock 16 times the tester clock, checks every scan bit, and checks
// that the compressed patterns take exactly
//   N_COMP * (1 + sum of codeword widths) + (N_COMP*NSEG - 1)
// tester cycles: Select bits, codeword bits and one idle cycle between any
// two codewords. done rises when it has finished.
module lpspc_decoder_harness #(
  parameter int NSEG   = 14,
  parameter int N_RAW  = 1,
  parameter int N_COMP = 3
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   idle_slots
);
  localparam int M = 4, SEG_BITS = 16, SCAN_LEN = NSEG * SEG_BITS, PHI = 16;

  typedef logic [0:NSEG-1][0:SEG_BITS-1][SEG_BITS-1:0] book_t;
  typedef logic [0:NSEG-1][3:0] cwlen_t;

  function automatic int cw_width(int s);
    return 1 + ((3 * s) % 4);
  endfunction

  function automatic logic [15:0] book_entry(int s, int c);
    int unsigned h;
    if (c == 0) return '0;
    h = (32'(s) * 32'd131 + 32'(c) * 32'd977 + 32'd12345) * 32'd2654435761;
    return h[23:8];
  endfunction

  function automatic cwlen_t make_cwlen();
    cwlen_t r;
    for (int s = 0; s < NSEG; s++) r[s] = 4'(cw_width(s));
    return r;
  endfunction

  function automatic book_t make_book();
    book_t r = '0;
    for (int s = 0; s < NSEG; s++)
      for (int c = 0; c < (1 << cw_width(s)); c++) r[s][c] = book_entry(s, c);
    return r;
  endfunction

  logic clk = 0, rst_n = 0, din = 0, fsmen = 0;
  logic ready, dout, dout_valid, pat_done;

  lpspc_decoder #(.M(M), .NSEG(NSEG), .CW_LEN(make_cwlen()), .CODEBOOK(make_book())) dut (
    .clk, .rst_n, .din, .fsmen, .ready, .dout, .dout_valid, .pat_done);

  always #5 clk = ~clk;

  // scan-chain checker
  bit exp_q [$];
  bit exp_bit;
  int patterns_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (dout_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL NSEG=%0d: unexpected scan bit", NSEG);
      end else begin
        exp_bit = exp_q.pop_front();
        if (dout !== exp_bit) failures++;
      end
    end
    if (pat_done) patterns_done++;
  end

  // tester model
  int cyc = 0, slot = 0;
  always @(posedge clk) cyc++;

  task automatic send_bit(bit b);
    forever begin
      @(negedge clk);
      if (cyc % PHI == 0) begin
        slot++;
        if (ready) break;
        idle_slots++;
      end
    end
    din = b; fsmen = 1;
    @(negedge clk);
    fsmen = 0; din = 0;
  endtask

  initial begin
    int first, tat, exp_tat, sum_w;
    logic [15:0] pat;
    done = 0; checks = 0; failures = 0; idle_slots = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < N_RAW; p++) begin
      send_bit(1'b0);
      for (int i = 0; i < SCAN_LEN; i++) begin
        bit b;
        b = 1'($urandom);
        exp_q.push_back(b);
        send_bit(b);
      end
    end
    first = slot + 1;
    sum_w = 0;
    for (int s = 0; s < NSEG; s++) sum_w += cw_width(s);
    for (int p = 0; p < N_COMP; p++) begin
      send_bit(1'b1);
      for (int s = 0; s < NSEG; s++) begin
        int c;
        c = $urandom_range((1 << cw_width(s)) - 1);
        for (int b = cw_width(s) - 1; b >= 0; b--) send_bit(1'(c >> b));
        pat = book_entry(s, c);
        for (int i = SEG_BITS - 1; i >= 0; i--) exp_q.push_back(pat[i]);
      end
    end
    tat = slot - first + 1;
    exp_tat = N_COMP * (1 + sum_w) + (N_COMP * NSEG - 1);
    repeat (3 * SEG_BITS) @(negedge clk);
    checks += 3;
    if (tat != exp_tat) begin
      failures++;
      $display("FAIL NSEG=%0d: compressed patterns took %0d tester cycles, expected %0d",
               NSEG, tat, exp_tat);
    end
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL NSEG=%0d: %0d scan bits missing", NSEG, exp_q.size());
    end
    if (patterns_done != N_RAW + N_COMP) begin
      failures++;
      $display("FAIL NSEG=%0d: %0d patterns done", NSEG, patterns_done);
    end
    $display("NSEG=%0d (%0d-bit patterns): %0d compressed patterns in %0d tester cycles instead of %0d",
             NSEG, SCAN_LEN, N_COMP, tat, N_COMP * (SCAN_LEN + 1));
    done = 1;
  end
endmodule
