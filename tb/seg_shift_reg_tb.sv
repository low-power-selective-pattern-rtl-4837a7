// seg_shift_reg_tb: loads random 8-bit segments, shifts them out and checks
// that the bits leave MSB first, one per shift cycle, that a cycle without
// shift holds the bit, and that load wins over shift.
module seg_shift_reg_tb;
  localparam int unsigned W = 8;

  logic clk = 0, rst_n = 0, load = 0, shift = 0, sout;
  logic [W-1:0] pattern = '0;
  int checks = 0, failures = 0;

  seg_shift_reg #(.WIDTH(W)) dut (.clk, .rst_n, .load, .pattern, .shift, .sout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic exp, string what);
    checks++;
    if (sout !== exp) begin
      failures++;
      $display("FAIL %s: sout=%b expected %b", what, sout, exp);
    end
  endtask

  initial begin
    logic [W-1:0] p;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(1'b0, "after reset");
    for (int t = 0; t < 40; t++) begin
      p = W'($urandom);
      @(negedge clk); load = 1; shift = (t % 2 == 0); pattern = p;
      @(negedge clk); load = 0; shift = 1;
      for (int b = W - 1; b >= 0; b--) begin
        check(p[b], $sformatf("pattern %0d bit %0d", t, b));
        if (b == 4) begin
          // one idle cycle in the middle: the bit must stay
          shift = 0;
          @(negedge clk);
          check(p[b], "hold");
          shift = 1;
        end
        @(negedge clk);
      end
      shift = 0;
      check(1'b0, "zero fill");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
