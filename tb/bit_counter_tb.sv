// bit_counter_tb: drives random inc/clear sequences with random limits and
// compares count, iflag and dflag with a reference count kept in the
// testbench (wrap to zero on the dflag bit, clear has priority).
module bit_counter_tb;
  localparam int unsigned W = 6;

  logic clk = 0, rst_n = 0, rst_cnt = 0, inc = 0, iflag, dflag;
  logic [W-1:0] ilimit = 6'd2, dlimit = 6'd40, count;
  int ref_count = 0;
  int checks = 0, failures = 0, wraps = 0;

  bit_counter #(.CNT_W(W)) dut (.clk, .rst_n, .rst_cnt, .inc, .ilimit, .dlimit,
                                .count, .iflag, .dflag);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      if (t % 500 == 0) begin
        ilimit = W'(1 + $urandom_range(2));
        dlimit = (t % 1000 == 0) ? 6'd40 : 6'd8;
      end
      inc     = ($urandom_range(3) != 0);
      // the limits only change together with a clear, as in the decoder
      rst_cnt = ($urandom_range(60) == 0) || (t % 500 == 0);
      #1;
      checks++;
      if (count !== W'(ref_count) || iflag !== (ref_count == int'(ilimit) - 1)
          || dflag !== (ref_count == int'(dlimit) - 1)) begin
        failures++;
        $display("FAIL t=%0d count=%0d iflag=%b dflag=%b reference %0d", t, count, iflag,
                 dflag, ref_count);
      end
      if (rst_cnt) ref_count = 0;
      else if (inc) begin
        if (ref_count == int'(dlimit) - 1) begin
          ref_count = 0;
          wraps++;
        end else ref_count++;
      end
      @(negedge clk);
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL the counter never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
