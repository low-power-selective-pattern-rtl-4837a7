// dout_select_tb: exhaustive check of the scan-data selector: with select
// low the tester bit must reach dout, with select high the shift-register
// bit must.
module dout_select_tb;
  logic din, sreg_out, select, dout;
  int checks = 0, failures = 0;

  dout_select dut (.din, .sreg_out, .select, .dout);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {select, sreg_out, din} = 3'(v);
      #1;
      checks++;
      if (dout !== (v[2] ? v[1] : v[0])) begin
        failures++;
        $display("FAIL select=%b sreg_out=%b din=%b dout=%b", select, sreg_out, din, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
