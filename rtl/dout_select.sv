// dout_select: the selector in front of the scan chain.
//
// The decoder sends either the tester bit itself (uncompressed pattern,
// select = 0) or the serial output of the segment shift register (decoded
// pattern, select = 1) to DOut. Purely combinational. The two inputs and the
// control follow the decoder's block diagram.
module dout_select (
  input  logic din,      // tester bit, used for uncompressed patterns
  input  logic sreg_out, // shift-register output, used for decoded patterns
  input  logic select,   // 1: pattern is compressed
  output logic dout      // bit for the scan chain
);
  always_comb dout = select ? sreg_out : din;
endmodule
