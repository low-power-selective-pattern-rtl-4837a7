// seg_shift_reg: the 2**M-bit shift register of the decoder.
//
// A decoded segment is loaded in parallel from the pattern logic (load = 1)
// and then shifted out one bit per system clock while shift = 1. The bit
// that leaves first is the MSB, which is the first scan-in bit of the
// segment; zeros enter from the LSB. Load has priority over shift. The
// register size 2**M follows the decoder's block diagram; the bit order and
// the load control are this design's choice.
//
// Timing: sout shows the MSB of the register, so the first bit of a segment
// is on sout in the cycle after load.
module seg_shift_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] pattern,
  input  logic             shift,
  output logic             sout
);
  logic [WIDTH-1:0] sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sreg <= '0;
    else if (load)  sreg <= pattern;
    else if (shift) sreg <= {sreg[WIDTH-2:0], 1'b0};
  end

  assign sout = sreg[WIDTH-1];
endmodule
