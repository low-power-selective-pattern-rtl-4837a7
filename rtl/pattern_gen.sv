// pattern_gen: pattern generation logic of the decoder.
//
// Maps the segment number and that segment's codeword (Lindex) to the
// 2**M-bit merged pattern. The dictionary is a parameter, so synthesis turns
// it into plain combinational logic, as the original scheme does for its area
// figures; the default is the example dictionary of lpspc_pkg. Codeword bits
// above the segment's codeword width are ignored.
//
// Interface: seg in 0..NSEG-1, cw holds the received codeword right-aligned
// (first received bit most significant). pattern has its first scan-in bit
// as MSB. No clock: the output follows the inputs.
module pattern_gen
  import lpspc_pkg::*;
#(
  parameter int unsigned M    = DEF_M,
  parameter int unsigned NSEG = DEF_NSEG,
  parameter logic [0:NSEG-1][3:0] CW_LEN = DEF_CW_LEN,
  parameter logic [0:NSEG-1][0:(1<<M)-1][(1<<M)-1:0] CODEBOOK = DEF_CODEBOOK,
  localparam int unsigned SEG_BITS = 1 << M,
  localparam int unsigned SEG_W    = (NSEG > 1) ? $clog2(NSEG) : 1
) (
  input  logic [SEG_W-1:0]    seg,
  input  logic [M-1:0]        cw,
  output logic [SEG_BITS-1:0] pattern
);
  always_comb begin
    pattern = '0;
    for (int unsigned s = 0; s < NSEG; s++) begin
      if (seg == SEG_W'(s)) begin
        for (int unsigned c = 0; c < SEG_BITS; c++) begin
          // only codewords that fit the segment's width are decoded
          if (c < (1 << CW_LEN[s]) && (cw & M'((1 << CW_LEN[s]) - 1)) == M'(c))
            pattern = CODEBOOK[s][c];
        end
      end
    end
  end
endmodule
