// lpspc_decoder: on-chip decompressor for low-power selective pattern
// compression.
//
// The test set is split off-chip into two groups. Patterns with few
// don't-care bits are X-filled for low shift and capture power and sent
// uncompressed (Select bit 0, then SCAN_LEN bits). Patterns with many
// don't-care bits are cut into NSEG segments of 2**M bits; each segment has
// a small dictionary of merged patterns and is sent as a CW_LEN[i]-bit
// codeword (Select bit 1, then one codeword per segment).
//
// Structure (after the decoder's block diagram): decoder_fsm controls a
// bit_counter, the combinational pattern_gen that turns (segment, codeword)
// into a segment, the 2**M-bit seg_shift_reg that shifts the segment out,
// and dout_select, which feeds either the tester bit or the shift register
// to DOut.
//
// Interface and timing: everything runs on the system clock clk. The tester
// presents one bit on din with fsmen = 1 for a single cycle, only while
// ready = 1 (a tester running 2**M times slower than clk therefore idles
// one tester cycle after every codeword). dout is a scan-in bit whenever
// dout_valid = 1; a raw bit appears in the cycle it arrives, a decoded
// segment appears 2 cycles after its last codeword bit and takes 2**M
// consecutive cycles. pat_done pulses with the last bit of every pattern.
// The ready/dout_valid/pat_done handshake is this design's choice; the
// parallel synchronizer that follows the decoder in the original scheme is not
// part of this module, so dout/dout_valid are its outputs.
module lpspc_decoder
  import lpspc_pkg::*;
#(
  parameter int unsigned M    = DEF_M,
  parameter int unsigned NSEG = DEF_NSEG,
  parameter logic [0:NSEG-1][3:0] CW_LEN = DEF_CW_LEN,
  parameter logic [0:NSEG-1][0:(1<<M)-1][(1<<M)-1:0] CODEBOOK = DEF_CODEBOOK,
  localparam int unsigned SEG_BITS = 1 << M,
  localparam int unsigned SCAN_LEN = NSEG * SEG_BITS,
  localparam int unsigned SEG_W    = (NSEG > 1) ? $clog2(NSEG) : 1,
  localparam int unsigned CNT_W    = $clog2(SCAN_LEN + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  input  logic fsmen,
  output logic ready,
  output logic dout,
  output logic dout_valid,
  output logic pat_done
);
  logic             rst_cnt, inc, iflag, dflag, load, shift, select, sout;
  logic [CNT_W-1:0] ilimit, dlimit;
  logic [CNT_W-1:0] count;  // counter value, kept for debug visibility only
  logic [SEG_W-1:0] seg;
  logic [M-1:0]     cw;
  logic [SEG_BITS-1:0] pattern;

  decoder_fsm #(.M(M), .NSEG(NSEG), .CW_LEN(CW_LEN)) u_fsm (
    .clk, .rst_n, .din, .fsmen, .ready,
    .rst_cnt, .inc, .ilimit, .dlimit, .iflag, .dflag,
    .seg, .cw, .load, .shift, .select, .dout_valid, .pat_done
  );

  bit_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .rst_cnt, .inc, .ilimit, .dlimit, .count, .iflag, .dflag
  );

  pattern_gen #(.M(M), .NSEG(NSEG), .CW_LEN(CW_LEN), .CODEBOOK(CODEBOOK)) u_gen (
    .seg, .cw, .pattern
  );

  seg_shift_reg #(.WIDTH(SEG_BITS)) u_sreg (
    .clk, .rst_n, .load, .pattern, .shift, .sout
  );

  dout_select u_sel (
    .din, .sreg_out(sout), .select, .dout
  );

  // Every segment needs a codeword of 1..M bits.
  initial begin
    for (int unsigned s = 0; s < NSEG; s++)
      if (int'(CW_LEN[s]) < 1 || int'(CW_LEN[s]) > int'(M))
        $error("CW_LEN[%0d] = %0d is outside 1..%0d", s, CW_LEN[s], M);
  end

endmodule
