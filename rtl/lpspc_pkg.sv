// lpspc_pkg: shared constants and types of the selective-pattern-compression
// decoder.
//
// A test pattern of SCAN_LEN bits is cut into NSEG segments of 2**M bits.
// Every segment has its own small dictionary of merged patterns; a
// compressed pattern is sent as one codeword per segment, the codeword of
// segment i being CW_LEN[i] bits wide (at most M bits, so at most 2**M
// dictionary entries per segment).
//
// The default dictionary is a small published example with encoder size M = 3,
// 40-bit patterns and five 8-bit segments (codeword widths 1,2,2,1,2).
// Patterns are written with their first scan-in bit as the MSB, so the
// literal reads in the order the bits leave the decoder. Dictionary slots a
// segment does not use are zero.
package lpspc_pkg;

  // Encoder size of the example configuration.
  localparam int unsigned DEF_M        = 3;
  localparam int unsigned DEF_SEG_BITS = 1 << DEF_M;
  localparam int unsigned DEF_NSEG     = 5;

  typedef logic [0:DEF_NSEG-1][0:(1<<DEF_M)-1][DEF_SEG_BITS-1:0] def_book_t;
  typedef logic [0:DEF_NSEG-1][3:0]                              def_cwlen_t;

  // Codeword width of each segment.
  localparam def_cwlen_t DEF_CW_LEN = '{4'd1, 4'd2, 4'd2, 4'd1, 4'd2};

  // Merged pattern of each (segment, codeword).
  localparam def_book_t DEF_CODEBOOK = '{
    // segment 1: 0 -> 00000000, 1 -> 00100001
    '{8'b00000000, 8'b00100001, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00},
    // segment 2: 00, 01, 10, 11
    '{8'b00000000, 8'b00010100, 8'b00111000, 8'b00001000, 8'h00, 8'h00, 8'h00, 8'h00},
    // segment 3: 00, 01, 10
    '{8'b00000000, 8'b10001101, 8'b10001110, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00},
    // segment 4: 0, 1
    '{8'b00000000, 8'b10110000, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00},
    // segment 5: 00, 01, 10
    '{8'b00000000, 8'b11000000, 8'b11010000, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00}
  };

  // Controller states. The segment states S1..Sn of the state diagram are
  // ST_INDEX/ST_LOAD/ST_SHIFT together with a segment number register.
  typedef enum logic [2:0] {
    ST_START,   // waiting for the Select bit of the next pattern
    ST_RAW,     // Select = 0: passing SCAN_LEN tester bits to the scan chain
    ST_INDEX,   // Select = 1: receiving the codeword (Lindex) of a segment
    ST_LOAD,    // loading the decoded segment into the shift register
    ST_SHIFT    // shifting the decoded segment out; tester halted
  } dec_state_e;

endpackage
