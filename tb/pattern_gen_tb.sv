// pattern_gen_tb: checks the pattern logic against the worked-example
// dictionary, written here a second time as text strings (first scan-in bit
// leftmost). Every segment is driven with every 3-bit codeword value,
// including values whose upper bits lie beyond the segment's codeword width,
// which must be ignored. Unused dictionary slots must decode to zero.
module pattern_gen_tb;
  import lpspc_pkg::*;

  localparam int unsigned NSEG = 5;
  localparam int unsigned M    = 3;

  logic [2:0] seg;
  logic [2:0] cw;
  logic [7:0] pattern;
  int checks = 0, failures = 0;

  pattern_gen dut (.seg(seg), .cw(cw), .pattern(pattern));

  // Reference: codeword width and pattern strings per segment.
  int    width [NSEG] = '{1, 2, 2, 1, 2};
  string book  [NSEG][4] = '{
    '{"00000000", "00100001", "",         ""        },
    '{"00000000", "00010100", "00111000", "00001000"},
    '{"00000000", "10001101", "10001110", ""        },
    '{"00000000", "10110000", "",         ""        },
    '{"00000000", "11000000", "11010000", ""        }
  };

  function automatic logic [7:0] from_text(string s);
    logic [7:0] v = '0;
    if (s.len() == 0) return '0;
    for (int i = 0; i < 8; i++) v[7-i] = (s[i] == "1");
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NSEG; s++) begin
      for (int c = 0; c < 8; c++) begin
        logic [7:0] exp;
        int idx;
        seg = 3'(s);
        cw  = 3'(c);
        #1;
        idx = c % (1 << width[s]);
        exp = from_text(book[s][idx]);
        checks++;
        if (pattern !== exp) begin
          failures++;
          $display("FAIL seg %0d cw %0d: got %b expected %b", s + 1, c, pattern, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
