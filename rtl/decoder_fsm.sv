// decoder_fsm: controller of the selective-pattern-compression decoder.
//
// Every pattern from the tester starts with a Select bit.
//   Select = 0: the next SCAN_LEN tester bits are raw scan data. Each one is
//               sent to the scan chain in the cycle it arrives (select = 0
//               steers DIn to DOut) and counted; when the counter's dflag
//               marks the last bit the controller returns to START.
//   Select = 1: for each segment i = 0..NSEG-1 the controller collects the
//               segment's CW_LEN[i]-bit codeword (Lindex) until iflag, loads
//               the decoded 2**M-bit segment into the shift register (one
//               cycle, ST_LOAD), then shifts it out in 2**M cycles (ST_SHIFT)
//               until dflag. After the last segment it returns to START.
// The state diagram's per-segment states S1..Sn are ST_INDEX/ST_LOAD/
// ST_SHIFT plus the segment number seg, so NSEG is a parameter.
//
// Tester interface: the controller runs on the fast system clock. A tester
// bit is presented on din with fsmen = 1 for one cycle, and only while
// ready = 1. ready is low during ST_LOAD and ST_SHIFT: this is the halt in
// which the tester idles between codewords. With a system clock 2**M times
// the tester clock this costs exactly one tester cycle per codeword.
// The ready output, the separate load state and dout_valid are this
// design's choices; the Select protocol, the counter flags and the halt
// between codewords follow the original scheme.
// The handshake assertion is disabled during reset, which is why rst_n is
// also sampled synchronously.
module decoder_fsm
  import lpspc_pkg::*;
#(
  parameter int unsigned M        = DEF_M,
  parameter int unsigned NSEG     = DEF_NSEG,
  parameter logic [0:NSEG-1][3:0] CW_LEN = DEF_CW_LEN,
  localparam int unsigned SEG_BITS = 1 << M,
  localparam int unsigned SCAN_LEN = NSEG * SEG_BITS,
  localparam int unsigned SEG_W    = (NSEG > 1) ? $clog2(NSEG) : 1,
  localparam int unsigned CNT_W    = $clog2(SCAN_LEN + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // tester side
  input  logic             din,
  input  logic             fsmen,
  output logic             ready,
  // counter
  output logic             rst_cnt,
  output logic             inc,
  output logic [CNT_W-1:0] ilimit,
  output logic [CNT_W-1:0] dlimit,
  input  logic             iflag,
  input  logic             dflag,
  // pattern logic and shift register (Lindex = seg, cw)
  output logic [SEG_W-1:0] seg,
  output logic [M-1:0]     cw,
  output logic             load,
  output logic             shift,
  // selector and scan side
  output logic             select,
  output logic             dout_valid,
  output logic             pat_done
);
  dec_state_e       state, state_n;
  logic [SEG_W-1:0] seg_n;
  logic [M-1:0]     cw_n;
  logic             accept;

  assign ready  = (state == ST_START) || (state == ST_RAW) || (state == ST_INDEX);
  assign accept = fsmen && ready;

  always_comb begin
    state_n    = state;
    seg_n      = seg;
    cw_n       = cw;
    rst_cnt    = 1'b0;
    inc        = 1'b0;
    ilimit     = CNT_W'(CW_LEN[seg]);
    dlimit     = CNT_W'(SCAN_LEN);
    load       = 1'b0;
    shift      = 1'b0;
    select     = 1'b0;
    dout_valid = 1'b0;
    pat_done   = 1'b0;
    unique case (state)
      ST_START: begin
        if (accept) begin
          rst_cnt = 1'b1;
          seg_n   = '0;
          cw_n    = '0;
          state_n = din ? ST_INDEX : ST_RAW;
        end
      end
      ST_RAW: begin
        if (accept) begin
          inc        = 1'b1;
          dout_valid = 1'b1;
          if (dflag) begin
            pat_done = 1'b1;
            state_n  = ST_START;
          end
        end
      end
      ST_INDEX: begin
        select = 1'b1;
        if (accept) begin
          inc  = 1'b1;
          cw_n = {cw[M-2:0], din};
          if (iflag) begin
            rst_cnt = 1'b1;
            state_n = ST_LOAD;
          end
        end
      end
      ST_LOAD: begin
        select  = 1'b1;
        load    = 1'b1;
        state_n = ST_SHIFT;
      end
      ST_SHIFT: begin
        select     = 1'b1;
        shift      = 1'b1;
        inc        = 1'b1;
        dout_valid = 1'b1;
        dlimit     = CNT_W'(SEG_BITS);
        if (dflag) begin
          rst_cnt = 1'b1;
          cw_n    = '0;
          if (seg == SEG_W'(NSEG - 1)) begin
            pat_done = 1'b1;
            state_n  = ST_START;
          end else begin
            seg_n   = seg + SEG_W'(1);
            state_n = ST_INDEX;
          end
        end
      end
      default: state_n = ST_START;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_START;
      seg   <= '0;
      cw    <= '0;
    end else begin
      state <= state_n;
      seg   <= seg_n;
      cw    <= cw_n;
    end
  end

  // The tester may only present a bit while the decoder is ready.
  a_no_bit_in_halt: assert property (@(posedge clk) disable iff (!rst_n) fsmen |-> ready)
    else $error("tester bit offered while the decoder is halted");

endmodule
