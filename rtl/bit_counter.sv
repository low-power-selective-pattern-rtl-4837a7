// bit_counter: the log2(k)-bit counter of the decoder.
//
// Counts events while inc = 1 and is cleared by rst_cnt (the controller's
// RESET, which has priority). Two flags tell the controller that the event
// being counted now is the last one of its group:
//   iflag = (count == ilimit - 1): last bit of a segment codeword (Lindex),
//   dflag = (count == dlimit - 1): last bit of an uncompressed pattern or of
//           a decoded segment.
// When inc arrives with dflag set the count returns to 0, so after k counted
// bits of an uncompressed pattern it is back at 0, as the decoder's
// description requires. The two limit inputs are this design's choice; the
// original scheme only names RESET, INC, IFlag and DFlag.
module bit_counter #(
  parameter int unsigned CNT_W = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rst_cnt,
  input  logic             inc,
  input  logic [CNT_W-1:0] ilimit,
  input  logic [CNT_W-1:0] dlimit,
  output logic [CNT_W-1:0] count,
  output logic             iflag,
  output logic             dflag
);
  always_comb begin
    iflag = (count == ilimit - CNT_W'(1));
    dflag = (count == dlimit - CNT_W'(1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       count <= '0;
    else if (rst_cnt) count <= '0;
    else if (inc)     count <= dflag ? '0 : count + CNT_W'(1);
  end
endmodule
