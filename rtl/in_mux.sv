// Input multiplexers of a cell.
//
// The 2:1 x mux takes the x word from the left neighbour or, in wraparound
// mode, the cell's own x output of the previous cycle. The 3:1 y mux takes
// the y word from the left neighbour, from the right neighbour (for arrays
// whose y stream flows right to left) or from the cell's own y output
// (wraparound). Wraparound lets one physical cell act as several consecutive
// logical cells. Purely combinational. The mux inputs follow the cell
// datapath figure; the select encodings (xin_e, yin_e) are this design's.
module in_mux
  import warp_pkg::*;
(
  input  xin_e  xsel,
  input  yin_e  ysel,
  input  word_t x_left,
  input  word_t x_wrap,
  input  word_t y_left,
  input  word_t y_right,
  input  word_t y_wrap,
  output word_t x_in,
  output word_t y_in
);

  assign x_in = (xsel == XIN_WRAP) ? x_wrap : x_left;

  always_comb begin
    unique case (ysel)
      YIN_RIGHT: y_in = y_right;
      YIN_WRAP:  y_in = y_wrap;
      default:   y_in = y_left;
    endcase
  end

endmodule
