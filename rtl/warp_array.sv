// The Warp processor: a linear systolic array of N_CELLS identical cells
// (10 in the prototype).
//
// Data (x, y), the address stream (addr) and the control stream (cntl, one
// microinstruction per cycle) enter cell 1 and flow from each cell to its
// right neighbour; results leave on the right from the last cell. Each cell
// also receives the y output of its right neighbour, so that a program may
// run y from right to left (bi-directional arrays); the last cell's right
// input is the port y_right_in, and cell 1's y output is brought out as
// y_first_out, where a boundary processor attached to the left end would
// take it. Only the two end cells touch the outside. Every cell executes a
// microinstruction one cycle after its left neighbour.
//
// Interface: x_in, y_in, addr_in, cntl_in at the left end; x_out, y_out,
// addr_out, cntl_out from the last cell; y_right_in and y_first_out for
// right-to-left flows. The linear topology, the one-direction flow of data
// and control, the right-to-left y path and the ten cells are taken from the
// document; the port naming is this design's.
module warp_array
  import warp_pkg::*;
#(
  parameter int unsigned N_CELLS = 10
) (
  input  logic   clk,
  input  logic   rst_n,
  input  uinst_t cntl_in,
  input  word_t  x_in,
  input  word_t  y_in,
  input  word_t  addr_in,
  input  word_t  y_right_in,
  output uinst_t cntl_out,
  output word_t  x_out,
  output word_t  y_out,
  output word_t  addr_out,
  output word_t  y_first_out
);

  uinst_t c_q [N_CELLS];
  word_t  x_q [N_CELLS];
  word_t  y_q [N_CELLS];
  word_t  a_q [N_CELLS];

  for (genvar j = 0; j < N_CELLS; j++) begin : g_cell
    warp_cell #(.CELL_INDEX(j)) u_cell (
      .clk,
      .rst_n,
      .cntl_in  (j == 0 ? cntl_in : c_q[(j == 0) ? 0 : j-1]),
      .x_left   (j == 0 ? x_in    : x_q[(j == 0) ? 0 : j-1]),
      .y_left   (j == 0 ? y_in    : y_q[(j == 0) ? 0 : j-1]),
      .y_right  (j == N_CELLS-1 ? y_right_in : y_q[(j == N_CELLS-1) ? j : j+1]),
      .addr_left(j == 0 ? addr_in : a_q[(j == 0) ? 0 : j-1]),
      .cntl_out (c_q[j]),
      .x_out    (x_q[j]),
      .y_out    (y_q[j]),
      .addr_out (a_q[j])
    );
  end

  assign cntl_out    = c_q[N_CELLS-1];
  assign x_out       = x_q[N_CELLS-1];
  assign y_out       = y_q[N_CELLS-1];
  assign addr_out    = a_q[N_CELLS-1];
  assign y_first_out = y_q[0];

endmodule
