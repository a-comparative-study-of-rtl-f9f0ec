// min_rect_route: productive directions inside the minimal rectangle of a
// 2D torus.
//
// Of the four rectangles spanned by this router and the destination in a
// torus, the minimal one is reached by going, in each dimension, the shorter
// way around the ring. This block returns that direction for X (East or West)
// and for Y (North or South) and whether each offset is non-zero. An adaptive
// packet may use either productive direction (so at most two choices); a
// packet in the deadlock-free channels follows dimension order, X first.
// Purely combinational.
//
// Own choices: +x is East and +y is North; when both ways round a ring are
// equally long the positive direction is taken. Coordinates must be smaller
// than the ring size.
module min_rect_route
  import router_pkg::*;
(
  input  logic [CW-1:0] cur_x,
  input  logic [CW-1:0] cur_y,
  input  logic [CW-1:0] dst_x,
  input  logic [CW-1:0] dst_y,
  input  logic [CW:0]   dim_x,     // ring sizes, 1..16
  input  logic [CW:0]   dim_y,
  output logic          has_x,
  output logic          has_y,
  output port_t         dir_x,
  output port_t         dir_y,
  output port_t         dor_dir    // dimension-order direction (valid if has_x|has_y)
);

  logic [CW:0] fx, fy;   // distance going the positive way round

  always_comb begin
    fx = (dst_x >= cur_x) ? {1'b0, dst_x} - {1'b0, cur_x}
                          : {1'b0, dst_x} + dim_x - {1'b0, cur_x};
    fy = (dst_y >= cur_y) ? {1'b0, dst_y} - {1'b0, cur_y}
                          : {1'b0, dst_y} + dim_y - {1'b0, cur_y};
    has_x   = (fx != '0);
    has_y   = (fy != '0);
    dir_x   = ({fx, 1'b0} <= {1'b0, dim_x}) ? O_E : O_W;
    dir_y   = ({fy, 1'b0} <= {1'b0, dim_y}) ? O_N : O_S;
    dor_dir = has_x ? dir_x : dir_y;
  end

endmodule
