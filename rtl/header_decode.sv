// header_decode: the decode stage (DW) that turns a header flit into the
// arbitration record written into the entry table.
//
// The destination coordinates go through min_rect_route. A packet in an
// adaptive channel gets up to two candidate outputs, the productive X and Y
// directions of the minimal rectangle. A packet in a deadlock-free channel
// (VC0, VC1, or the special class) gets the single dimension-order
// direction. A packet that has arrived at its destination router gets the
// local output named in its header (memory controller 0 or 1, or I/O).
// Combinational; the entry's color and arrival stamp are filled in here from
// the inputs so that the caller only writes the record.
//
// Own choices: the header layout (router_pkg::header_t) and computing the
// route in every router rather than carrying it from a source table. Local
// target code 3 is treated as I/O. A length field of 0 is read as 1 and one
// above 19 as 19.
module header_decode
  import router_pkg::*;
(
  input  flit_t            hdr,
  input  logic [CW-1:0]    my_x,
  input  logic [CW-1:0]    my_y,
  input  logic [CW:0]      dim_x,
  input  logic [CW:0]      dim_y,
  input  logic             color,
  input  logic [AGE_W-1:0] stamp,
  output entry_t           ent
);

  header_t h;
  logic    has_x, has_y;
  port_t   dir_x, dir_y, dor_dir;

  assign h = hdr_unpack(hdr[DATA_W-1:0]);

  min_rect_route u_route (
    .cur_x(my_x), .cur_y(my_y), .dst_x(h.dst_x), .dst_y(h.dst_y),
    .dim_x, .dim_y, .has_x, .has_y, .dir_x, .dir_y, .dor_dir
  );

  always_comb begin
    ent           = '0;
    ent.vc        = h.vc;
    ent.len       = (h.len == 0) ? LEN_W'(1) : (h.len > LEN_W'(MAX_FLITS)) ? LEN_W'(MAX_FLITS) : h.len;
    ent.color     = color;
    ent.stamp     = stamp;
    if (!has_x && !has_y) begin
      unique case (h.local_tgt)
        2'd0:    ent.cand0 = O_MC0;
        2'd1:    ent.cand0 = O_MC1;
        default: ent.cand0 = O_IO;
      endcase
    end else if (vc_adaptive(h.vc)) begin
      ent.cand0     = has_x ? dir_x : dir_y;
      ent.cand1     = dir_y;
      ent.has_cand1 = has_x && has_y;
    end else begin
      ent.cand0     = dor_dir;
    end
  end

endmodule
