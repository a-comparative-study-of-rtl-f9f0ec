// router_pkg: types, sizes and helper functions shared by the SPAA router.
//
// Port numbering. Input ports: 0..3 are the torus ports North, South, East,
// West, 4 is the cache port, 5 and 6 the two memory controller ports, 7 the
// I/O port. Output ports: 0..3 North, South, East, West, 4 and 5 the memory
// controller ports (which also feed the internal cache), 6 the I/O port.
// Every input buffer has two read ports, each with its own input port arbiter
// (LA); LA number l = 2*input_port + read_port, so there are 16 LAs.
//
// The numbers of ports, read ports, virtual channels, packet slots and the
// 39-bit flit (32 data + 7 check bits) follow the 21364 router. The header
// layout, the check-bit code and the read-port-to-output connection pattern
// are this design's own (see conn_ok below).
package router_pkg;

  localparam int unsigned NUM_IN    = 8;
  localparam int unsigned NUM_OUT   = 7;
  localparam int unsigned NUM_LA    = 2 * NUM_IN;
  localparam int unsigned NUM_NET   = 4;     // torus ports N,S,E,W
  localparam int unsigned NUM_VC    = 19;    // 6 classes x 3 + special
  localparam int unsigned MAX_FLITS = 19;
  localparam int unsigned FLIT_W    = 39;
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned CW        = 4;     // coordinate width (up to 16x16)
  localparam int unsigned AGE_W     = 10;    // arrival stamp, > 2*316 values
  localparam int unsigned LEN_W     = 5;
  localparam int unsigned VC_W      = 5;
  localparam int unsigned PORT_W    = 3;

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [PORT_W-1:0] port_t;

  // output port numbers
  localparam port_t O_N = 3'd0, O_S = 3'd1, O_E = 3'd2, O_W = 3'd3,
                    O_MC0 = 3'd4, O_MC1 = 3'd5, O_IO = 3'd6;
  // input port numbers beyond the four torus ports
  localparam port_t I_CACHE = 3'd4, I_MC0 = 3'd5, I_MC1 = 3'd6, I_IO = 3'd7;

  // Header flit, data bits [31:0]:
  //   [3:0] destination x, [7:4] destination y, [12:8] virtual channel,
  //   [17:13] packet length in flits, [19:18] local target at the
  //   destination (0 memory controller 0, 1 memory controller 1, 2 I/O).
  // Virtual channel v < 18 is class v/3, channel v%3 (0 adaptive, 1 VC0,
  // 2 VC1); v = 18 is the single channel of the special class.
  typedef struct packed {
    logic [CW-1:0]    dst_x;
    logic [CW-1:0]    dst_y;
    logic [VC_W-1:0]  vc;
    logic [LEN_W-1:0] len;
    logic [1:0]       local_tgt;
  } header_t;

  // Arbitration record of one waiting packet (entry table).
  typedef struct packed {
    logic [VC_W-1:0]  vc;
    logic [LEN_W-1:0] len;
    port_t            cand0;      // first candidate output
    port_t            cand1;      // second candidate output (adaptive only)
    logic             has_cand1;
    logic             color;      // anti-starvation color at arrival
    logic [AGE_W-1:0] stamp;      // arrival order within the input port
  } entry_t;

  function automatic header_t hdr_unpack(input logic [DATA_W-1:0] d);
    header_t h;
    h.dst_x     = d[3:0];
    h.dst_y     = d[7:4];
    h.vc        = d[12:8];
    h.len       = d[17:13];
    h.local_tgt = d[19:18];
    return h;
  endfunction

  function automatic logic [DATA_W-1:0] hdr_pack(input header_t h);
    logic [DATA_W-1:0] d;
    d = '0;
    d[3:0]   = h.dst_x;
    d[7:4]   = h.dst_y;
    d[12:8]  = h.vc;
    d[17:13] = h.len;
    d[19:18] = h.local_tgt;
    return d;
  endfunction

  function automatic logic vc_adaptive(input logic [VC_W-1:0] vc);
    return (vc < VC_W'(18)) && (vc % 3 == 0);
  endfunction

  function automatic logic is_net_out(input port_t o);
    return o < port_t'(NUM_NET);
  endfunction

  // Read-port-to-output connection matrix: 54 of the 16x7 pairs are
  // connected. Torus inputs never turn back to the port they came from;
  // read port 0 of a torus input reaches the three other torus outputs and
  // memory controller 0, read port 1 the three other torus outputs, memory
  // controller 1 and I/O. Local inputs: read port 0 reaches North and East,
  // read port 1 South and West; the cache port additionally reaches memory
  // controller 0 (read port 0) and 1 (read port 1).
  function automatic logic conn_ok(input int unsigned la, input int unsigned o);
    int unsigned p, r;
    p = la / 2;
    r = la % 2;
    if (p < NUM_NET) begin
      if (o < NUM_NET) return o != p;
      if (r == 0) return o == 32'(O_MC0);
      return (o == 32'(O_MC1)) || (o == 32'(O_IO));
    end
    if (o < NUM_NET) return (r == 0) ? (o == 32'(O_N) || o == 32'(O_E)) : (o == 32'(O_S) || o == 32'(O_W));
    if (p == 32'(I_CACHE)) return (r == 0) ? (o == 32'(O_MC0)) : (o == 32'(O_MC1));
    return 1'b0;
  endfunction

  // (39,32) SEC-DED code. Code-word positions 1..38 hold data in the
  // non-power-of-two positions and Hamming check bit k in position 2^k;
  // flit[38] is the overall parity of the 38 positions. Stored as
  // {overall, c5..c0, data}.
  function automatic logic [5:0] ecc_checks(input logic [37:0] cw);
    logic [5:0] c;
    c = '0;
    for (int pos = 1; pos <= 38; pos++)
      for (int k = 0; k < 6; k++)
        if (pos[k]) c[k] ^= cw[pos-1];
    return c;
  endfunction

  // scatter data into code-word positions (check positions zero)
  function automatic logic [37:0] ecc_scatter(input logic [DATA_W-1:0] d);
    logic [37:0] cw;
    int j;
    cw = '0;
    j = 0;
    for (int pos = 1; pos <= 38; pos++)
      if ((pos & (pos - 1)) != 0) begin
        cw[pos-1] = d[j];
        j++;
      end
    return cw;
  endfunction

  function automatic flit_t ecc_encode(input logic [DATA_W-1:0] d);
    logic [37:0] cw;
    logic [5:0]  c;
    cw = ecc_scatter(d);
    c  = ecc_checks(cw);
    for (int k = 0; k < 6; k++) cw[(1 << k) - 1] = c[k];
    return {^cw, c, d};
  endfunction

  // rebuild the 38 positions of a stored flit
  function automatic logic [37:0] ecc_positions(input flit_t f);
    logic [37:0] cw;
    cw = ecc_scatter(f[DATA_W-1:0]);
    for (int k = 0; k < 6; k++) cw[(1 << k) - 1] = f[DATA_W + k];
    return cw;
  endfunction

  // data bit j sits at code-word position ecc_data_pos(j)
  function automatic int unsigned ecc_data_pos(input int unsigned j);
    int unsigned n;
    n = 0;
    for (int unsigned pos = 1; pos <= 38; pos++)
      if ((pos & (pos - 1)) != 0) begin
        if (n == j) return pos;
        n++;
      end
    return 0;
  endfunction

endpackage
