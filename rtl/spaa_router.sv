// spaa_router: a 21364-style on-chip router with the Simple Pipelined
// Arbitration Algorithm (SPAA) and the optional Rotary Rule.
//
// Eight input ports (North, South, East, West, cache, two memory
// controllers, I/O) feed seven output ports (North, South, East, West, two
// memory controllers, I/O). Each input port has an input buffer with two
// read ports and an entry table holding the arbitration status of its
// waiting packets. Arbitration is a three-stage pipeline that starts anew
// every cycle:
//   LA  each of the 16 input port arbiters nominates one packet to one
//       output (oldest packet of the least-recently selected VC that passes
//       the readiness tests); the two arbiters of an input port never pick
//       the same packet;
//   RE  the nominations travel to the output ports (one register stage);
//   GA  each of the 7 output port arbiters grants one nomination
//       (least-recently selected LA; torus inputs first under the Rotary
//       Rule). Every nomination gets its answer at the end of GA: granted
//       packets start dispatch, the others become nominable again.
// Dispatch then reads the packet out of the input buffer through its read
// port (RQ), through the crossbar (X) and the ECC stage to the output, one
// flit per cycle on local outputs and two per three cycles on torus outputs
// (0.8 GHz links). Read port and output stay busy until the last flit.
// The two-color anti-starvation logic can restrict nomination to old
// packets.
//
// Interface: packets enter as flits (in_valid, in_sop marks the header
// flit); in_ready says a header flit would find a free packet slot (body
// flits are always taken). Flits leave on out_valid/out_flit with sop/eop
// marks. The ev_* outputs pulse on internal events for observation.
// Timing: a packet whose header arrives in cycle t is nominated at the
// earliest in cycle t+1 and granted at the end of cycle t+3; its header flit
// leaves at the end of cycle t+6.
//
// As in the 21364 router: port counts, two read ports per buffer, 316 packets
// per port, 19 VCs, 39-bit flits, the LA/RE/GA pipeline, SPAA's three
// steps, Rotary Rule, the anti-starvation colors, the 2:3 link rate. This
// design's own choices: header layout, connection pattern, per-router route
// computation, buffer organisation and flow control (in_ready), the point
// where the link rate is applied and the anti-starvation details.
module spaa_router
  import router_pkg::*;
#(
  parameter int unsigned PKTS_PER_PORT = 316,
  parameter int unsigned STARVE_THRESH = 64,
  parameter int unsigned EPOCH         = 1024,
  localparam int unsigned SW           = $clog2(PKTS_PER_PORT),
  localparam int unsigned KW           = $clog2(MAX_FLITS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rotary_en,        // boot-time mode
  input  logic [CW-1:0]      my_x,
  input  logic [CW-1:0]      my_y,
  input  logic [CW:0]        dim_x,
  input  logic [CW:0]        dim_y,
  input  logic [NUM_IN-1:0]  in_valid,
  input  logic [NUM_IN-1:0]  in_sop,
  input  flit_t              in_flit  [NUM_IN],
  output logic [NUM_IN-1:0]  in_ready,
  output logic [NUM_OUT-1:0] out_valid,
  output logic [NUM_OUT-1:0] out_sop,
  output logic [NUM_OUT-1:0] out_eop,
  output flit_t              out_flit [NUM_OUT],
  output logic [NUM_OUT-1:0] out_ecc_single,
  output logic [NUM_OUT-1:0] out_ecc_double,
  // observation
  output logic [NUM_LA-1:0]  ev_nominate,      // LA stage nominated
  output logic [NUM_LA-1:0]  ev_reset,         // nomination lost at GA
  output logic [NUM_LA-1:0]  ev_grant,         // nomination granted
  output logic [NUM_OUT-1:0] ev_rotary,        // Rotary Rule held back a local nomination
  output logic [NUM_LA-1:0]  ev_cut_wait,      // dispatch waited for a flit still arriving
  output logic [NUM_LA-1:0]  ev_link_wait,     // dispatch waited for the slower link
  output logic               ev_drain          // anti-starvation drain active
);

  localparam logic [NUM_LA-1:0] NET_MASK = NUM_LA'((1 << (2 * NUM_NET)) - 1);

  // ---------------- shared state ----------------
  logic [NUM_OUT-1:0] out_busy;
  logic [NUM_LA-1:0]  rp_busy;
  logic               cur_color, drain;
  logic [1:0]         link_phase;
  logic               link_tick;

  // LA stage outputs, RE stage registers
  logic [NUM_LA-1:0]  nom_valid;
  logic [SW-1:0]      nom_idx [NUM_LA];
  port_t              nom_out [NUM_LA];
  logic [LEN_W-1:0]   nom_len [NUM_LA];
  logic [NUM_LA-1:0]  re_valid;
  logic [SW-1:0]      re_idx  [NUM_LA];
  port_t              re_out  [NUM_LA];
  logic [LEN_W-1:0]   re_len  [NUM_LA];

  // GA stage
  logic [NUM_LA-1:0]  ga_req  [NUM_OUT];
  logic [NUM_LA-1:0]  ga_gnt  [NUM_OUT];
  logic [NUM_LA-1:0]  la_gnt;
  logic [NUM_OUT-1:0] out_release;

  // dispatch
  logic [NUM_LA-1:0]  d_rd_en, d_sop, d_eop, d_done;
  logic [SW-1:0]      d_slot  [NUM_LA];
  port_t              d_out   [NUM_LA];
  logic [KW-1:0]      d_idx   [NUM_LA];
  logic [NUM_LA-1:0]  d_color;
  logic [NUM_LA-1:0]  d_pace;
  logic [KW-1:0]      d_written [NUM_LA];

  // read data pipeline (RQ) and crossbar
  logic [NUM_LA-1:0]  rq_valid, rq_sop, rq_eop;
  port_t              rq_out  [NUM_LA];
  flit_t              rq_flit [NUM_LA];
  logic [NUM_OUT-1:0] x_valid, x_sop, x_eop;
  flit_t              x_flit  [NUM_OUT];

  logic [NUM_IN-1:0]  arrive;
  logic [12:0]        as_old_count;   // observed in simulation only

  // 0.8 GHz links: a torus output may send in two of every three cycles
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) link_phase <= '0;
    else        link_phase <= (link_phase == 2'd2) ? 2'd0 : link_phase + 2'd1;
  assign link_tick = (link_phase != 2'd2);

  // ---------------- input ports ----------------
  for (genvar p = 0; p < NUM_IN; p++) begin : g_in
    logic [PKTS_PER_PORT-1:0] valid, nominated, granted;
    entry_t             ents [PKTS_PER_PORT];
    logic [SW-1:0]      alloc_idx;
    logic               alloc_ok;
    logic [AGE_W-1:0]   seq;
    logic [SW-1:0]      cur_slot;
    logic [KW-1:0]      cur_idx;
    logic               wr_en, hdr_en;
    logic [SW-1:0]      wr_slot;
    logic [KW-1:0]      wr_idx;
    entry_t             dec;
    logic [1:0]         nom_en, res_valid, res_grant, free_en;
    logic [SW-1:0]      nom_i [2], res_i [2], free_i [2];
    logic               pick_valid0, pick_valid1;
    logic [SW-1:0]      pick_idx0, pick_idx1;
    logic [1:0]         rd_en;
    logic [SW-1:0]      rd_slot [2];
    logic [KW-1:0]      rd_idx  [2];
    flit_t              rd_data [2];
    logic [KW-1:0]      written [PKTS_PER_PORT];

    assign in_ready[p] = alloc_ok;
    assign hdr_en  = in_valid[p] && in_sop[p] && alloc_ok;
    assign wr_slot = in_sop[p] ? alloc_idx : cur_slot;
    assign wr_idx  = in_sop[p] ? '0 : cur_idx;
    assign wr_en   = hdr_en || (in_valid[p] && !in_sop[p] && cur_idx < KW'(MAX_FLITS));
    assign arrive[p] = hdr_en;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        seq      <= '0;
        cur_slot <= '0;
        cur_idx  <= KW'(MAX_FLITS);
      end else if (wr_en) begin
        cur_slot <= wr_slot;
        cur_idx  <= wr_idx + KW'(1);
        if (hdr_en) seq <= seq + 1'b1;
      end
    end

    header_decode u_dec (
      .hdr(in_flit[p]), .my_x, .my_y, .dim_x, .dim_y,
      .color(cur_color), .stamp(seq), .ent(dec)
    );

    always_comb begin
      nom_en[0] = pick_valid0;
      nom_en[1] = pick_valid1;
      nom_i[0]  = pick_idx0;
      nom_i[1]  = pick_idx1;
      for (int k = 0; k < 2; k++) begin
        res_valid[k] = re_valid[2*p+k];
        res_grant[k] = la_gnt[2*p+k];
        res_i[k]     = re_idx[2*p+k];
        free_en[k]   = d_done[2*p+k];
        free_i[k]    = d_slot[2*p+k];
        rd_en[k]     = d_rd_en[2*p+k];
        rd_slot[k]   = d_slot[2*p+k];
        rd_idx[k]    = d_idx[2*p+k];
      end
    end

    entry_table #(.DEPTH(PKTS_PER_PORT)) u_et (
      .clk, .rst_n,
      .wr_en(hdr_en), .wr_idx(alloc_idx), .wr_ent(dec),
      .nom_en, .nom_idx(nom_i),
      .res_valid, .res_grant, .res_idx(res_i),
      .free_en, .free_idx(free_i),
      .valid, .nominated, .granted, .ents, .alloc_idx, .alloc_ok
    );

    // the two arbiters of a buffer: read port 1 never takes read port 0's pick
    input_port_arbiter #(.DEPTH(PKTS_PER_PORT), .LA_ID(2*p)) u_la0 (
      .clk, .rst_n, .valid, .nominated, .granted, .ents, .now_stamp(seq),
      .out_busy, .rp_busy(rp_busy[2*p]), .drain, .cur_color,
      .excl_valid(1'b0), .excl_idx('0),
      .pick_valid(pick_valid0), .pick_idx(pick_idx0),
      .nom_valid(nom_valid[2*p]), .nom_idx(nom_idx[2*p]),
      .nom_out(nom_out[2*p]), .nom_len(nom_len[2*p])
    );
    input_port_arbiter #(.DEPTH(PKTS_PER_PORT), .LA_ID(2*p+1)) u_la1 (
      .clk, .rst_n, .valid, .nominated, .granted, .ents, .now_stamp(seq),
      .out_busy, .rp_busy(rp_busy[2*p+1]), .drain, .cur_color,
      .excl_valid(pick_valid0), .excl_idx(pick_idx0),
      .pick_valid(pick_valid1), .pick_idx(pick_idx1),
      .nom_valid(nom_valid[2*p+1]), .nom_idx(nom_idx[2*p+1]),
      .nom_out(nom_out[2*p+1]), .nom_len(nom_len[2*p+1])
    );

    input_buffer #(.SLOTS(PKTS_PER_PORT)) u_buf (
      .clk, .rst_n, .wr_en, .wr_slot, .wr_idx, .wr_data(in_flit[p]),
      .rd_en, .rd_slot, .rd_idx, .rd_data, .written
    );

    for (genvar k = 0; k < 2; k++) begin : g_rp
      localparam int unsigned L = 2 * p + k;
      assign d_written[L] = written[d_slot[L]];
      assign d_color[L]   = ents[d_slot[L]].color;
      assign rq_flit[L]   = rd_data[k];

      dispatch_ctrl #(.SLOTS(PKTS_PER_PORT)) u_disp (
        .clk, .rst_n,
        .start(la_gnt[L]), .start_slot(re_idx[L]), .start_len(re_len[L]), .start_out(re_out[L]),
        .pace_ok(d_pace[L]), .written(d_written[L]),
        .busy(rp_busy[L]), .slot(d_slot[L]), .out(d_out[L]),
        .rd_en(d_rd_en[L]), .rd_idx(d_idx[L]), .rd_sop(d_sop[L]), .rd_eop(d_eop[L]),
        .done(d_done[L])
      );
      assign d_pace[L]       = !is_net_out(d_out[L]) || link_tick;
      assign ev_cut_wait[L]  = rp_busy[L] && d_pace[L] && !(d_idx[L] < d_written[L]);
      assign ev_link_wait[L] = rp_busy[L] && !d_pace[L];
    end
  end

  // ---------------- RE stage ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) re_valid <= '0;
    else        re_valid <= nom_valid;
  end
  always_ff @(posedge clk) begin
    re_idx <= nom_idx;
    re_out <= nom_out;
    re_len <= nom_len;
  end

  // ---------------- GA stage ----------------
  always_comb begin
    for (int o = 0; o < NUM_OUT; o++) begin
      for (int l = 0; l < NUM_LA; l++)
        ga_req[o][l] = re_valid[l] && re_out[l] == port_t'(o) && conn_ok(l, o) && !rp_busy[l];
      ev_rotary[o] = rotary_en && !out_busy[o] && ((ga_req[o] & NET_MASK) != '0)
                     && ((ga_req[o] & ~NET_MASK) != '0);
    end
  end

  always_comb begin
    la_gnt = '0;
    for (int o = 0; o < NUM_OUT; o++) la_gnt |= ga_gnt[o];
  end

  always_comb begin
    for (int o = 0; o < NUM_OUT; o++) begin
      out_release[o] = 1'b0;
      for (int l = 0; l < NUM_LA; l++)
        if (d_done[l] && d_out[l] == port_t'(o)) out_release[o] = 1'b1;
    end
  end

  for (genvar o = 0; o < NUM_OUT; o++) begin : g_ga
    output_port_arbiter #(.N(NUM_LA)) u_ga (
      .clk, .rst_n, .rotary_en, .net_mask(NET_MASK), .req(ga_req[o]),
      .release_i(out_release[o]), .gnt(ga_gnt[o]), .busy(out_busy[o])
    );
  end

  assign ev_nominate = nom_valid;
  assign ev_grant    = la_gnt;
  assign ev_reset    = re_valid & ~la_gnt;

  // ---------------- anti-starvation ----------------
  anti_starvation #(.THRESH(STARVE_THRESH), .EPOCH(EPOCH), .NA(NUM_IN), .ND(NUM_LA)) u_as (
    .clk, .rst_n, .arrive, .depart(d_done), .depart_color(d_color),
    .cur_color, .drain, .old_count(as_old_count)
  );
  assign ev_drain = drain;

  // ---------------- RQ, X and ECC stages ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_valid <= '0;
      rq_sop   <= '0;
      rq_eop   <= '0;
    end else begin
      rq_valid <= d_rd_en;
      rq_sop   <= d_sop;
      rq_eop   <= d_eop;
    end
  end
  always_ff @(posedge clk) rq_out <= d_out;

  crossbar u_xbar (
    .clk, .rst_n, .rp_valid(rq_valid), .rp_flit(rq_flit), .rp_out(rq_out),
    .rp_sop(rq_sop), .rp_eop(rq_eop),
    .out_valid(x_valid), .out_flit(x_flit), .out_sop(x_sop), .out_eop(x_eop)
  );

  for (genvar o = 0; o < NUM_OUT; o++) begin : g_ecc
    flit_t fixed;
    logic  e1, e2;
    ecc_correct u_ecc (.in_flit(x_flit[o]), .out_flit(fixed), .err_single(e1), .err_double(e2));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid[o]      <= 1'b0;
        out_sop[o]        <= 1'b0;
        out_eop[o]        <= 1'b0;
        out_ecc_single[o] <= 1'b0;
        out_ecc_double[o] <= 1'b0;
      end else begin
        out_valid[o]      <= x_valid[o];
        out_sop[o]        <= x_sop[o];
        out_eop[o]        <= x_eop[o];
        out_ecc_single[o] <= x_valid[o] && e1;
        out_ecc_double[o] <= x_valid[o] && e2;
      end
    end
    always_ff @(posedge clk) out_flit[o] <= fixed;
  end

endmodule
