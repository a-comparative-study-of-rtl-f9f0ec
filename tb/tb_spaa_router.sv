// End-to-end testbench for spaa_router (16 packet slots per port, small
// anti-starvation threshold). Random packets enter all eight input ports:
// torus inputs at the 2-of-3-cycle link rate, local inputs at up to one
// flit per cycle. A scoreboard checks that every packet leaves exactly once,
// on an output that the minimal-rectangle routing allows, with its flits in
// order, single-bit errors injected on the way corrected, and that an idle
// router passes a header in 6 cycles. The run is done twice, without and
// with the Rotary Rule (a boot-time mode, so the router is reset between
// runs). Each mechanism must occur at least once: nomination reset after a
// lost output arbitration, Rotary Rule priority, anti-starvation drain,
// cut-through wait, link-rate wait, ECC correction, use of the second
// adaptive candidate, both read ports of one buffer delivering at once,
// and input back-pressure.
module tb_spaa_router;
  import router_pkg::*;
  localparam int PK = 16;
  localparam int MX = 3, MY = 3, DIM = 8;

  logic clk = 0, rst_n = 0, rotary_en = 0;
  logic [NUM_IN-1:0] in_valid, in_sop, in_ready;
  flit_t in_flit [NUM_IN];
  logic [NUM_OUT-1:0] out_valid, out_sop, out_eop, out_ecc_single, out_ecc_double;
  flit_t out_flit [NUM_OUT];
  logic [NUM_LA-1:0] ev_nominate, ev_reset, ev_grant, ev_cut_wait, ev_link_wait;
  logic [NUM_OUT-1:0] ev_rotary;
  logic ev_drain;

  spaa_router #(.PKTS_PER_PORT(PK), .STARVE_THRESH(6), .EPOCH(32)) dut (
    .clk, .rst_n, .rotary_en, .my_x(CW'(MX)), .my_y(CW'(MY)), .dim_x((CW+1)'(DIM)), .dim_y((CW+1)'(DIM)),
    .in_valid, .in_sop, .in_flit, .in_ready, .out_valid, .out_sop, .out_eop, .out_flit,
    .out_ecc_single, .out_ecc_double, .ev_nominate, .ev_reset, .ev_grant, .ev_rotary,
    .ev_cut_wait, .ev_link_wait, .ev_drain
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_reset = 0, n_rotary = 0, n_drain = 0, n_cut = 0, n_link = 0, n_ecc = 0;
  int n_cand1 = 0, n_pair = 0, n_backp = 0, n_sent = 0, n_recv = 0;
  longint cyc = 0;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference routing ----------------
  function automatic int fwd(int c, int d);
    return (d - c + DIM) % DIM;
  endfunction

  // allowed outputs as a bit mask, and the first/second candidate
  function automatic void ref_route(header_t h, output bit [6:0] allow, output int c0, output int c1);
    int fx, fy, ex, ey;
    fx = fwd(MX, h.dst_x); fy = fwd(MY, h.dst_y);
    ex = (fx <= DIM / 2) ? O_E : O_W;
    ey = (fy <= DIM / 2) ? O_N : O_S;
    allow = 0; c0 = -1; c1 = -1;
    if (fx == 0 && fy == 0) c0 = (h.local_tgt == 0) ? O_MC0 : (h.local_tgt == 1) ? O_MC1 : O_IO;
    else if (h.vc < 18 && h.vc % 3 == 0) begin
      c0 = (fx != 0) ? ex : ey;
      if (fx != 0 && fy != 0) c1 = ey;
    end else c0 = (fx != 0) ? ex : ey;
    allow[c0] = 1;
    if (c1 >= 0) allow[c1] = 1;
  endfunction

  // ---------------- scoreboard ----------------
  typedef struct {
    bit [6:0] allow;
    int c1;
    int len;
    logic [31:0] data [MAX_FLITS];
  } pkt_t;
  pkt_t inflight [int];
  int next_id = 1;

  // per output: packet being received
  int o_id [NUM_OUT];
  int o_k [NUM_OUT];

  // ---------------- sources ----------------
  typedef struct {
    bit active;
    int id, k, len;
    logic [31:0] data [MAX_FLITS];
  } src_t;
  src_t src [NUM_IN];
  int load_pct;
  bit stop_new;

  function automatic header_t make_header(int p);
    header_t h;
    bit [6:0] allow;
    int c0, c1;
    forever begin
      h.dst_x = CW'($urandom_range(0, DIM - 1));
      h.dst_y = CW'($urandom_range(0, DIM - 1));
      if ($urandom_range(0, 7) == 0) begin h.dst_x = CW'(MX); h.dst_y = CW'(MY); end
      h.vc = ($urandom_range(0, 2) == 0) ? VC_W'($urandom_range(0, 18)) : VC_W'(3 * $urandom_range(0, 5));
      h.local_tgt = 2'($urandom_range(0, 2));
      ref_route(h, allow, c0, c1);
      // keep to outputs this input port can reach: no U-turns on torus
      // inputs; MC/IO inputs leave on the torus; the cache reaches torus and MCs
      if (p < 4 && !allow[p] && (c1 < 0 || c1 != p) && c0 != p) break;
      if (p >= 5 && c0 < 4) break;
      if (p == 4 && c0 != O_IO) break;
    end
    case ($urandom_range(0, 4))
      0: h.len = 1;
      1: h.len = 2;
      2: h.len = 3;
      3: h.len = 18;
      default: h.len = 19;
    endcase
    return h;
  endfunction

  bit [NUM_IN-1:0] inject_err;

  always_ff @(negedge clk) begin
    // drive the inputs for the next rising edge
    for (int p = 0; p < NUM_IN; p++) begin
      bit slot_ok;
      slot_ok = (p >= 4) || (cyc % 3 != 2);      // torus links: 2 flits per 3 cycles
      in_valid[p] <= 1'b0;
      in_sop[p]   <= 1'b0;
      inject_err[p] <= 1'b0;
      if (rst_n && slot_ok) begin
        if (!src[p].active && !stop_new && $urandom_range(0, 99) < load_pct) begin
          header_t h;
          h = make_header(p);
          src[p].active = 1; src[p].k = 0; src[p].len = h.len; src[p].id = next_id;
          src[p].data[0] = hdr_pack(h) | (32'(next_id & 12'hfff) << 20);
          for (int k = 1; k < MAX_FLITS; k++) src[p].data[k] = $urandom;
          next_id++;
        end
        if (src[p].active && (src[p].k > 0 || in_ready[p])) begin
          flit_t f;
          f = ecc_encode(src[p].data[src[p].k]);
          if (src[p].k > 0 && $urandom_range(0, 49) == 0) begin
            f[$urandom_range(0, FLIT_W - 1)] ^= 1'b1;
            inject_err[p] <= 1'b1;
          end
          in_valid[p] <= 1'b1;
          in_sop[p]   <= (src[p].k == 0);
          in_flit[p]  <= f;
          if (src[p].k == 0) begin
            pkt_t pk;
            int c0;
            ref_route(hdr_unpack(src[p].data[0]), pk.allow, c0, pk.c1);
            pk.len = src[p].len;
            pk.data = src[p].data;
            inflight[src[p].id & 12'hfff] = pk;
            n_sent++;
          end
          src[p].k++;
          if (src[p].k == src[p].len) src[p].active = 0;
        end else if (src[p].active && src[p].k == 0 && !in_ready[p]) n_backp++;
      end
    end
  end

  // ---------------- output checking and event counts ----------------
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    n_reset  += $countones(ev_reset);
    n_rotary += $countones(ev_rotary);
    n_cut    += $countones(ev_cut_wait);
    n_link   += $countones(ev_link_wait);
    n_drain  += int'(ev_drain);
    for (int p = 0; p < NUM_IN; p++)
      if (dut.rp_busy[2*p] && dut.rp_busy[2*p+1]) n_pair++;
    for (int o = 0; o < NUM_OUT; o++) if (out_valid[o]) begin
      check(!out_ecc_double[o], "no double errors");
      if (out_ecc_single[o]) n_ecc++;
      if (out_sop[o]) begin
        int id;
        id = int'(out_flit[o][31:20]);
        check(inflight.exists(id), "known packet");
        if (inflight.exists(id)) begin
          check(inflight[id].allow[o], "allowed output");
          if (inflight[id].c1 == o) n_cand1++;
          o_id[o] = id; o_k[o] = 0;
        end else o_id[o] = -1;
      end
      if (o_id[o] >= 0 && inflight.exists(o_id[o])) begin
        check(out_flit[o] == ecc_encode(inflight[o_id[o]].data[o_k[o]]), "flit data");
        check(out_eop[o] == (o_k[o] == inflight[o_id[o]].len - 1), "eop");
        o_k[o]++;
        if (out_eop[o]) begin
          inflight.delete(o_id[o]);
          n_recv++;
          o_id[o] = -1;
        end
      end
    end
  end

  task automatic reset_router(bit rot);
    rst_n = 0;
    rotary_en = rot;
    for (int p = 0; p < NUM_IN; p++) src[p].active = 0;
    for (int o = 0; o < NUM_OUT; o++) o_id[o] = -1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
  endtask

  task automatic drain_all(int limit);
    stop_new = 1;
    for (int t = 0; t < limit && (inflight.size() != 0 || src_busy()); t++) @(posedge clk);
    check(inflight.size() == 0, "all packets delivered");
    if (inflight.size() != 0) $display("%0d packets left", inflight.size());
  endtask

  function automatic bit src_busy();
    for (int p = 0; p < NUM_IN; p++) if (src[p].active) return 1;
    return 0;
  endfunction

  initial begin
    in_valid = 0; in_sop = 0;
    for (int p = 0; p < NUM_IN; p++) in_flit[p] = 0;
    stop_new = 1; load_pct = 0;
    reset_router(0);

    // latency through an idle router: header sampled at edge E, leaves 6 edges later
    begin
      header_t h;
      int t0;
      h.dst_x = CW'(MX); h.dst_y = CW'(MY); h.vc = 0; h.len = 1; h.local_tgt = 0;
      @(negedge clk);
      force in_valid = 8'h10; force in_sop = 8'h10;
      force in_flit[4] = ecc_encode(hdr_pack(h));
      begin
        pkt_t pk; int c0;
        ref_route(h, pk.allow, c0, pk.c1); pk.len = 1; pk.data[0] = hdr_pack(h);
        inflight[0] = pk;
      end
      @(posedge clk);          // header written at this edge
      n_sent++;
      #1;
      release in_valid; release in_sop; release in_flit[4];
      in_valid = 0; in_sop = 0;
      t0 = 0;
      while (!out_valid[O_MC0] && t0 < 50) begin
        @(posedge clk);
        #1;
        t0++;
      end
      check(t0 == 6, "6-cycle idle latency");
      $display("idle latency %0d cycles", t0);
      repeat (3) @(posedge clk);
    end

    for (int run = 0; run < 2; run++) begin
      reset_router(run == 1);
      stop_new = 0;
      load_pct = 100;
      repeat (6000) @(posedge clk);
      load_pct = 30;
      repeat (3000) @(posedge clk);
      load_pct = 2;                       // light load: packets cut through
      repeat (3000) @(posedge clk);
      drain_all(20000);
    end

    check(n_sent > 100 && n_recv == n_sent, "sent = received");
    check(n_reset  > 0, "nomination reset");
    check(n_rotary > 0, "rotary rule priority");
    check(n_drain  > 0, "anti-starvation drain");
    check(n_cut    > 0, "cut-through wait");
    check(n_link   > 0, "link-rate wait");
    check(n_ecc    > 0, "ecc correction");
    check(n_cand1  > 0, "second adaptive candidate");
    check(n_pair   > 0, "both read ports busy");
    check(n_backp  > 0, "input back-pressure");
    $display("sent %0d recv %0d resets %0d rotary %0d drain %0d cut %0d link %0d ecc %0d cand1 %0d pair %0d backp %0d",
             n_sent, n_recv, n_reset, n_rotary, n_drain, n_cut, n_link, n_ecc, n_cand1, n_pair, n_backp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
