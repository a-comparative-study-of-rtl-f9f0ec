// Standalone matching workload for spaa_router: a single router whose input
// buffers are kept loaded with short packets, half of them for the local
// memory-controller and I/O outputs and half for the torus outputs, as in
// the single-router matching study of SPAA. It measures the number of
// output-port grants (matches) per cycle with the Rotary Rule off and on,
// checks that no cycle exceeds the seven outputs, that every packet is
// delivered once and that the loaded router sustains more than 1.5 matches
// per cycle on average.
module tb_spaa_matching;
  import router_pkg::*;
  localparam int PK = 16;
  localparam int MX = 0, MY = 0, DIM = 8;

  logic clk = 0, rst_n = 0, rotary_en = 0;
  logic [NUM_IN-1:0] in_valid, in_sop, in_ready;
  flit_t in_flit [NUM_IN];
  logic [NUM_OUT-1:0] out_valid, out_sop, out_eop, out_ecc_single, out_ecc_double;
  flit_t out_flit [NUM_OUT];
  logic [NUM_LA-1:0] ev_nominate, ev_reset, ev_grant, ev_cut_wait, ev_link_wait;
  logic [NUM_OUT-1:0] ev_rotary;
  logic ev_drain;

  spaa_router #(.PKTS_PER_PORT(PK)) dut (
    .clk, .rst_n, .rotary_en, .my_x(CW'(MX)), .my_y(CW'(MY)), .dim_x((CW+1)'(DIM)), .dim_y((CW+1)'(DIM)),
    .in_valid, .in_sop, .in_flit, .in_ready, .out_valid, .out_sop, .out_eop, .out_flit,
    .out_ecc_single, .out_ecc_double, .ev_nominate, .ev_reset, .ev_grant, .ev_rotary,
    .ev_cut_wait, .ev_link_wait, .ev_drain
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int sent = 0, recv = 0;
  longint grants = 0, cycles = 0;
  int max_g = 0;
  bit measure = 0;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a one-flit packet that input port p can send: half local, half torus
  function automatic header_t pick(int p);
    header_t h;
    h.vc = VC_W'(3 * $urandom_range(0, 5));
    h.len = 1;
    h.local_tgt = 2'($urandom_range(0, 2));
    if (p >= 5 || (p != 4 && $urandom_range(0, 1)) || (p == 4 && $urandom_range(0, 1))) begin
      // one hop in a torus direction this port may use
      int d;
      do d = $urandom_range(0, 3); while (p < 4 && d == p);
      h.dst_x = CW'(d == 2 ? 1 : d == 3 ? DIM - 1 : 0);
      h.dst_y = CW'(d == 0 ? 1 : d == 1 ? DIM - 1 : 0);
    end else begin
      h.dst_x = CW'(MX); h.dst_y = CW'(MY);
      if (p == 4) h.local_tgt = 2'($urandom_range(0, 1));   // the cache reaches MC0/MC1
    end
    return h;
  endfunction

  longint pc = 0;
  always_ff @(negedge clk) begin
    pc <= pc + 1;
    for (int p = 0; p < NUM_IN; p++) begin
      in_valid[p] <= 1'b0;
      in_sop[p]   <= 1'b0;
      if (rst_n && measure && in_ready[p] && (p >= 4 || pc % 3 != 2)) begin
        in_valid[p] <= 1'b1;
        in_sop[p]   <= 1'b1;
        in_flit[p]  <= ecc_encode(hdr_pack(pick(p)));
        sent++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    int g;
    g = $countones(ev_grant);
    if (measure) begin grants += g; cycles++; end
    if (g > max_g) max_g = g;
    for (int o = 0; o < NUM_OUT; o++) if (out_valid[o] && out_eop[o]) recv++;
  end

  initial begin
    real avg [2];
    in_valid = 0; in_sop = 0;
    for (int p = 0; p < NUM_IN; p++) in_flit[p] = '0;
    for (int run = 0; run < 2; run++) begin
      rst_n = 0; rotary_en = (run == 1);
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1;
      grants = 0; cycles = 0; sent = 0; recv = 0;
      measure = 1;
      repeat (3000) @(posedge clk);
      measure = 0;
      repeat (3000) @(posedge clk);
      avg[run] = real'(grants) / real'(cycles);
      $display("rotary=%0d matches per cycle %0.2f (max %0d), packets %0d/%0d",
               run, avg[run], max_g, recv, sent);
      check(recv == sent, "every packet delivered");
      check(avg[run] > 1.5, "loaded router sustains more than 1.5 matches per cycle");
    end
    check(max_g <= NUM_OUT, "never more matches than outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
