// Full-size testbench for spaa_router with every parameter at its default
// (316 packet slots per input port). One complete operation: a burst of
// packets enters all eight input ports at once, is arbitrated, crosses the
// crossbar and leaves; every packet must leave once, on an allowed output,
// with its data intact.
module tb_spaa_router_full;
  import router_pkg::*;
  localparam int MX = 1, MY = 2, DIM = 4;

  logic clk = 0, rst_n = 0;
  logic [NUM_IN-1:0] in_valid, in_sop, in_ready;
  flit_t in_flit [NUM_IN];
  logic [NUM_OUT-1:0] out_valid, out_sop, out_eop, out_ecc_single, out_ecc_double;
  flit_t out_flit [NUM_OUT];
  logic [NUM_LA-1:0] ev_nominate, ev_reset, ev_grant, ev_cut_wait, ev_link_wait;
  logic [NUM_OUT-1:0] ev_rotary;
  logic ev_drain;

  spaa_router dut (
    .clk, .rst_n, .rotary_en(1'b1), .my_x(CW'(MX)), .my_y(CW'(MY)),
    .dim_x((CW+1)'(DIM)), .dim_y((CW+1)'(DIM)),
    .in_valid, .in_sop, .in_flit, .in_ready, .out_valid, .out_sop, .out_eop, .out_flit,
    .out_ecc_single, .out_ecc_double, .ev_nominate, .ev_reset, .ev_grant, .ev_rotary,
    .ev_cut_wait, .ev_link_wait, .ev_drain
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // packet p of input port i: destination chosen so the input can reach it
  // (torus inputs: East/West neighbours' rows; local inputs: the torus)
  localparam int NPK = 4;               // packets per input port
  logic [31:0] data [NUM_IN][NPK][MAX_FLITS];
  int len [NUM_IN][NPK];
  bit [6:0] allow [NUM_IN][NPK];
  int got [NUM_IN][NPK];

  function automatic header_t hdr_for(int i, int k);
    header_t h;
    // i = 0 (North in) .. 7; send everything towards x = MX+1 (East) or local MCs
    h.dst_x = CW'((MX + 1) % DIM);
    h.dst_y = CW'((MY + k) % DIM);
    h.vc = VC_W'(3 * (k % 6));
    h.local_tgt = 2'(k % 2);
    h.len = LEN_W'((k % 2 == 0) ? 19 : 3);
    if (i == 2) begin h.dst_x = CW'(MX); h.dst_y = CW'(MY); end  // East input: deliver locally
    return h;
  endfunction

  initial begin
    int o_i [NUM_OUT], o_k [NUM_OUT], o_f [NUM_OUT];
    int total;
    in_valid = 0; in_sop = 0;
    for (int i = 0; i < NUM_IN; i++) in_flit[i] = 0;
    for (int i = 0; i < NUM_IN; i++)
      for (int k = 0; k < NPK; k++) begin
        header_t h;
        int fy;
        h = hdr_for(i, k);
        len[i][k] = h.len;
        data[i][k][0] = hdr_pack(h) | (32'(i) << 28) | (32'(k) << 24);
        for (int f = 1; f < MAX_FLITS; f++) data[i][k][f] = $urandom;
        allow[i][k] = 0;
        fy = (h.dst_y - MY + DIM) % DIM;
        if (h.dst_x == CW'(MX) && h.dst_y == CW'(MY)) allow[i][k][O_MC0 + k % 2] = 1;
        else begin
          allow[i][k][O_E] = 1;
          if (fy != 0) allow[i][k][(fy <= DIM / 2) ? O_N : O_S] = 1;
        end
        got[i][k] = 0;
      end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fork
      // all eight input ports stream their packets back to back
      for (int f = 0; f < NPK * MAX_FLITS; f++) begin
        @(negedge clk);
        for (int i = 0; i < NUM_IN; i++) begin
          int k, j, acc;
          acc = 0; k = -1; j = 0;
          for (int q = 0; q < NPK; q++) if (k < 0 && f < acc + len[i][q]) begin k = q; j = f - acc; end
          else if (k < 0) acc += len[i][q];
          in_valid[i] = (k >= 0);
          in_sop[i]   = (k >= 0) && (j == 0);
          in_flit[i]  = (k >= 0) ? ecc_encode(data[i][k][j]) : '0;
        end
      end
      begin
        for (int o = 0; o < NUM_OUT; o++) o_i[o] = -1;
        total = 0;
        while (total < NUM_IN * NPK) begin
          @(posedge clk);
          #1;
          for (int o = 0; o < NUM_OUT; o++) if (out_valid[o]) begin
            if (out_sop[o]) begin
              o_i[o] = int'(out_flit[o][30:28]); o_k[o] = int'(out_flit[o][25:24]); o_f[o] = 0;
              check(allow[o_i[o]][o_k[o]][o], "allowed output");
            end
            check(out_flit[o] == ecc_encode(data[o_i[o]][o_k[o]][o_f[o]]), "flit data");
            o_f[o]++;
            if (out_eop[o]) begin
              check(o_f[o] == len[o_i[o]][o_k[o]], "packet length");
              got[o_i[o]][o_k[o]]++;
              total++;
            end
          end
        end
      end
    join
    @(negedge clk);
    in_valid = 0;
    for (int i = 0; i < NUM_IN; i++)
      for (int k = 0; k < NPK; k++) check(got[i][k] == 1, "delivered once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
