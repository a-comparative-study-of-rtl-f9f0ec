// Testbench for crossbar: each cycle every output is given at most one
// connected sender (plus read ports sending nothing); the registered output
// flits and marks must come from that sender. Also checks that all 54
// connection points carry data.
module tb_crossbar;
  import router_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NUM_LA-1:0] rp_valid, rp_sop, rp_eop;
  flit_t rp_flit [NUM_LA];
  port_t rp_out [NUM_LA];
  logic [NUM_OUT-1:0] out_valid, out_sop, out_eop;
  flit_t out_flit [NUM_OUT];
  int checks = 0, failures = 0;
  bit seen [NUM_LA][NUM_OUT];

  crossbar dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int sender [NUM_OUT];
    int npts;
    rp_valid = 0; rp_sop = 0; rp_eop = 0;
    for (int l = 0; l < NUM_LA; l++) begin rp_flit[l] = 0; rp_out[l] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit busy_rp [NUM_LA];
      @(negedge clk);
      for (int l = 0; l < NUM_LA; l++) busy_rp[l] = 0;
      rp_valid = 0;
      for (int o = 0; o < NUM_OUT; o++) begin
        sender[o] = -1;
        if ($urandom_range(0, 3) != 0)
          for (int tries = 0; tries < 20 && sender[o] < 0; tries++) begin
            int l;
            l = $urandom_range(0, NUM_LA - 1);
            if (!busy_rp[l] && conn_ok(l, o)) sender[o] = l;
          end
        if (sender[o] >= 0) begin
          busy_rp[sender[o]] = 1;
          rp_valid[sender[o]] = 1; rp_out[sender[o]] = port_t'(o);
        end
      end
      for (int l = 0; l < NUM_LA; l++) begin
        rp_flit[l] = FLIT_W'({$urandom, $urandom});
        rp_sop[l] = 1'($urandom); rp_eop[l] = 1'($urandom);
        if (!busy_rp[l]) rp_out[l] = port_t'($urandom_range(0, 6));  // idle ports carry junk
      end
      @(posedge clk);
      #1;
      for (int o = 0; o < NUM_OUT; o++) begin
        check(out_valid[o] == (sender[o] >= 0), "valid");
        if (sender[o] >= 0) begin
          check(out_flit[o] == rp_flit[sender[o]] && out_sop[o] == rp_sop[sender[o]]
                && out_eop[o] == rp_eop[sender[o]], "data");
          seen[sender[o]][o] = 1;
        end
      end
    end
    npts = 0;
    for (int l = 0; l < NUM_LA; l++) for (int o = 0; o < NUM_OUT; o++) npts += seen[l][o];
    check(npts == 54, "54 crosspoints used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
