// Testbench for output_port_arbiter: random nominations, with and without
// the Rotary Rule, against a least-recently-selected model; also checks that
// nothing is granted while the output is busy and that release frees it.
module tb_output_port_arbiter;
  import router_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic rotary_en, release_i, busy;
  logic [N-1:0] net_mask, req, gnt;
  int checks = 0, failures = 0;
  int lru [$];
  bit m_busy;
  int rot_used = 0;

  output_port_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t req=%h gnt=%h", what, $time, req, gnt); end
  endtask

  initial begin
    logic [N-1:0] cand, exp;
    for (int i = 0; i < N; i++) lru.push_back(i);
    net_mask = 16'h00ff; req = 0; release_i = 0; rotary_en = 0; m_busy = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      rotary_en = (cyc >= 3000);
      req = N'($urandom) & N'($urandom);
      release_i = m_busy && ($urandom_range(0, 3) == 0);
      #1;
      check(busy == m_busy, "busy");
      cand = m_busy ? '0 : req;
      if (rotary_en && (cand & net_mask) != 0) begin
        if ((cand & ~net_mask) != 0) rot_used++;
        cand &= net_mask;
      end
      exp = '0;
      foreach (lru[k]) if (exp == 0 && cand[lru[k]]) exp[lru[k]] = 1'b1;
      check(gnt == exp, "grant");
      @(posedge clk);
      if (exp != 0) begin
        int w;
        m_busy = 1;
        w = $clog2(exp);
        foreach (lru[k]) if (lru[k] == w) begin lru.delete(k); break; end
        lru.push_back(w);
      end else if (release_i) m_busy = 0;
    end
    check(rot_used > 0, "rotary rule exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
