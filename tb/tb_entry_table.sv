// Testbench for entry_table: random legal sequences of write, nominate,
// result (grant or reset) and free on an 8-entry table, checked every cycle
// against a model, including the lowest-free-slot allocation.
module tb_entry_table;
  import router_pkg::*;
  localparam int D = 8;
  localparam int IW = $clog2(D);
  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [IW-1:0] wr_idx;
  entry_t wr_ent;
  logic [1:0] nom_en, res_valid, res_grant, free_en;
  logic [IW-1:0] nom_idx [2], res_idx [2], free_idx [2];
  logic [D-1:0] valid, nominated, granted;
  entry_t ents [D];
  logic [IW-1:0] alloc_idx;
  logic alloc_ok;
  int checks = 0, failures = 0;

  bit m_v [D], m_n [D], m_g [D];
  entry_t m_e [D];

  entry_table #(.DEPTH(D)) dut (.*);

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
    wr_en = 0; nom_en = 0; res_valid = 0; res_grant = 0; free_en = 0;
    for (int k = 0; k < 2; k++) begin nom_idx[k] = 0; res_idx[k] = 0; free_idx[k] = 0; end
    wr_idx = 0; wr_ent = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      bit used [D];
      int lowest;
      @(negedge clk);
      // compare
      lowest = -1;
      for (int i = D - 1; i >= 0; i--) if (!m_v[i]) lowest = i;
      check(alloc_ok == (lowest >= 0), "alloc_ok");
      if (lowest >= 0) check(alloc_idx == IW'(lowest), "alloc_idx");
      for (int i = 0; i < D; i++) begin
        check(valid[i] == m_v[i] && nominated[i] == m_n[i] && granted[i] == m_g[i], "flags");
        if (m_v[i]) check(ents[i] == m_e[i], "record");
      end
      // drive a random legal set of operations on distinct entries
      for (int i = 0; i < D; i++) used[i] = 0;
      wr_en = 0; nom_en = 0; res_valid = 0; res_grant = 0; free_en = 0;
      if (lowest >= 0 && $urandom_range(0, 2) != 0) begin
        wr_en = 1; wr_idx = IW'(lowest); wr_ent = entry_t'({$urandom, $urandom});
        used[lowest] = 1;
      end
      for (int k = 0; k < 2; k++) begin
        int i;
        i = $urandom_range(0, D - 1);
        if (!used[i] && m_v[i] && !m_n[i] && !m_g[i] && $urandom_range(0, 1)) begin
          nom_en[k] = 1; nom_idx[k] = IW'(i); used[i] = 1;
        end
        i = $urandom_range(0, D - 1);
        if (!used[i] && m_n[i] && $urandom_range(0, 1)) begin
          res_valid[k] = 1; res_grant[k] = 1'($urandom); res_idx[k] = IW'(i); used[i] = 1;
        end
        i = $urandom_range(0, D - 1);
        if (!used[i] && m_g[i] && $urandom_range(0, 2) == 0) begin
          free_en[k] = 1; free_idx[k] = IW'(i); used[i] = 1;
        end
      end
      @(posedge clk);
      #1;
      // model update
      if (wr_en) begin m_v[wr_idx] = 1; m_n[wr_idx] = 0; m_g[wr_idx] = 0; m_e[wr_idx] = wr_ent; end
      for (int k = 0; k < 2; k++) begin
        if (nom_en[k]) m_n[nom_idx[k]] = 1;
        if (res_valid[k]) begin m_n[res_idx[k]] = 0; if (res_grant[k]) m_g[res_idx[k]] = 1; end
        if (free_en[k]) begin m_v[free_idx[k]] = 0; m_g[free_idx[k]] = 0; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
