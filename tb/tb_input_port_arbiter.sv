// Testbench for input_port_arbiter: an 8-entry table with random contents
// each cycle; the pick (least-recently selected VC, then oldest packet,
// readiness tests, connection matrix, partner exclusion, drain) and the
// registered nomination are compared with a model that keeps its own VC
// selection order.
module tb_input_port_arbiter;
  import router_pkg::*;
  localparam int D = 8;
  localparam int IW = $clog2(D);
  localparam int LA = 2;     // South input, read port 0
  logic clk = 0, rst_n = 0;
  logic [D-1:0] valid, nominated, granted;
  entry_t ents [D];
  logic [AGE_W-1:0] now_stamp;
  logic [NUM_OUT-1:0] out_busy;
  logic rp_busy, drain, cur_color, excl_valid;
  logic [IW-1:0] excl_idx;
  logic pick_valid, nom_valid;
  logic [IW-1:0] pick_idx, nom_idx;
  port_t nom_out;
  logic [LEN_W-1:0] nom_len;
  int checks = 0, failures = 0;
  int lru [$];            // VCs, least recently selected first
  bit exp_v; int exp_i; port_t exp_o;

  input_port_arbiter #(.DEPTH(D), .LA_ID(LA)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t exp %0b/%0d got %0b/%0d", what, $time, exp_v, exp_i, pick_valid, pick_idx); end
  endtask

  function automatic bool_ok(port_t o);
    return conn_ok(LA, o) && !out_busy[o];
  endfunction

  task automatic model();
    bit el [D];
    bit has [NUM_VC];
    int vsel;
    int best;
    for (int v = 0; v < NUM_VC; v++) has[v] = 0;
    for (int i = 0; i < D; i++) begin
      bit ok0, ok1;
      ok0 = bool_ok(ents[i].cand0);
      ok1 = ents[i].has_cand1 && bool_ok(ents[i].cand1);
      el[i] = valid[i] && !nominated[i] && !granted[i] && (ok0 || ok1) && !rp_busy
              && !(drain && ents[i].color == cur_color) && !(excl_valid && excl_idx == IW'(i));
      if (el[i]) has[ents[i].vc] = 1;
    end
    vsel = -1;
    foreach (lru[k]) if (vsel < 0 && has[lru[k]]) vsel = lru[k];
    exp_v = 0; exp_i = 0; best = -1;
    if (vsel >= 0)
      for (int i = 0; i < D; i++)
        if (el[i] && ents[i].vc == VC_W'(vsel)) begin
          int age;
          age = int'(AGE_W'(now_stamp - ents[i].stamp));
          if (age > best) begin
            best = age; exp_v = 1; exp_i = i;
            exp_o = bool_ok(ents[i].cand0) ? ents[i].cand0 : ents[i].cand1;
          end
        end
  endtask

  initial begin
    bit pv; int pi; port_t po; logic [LEN_W-1:0] pl;
    for (int v = 0; v < NUM_VC; v++) lru.push_back(v);
    valid = 0; nominated = 0; granted = 0; out_busy = 0; rp_busy = 0; drain = 0;
    cur_color = 0; excl_valid = 0; excl_idx = 0; now_stamp = 0;
    for (int i = 0; i < D; i++) ents[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    pv = 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      if (cyc > 0) begin
        check(nom_valid == pv, "nom_valid");
        if (pv) check(nom_idx == IW'(pi) && nom_out == po && nom_len == pl, "nomination");
      end
      now_stamp = AGE_W'($urandom);
      for (int i = 0; i < D; i++) begin
        ents[i].vc = ($urandom_range(0, 5) == 0) ? VC_W'(18) : VC_W'($urandom_range(0, 3));
        ents[i].len = LEN_W'($urandom_range(1, 19));
        ents[i].cand0 = port_t'($urandom_range(0, 6));
        ents[i].cand1 = port_t'($urandom_range(0, 6));
        ents[i].has_cand1 = 1'($urandom);
        ents[i].color = 1'($urandom);
        ents[i].stamp = now_stamp - AGE_W'($urandom_range(1, 600));
      end
      valid = D'($urandom); nominated = D'($urandom) & D'($urandom);
      granted = D'($urandom) & D'($urandom) & D'($urandom);
      out_busy = NUM_OUT'($urandom) & NUM_OUT'($urandom);
      rp_busy = ($urandom_range(0, 9) == 0);
      drain = ($urandom_range(0, 4) == 0); cur_color = 1'($urandom);
      excl_valid = 1'($urandom); excl_idx = IW'($urandom);
      #1;
      model();
      check(pick_valid == exp_v, "pick_valid");
      if (exp_v) check(pick_idx == IW'(exp_i), "pick_idx");
      pv = exp_v; pi = exp_i; po = exp_o; pl = ents[exp_i].len;
      if (exp_v) begin
        int v;
        v = ents[exp_i].vc;
        foreach (lru[k]) if (lru[k] == v) begin lru.delete(k); break; end
        lru.push_back(v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
