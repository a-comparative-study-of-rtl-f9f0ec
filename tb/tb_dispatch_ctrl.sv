// Testbench for dispatch_ctrl: packets of random length are delivered while
// pacing and the number of flits already written vary; every read, its
// sop/eop marks, done and busy are checked against a model, and with free
// pacing and a fully written packet the delivery must take exactly len
// cycles.
module tb_dispatch_ctrl;
  import router_pkg::*;
  localparam int S = 8;
  localparam int SW = $clog2(S);
  localparam int KW = $clog2(MAX_FLITS + 1);
  logic clk = 0, rst_n = 0;
  logic start, pace_ok, busy, rd_en, rd_sop, rd_eop, done;
  logic [SW-1:0] start_slot, slot;
  logic [LEN_W-1:0] start_len;
  port_t start_out, out;
  logic [KW-1:0] written, rd_idx;
  int checks = 0, failures = 0;

  dispatch_ctrl #(.SLOTS(S)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    start = 0; pace_ok = 0; written = 0; start_slot = 0; start_len = 0; start_out = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 400; p++) begin
      int len, k, cycles;
      bit fast;
      fast = (p % 4 == 0);
      len = $urandom_range(1, 19);
      @(negedge clk);
      check(!busy, "idle before start");
      start = 1; start_slot = SW'($urandom); start_len = LEN_W'(len); start_out = port_t'($urandom_range(0, 6));
      written = fast ? KW'(len) : KW'($urandom_range(0, 1));
      @(negedge clk);
      start = 0;
      k = 0; cycles = 0;
      while (1) begin
        bit exp_rd;
        cycles++;
        pace_ok = fast ? 1'b1 : 1'($urandom_range(0, 2) != 0);
        if (!fast && written < KW'(len) && $urandom_range(0, 1)) written = written + 1'b1;
        #1;
        exp_rd = pace_ok && (k < written);
        check(busy && slot == start_slot && out == start_out, "busy/slot/out");
        check(rd_en == exp_rd, "rd_en");
        if (exp_rd) begin
          check(rd_idx == KW'(k) && rd_sop == (k == 0) && rd_eop == (k == len - 1), "read index/marks");
          check(done == (k == len - 1), "done");
          k++;
        end else check(!done, "no done");
        @(negedge clk);
        if (k == len) break;
      end
      if (fast) check(cycles == len, "one flit per cycle");
      check(!busy, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
