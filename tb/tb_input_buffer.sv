// Testbench for input_buffer: fills 4 slots of 19 flits with random data,
// reads them back through both read ports at once (one-cycle latency) and
// checks the per-slot written counts, including restart on a new header.
module tb_input_buffer;
  import router_pkg::*;
  localparam int S = 4;
  localparam int SW = $clog2(S);
  localparam int KW = $clog2(MAX_FLITS + 1);
  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [SW-1:0] wr_slot;
  logic [KW-1:0] wr_idx;
  flit_t wr_data;
  logic [1:0] rd_en;
  logic [SW-1:0] rd_slot [2];
  logic [KW-1:0] rd_idx [2];
  flit_t rd_data [2];
  logic [KW-1:0] written [S];
  flit_t ref_mem [S][MAX_FLITS];
  int checks = 0, failures = 0;

  input_buffer #(.SLOTS(S)) dut (.*);

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
    wr_en = 0; rd_en = 0; wr_slot = 0; wr_idx = 0; wr_data = 0;
    rd_slot[0] = 0; rd_slot[1] = 0; rd_idx[0] = 0; rd_idx[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < S; s++) check(written[s] == 0, "reset count");
    for (int round = 0; round < 20; round++) begin
      for (int s = 0; s < S; s++)
        for (int k = 0; k < MAX_FLITS; k++) begin
          wr_en = 1; wr_slot = SW'(s); wr_idx = KW'(k); wr_data = FLIT_W'({$urandom, $urandom});
          ref_mem[s][k] = wr_data;
          @(negedge clk);
          check(written[s] == KW'(k + 1), "written count");
        end
      wr_en = 0;
      for (int t = 0; t < 100; t++) begin
        int s0, s1, k0, k1;
        s0 = $urandom_range(0, S - 1); s1 = $urandom_range(0, S - 1);
        k0 = $urandom_range(0, MAX_FLITS - 1); k1 = $urandom_range(0, MAX_FLITS - 1);
        rd_en = 2'b11; rd_slot[0] = SW'(s0); rd_slot[1] = SW'(s1); rd_idx[0] = KW'(k0); rd_idx[1] = KW'(k1);
        @(negedge clk);
        check(rd_data[0] == ref_mem[s0][k0] && rd_data[1] == ref_mem[s1][k1], "read data");
      end
      rd_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
