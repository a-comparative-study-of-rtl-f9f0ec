// Testbench for ecc_correct: clean flits pass, every single-bit error is
// corrected, random double-bit errors are flagged.
module tb_ecc_correct;
  import router_pkg::*;
  flit_t in_flit, out_flit;
  logic e1, e2;
  int checks = 0, failures = 0;

  ecc_correct dut (.in_flit, .out_flit, .err_single(e1), .err_double(e2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s in=%h out=%h", what, in_flit, out_flit); end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      logic [31:0] d;
      flit_t good;
      d = $urandom;
      good = ecc_encode(d);
      in_flit = good; #1;
      check(out_flit == good && !e1 && !e2, "clean");
      for (int b = 0; b < FLIT_W; b++) begin
        in_flit = good ^ (FLIT_W'(1) << b); #1;
        check(out_flit == good && e1 && !e2, "single");
      end
      begin
        int b1, b2;
        b1 = $urandom_range(0, FLIT_W - 1);
        b2 = (b1 + $urandom_range(1, FLIT_W - 1)) % FLIT_W;
        in_flit = good ^ (FLIT_W'(1) << b1) ^ (FLIT_W'(1) << b2); #1;
        check(e2 && !e1, "double");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
