// Testbench for header_decode: random headers in a 8x8 torus, candidate
// outputs compared with a reference written from the routing rules.
module tb_header_decode;
  import router_pkg::*;
  flit_t hdr;
  logic [CW-1:0] mx, my;
  logic [CW:0] nx, ny;
  logic color;
  logic [AGE_W-1:0] stamp;
  entry_t ent;
  int checks = 0, failures = 0;

  header_decode dut (.hdr, .my_x(mx), .my_y(my), .dim_x(nx), .dim_y(ny), .color, .stamp, .ent);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fwd(int c, int d, int n);
    return (d - c + n) % n;
  endfunction

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s hdr=%h ent=%p", what, hdr, ent); end
  endtask

  initial begin
    header_t h;
    nx = 8; ny = 8;
    for (int t = 0; t < 3000; t++) begin
      int fx, fy;
      port_t ex, ey;
      mx = CW'($urandom_range(0, 7)); my = CW'($urandom_range(0, 7));
      h.dst_x = CW'($urandom_range(0, 7)); h.dst_y = CW'($urandom_range(0, 7));
      if (t % 4 == 0) begin h.dst_x = mx; h.dst_y = my; end
      h.vc = VC_W'($urandom_range(0, 18));
      h.len = LEN_W'($urandom_range(0, 31));
      h.local_tgt = 2'($urandom);
      color = 1'($urandom); stamp = AGE_W'($urandom);
      hdr = ecc_encode(hdr_pack(h));
      #1;
      fx = fwd(mx, h.dst_x, 8); fy = fwd(my, h.dst_y, 8);
      ex = (fx <= 4) ? O_E : O_W;
      ey = (fy <= 4) ? O_N : O_S;
      check(ent.vc == h.vc && ent.color == color && ent.stamp == stamp, "copy");
      check(ent.len == ((h.len == 0) ? 1 : (h.len > 19) ? 19 : h.len), "len");
      if (fx == 0 && fy == 0) begin
        check(ent.cand0 == ((h.local_tgt == 0) ? O_MC0 : (h.local_tgt == 1) ? O_MC1 : O_IO) && !ent.has_cand1, "local");
      end else if (h.vc < 18 && h.vc % 3 == 0) begin
        check(ent.cand0 == ((fx != 0) ? ex : ey), "adaptive cand0");
        check(ent.has_cand1 == (fx != 0 && fy != 0), "adaptive has1");
        if (fx != 0 && fy != 0) check(ent.cand1 == ey, "adaptive cand1");
      end else begin
        check(ent.cand0 == ((fx != 0) ? ex : ey) && !ent.has_cand1, "dimension order");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
