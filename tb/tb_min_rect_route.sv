// Testbench for min_rect_route: all positions in rings of size 1..8 and 16,
// compared with distances computed by counting hops both ways round.
module tb_min_rect_route;
  import router_pkg::*;
  logic [CW-1:0] cx, cy, dx, dy;
  logic [CW:0]   nx, ny;
  logic has_x, has_y;
  port_t dir_x, dir_y, dor;
  int checks = 0, failures = 0;

  min_rect_route dut (.cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .dim_x(nx), .dim_y(ny),
                      .has_x, .has_y, .dir_x, .dir_y, .dor_dir(dor));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s cx=%0d dx=%0d n=%0d", what, cx, dx, nx); end
  endtask

  initial begin
    int sizes[$] = '{1, 2, 3, 4, 5, 6, 7, 8, 16};
    foreach (sizes[si]) begin
      int n;
      n = sizes[si];
      for (int c = 0; c < n; c++)
        for (int d = 0; d < n; d++) begin
          int east, west;
          // hops going the positive way: step until we reach d
          east = 0;
          for (int p = c; p != d; p = (p + 1) % n) east++;
          west = (n - east) % n;
          nx = (CW+1)'(n); ny = (CW+1)'(n);
          cx = CW'(c); dx = CW'(d); cy = CW'((c + 1) % n); dy = CW'(d);
          #1;
          check(has_x == (east != 0), "has_x");
          if (east != 0) check(dir_x == ((east <= west) ? O_E : O_W), "dir_x");
          if (east != 0) check(dor == dir_x, "dor");
          // Y uses the same ring, offset start
          begin
            int ny_e;
            ny_e = 0;
            for (int p = (c + 1) % n; p != d; p = (p + 1) % n) ny_e++;
            check(has_y == (ny_e != 0), "has_y");
            if (ny_e != 0) check(dir_y == ((ny_e <= (n - ny_e) % n) ? O_N : O_S), "dir_y");
            if (east == 0 && ny_e != 0) check(dor == dir_y, "dor_y");
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
