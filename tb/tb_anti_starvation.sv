// Testbench for anti_starvation: random arrivals and departures of waiting
// packets (each with the color it got on arrival) against a model of the
// two color counts, the drain threshold and the color flip; checks that
// drain is entered and left at least once.
module tb_anti_starvation;
  import router_pkg::*;
  localparam int TH = 10, EP = 16;
  logic clk = 0, rst_n = 0;
  logic [7:0] arrive;
  logic [15:0] depart, depart_color;
  logic cur_color, drain;
  logic [12:0] old_count;
  int checks = 0, failures = 0;
  int waiting [2];
  int m_cnt [2];
  bit m_cur, m_drain;
  int m_timer;
  int drains = 0, flips = 0;

  anti_starvation #(.THRESH(TH), .EPOCH(EP), .NA(8), .ND(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    arrive = 0; depart = 0; depart_color = 0;
    m_cnt[0] = 0; m_cnt[1] = 0; m_cur = 0; m_drain = 0; m_timer = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int na, nd [2], oc;
      bit pd;
      bit load;
      check(cur_color == m_cur && drain == m_drain && old_count == 13'(m_cnt[!m_cur]), "state");
      load = ((cyc / 500) % 2 == 0);
      arrive = 0; depart = 0; depart_color = 0;
      for (int i = 0; i < 8; i++) if ($urandom_range(0, load ? 5 : 40) == 0) arrive[i] = 1;
      begin
        int c0, c1;
        c0 = m_cnt[0]; c1 = m_cnt[1];
        for (int i = 0; i < 16; i++)
          if ($urandom_range(0, 9) == 0) begin
            bit col;
            col = 1'($urandom);
            if (drain) col = !m_cur;          // only old packets leave while draining
            if (col == 0 && c0 > 0) begin depart[i] = 1; depart_color[i] = 0; c0--; end
            else if (col == 1 && c1 > 0) begin depart[i] = 1; depart_color[i] = 1; c1--; end
          end
      end
      na = $countones(arrive); nd[0] = 0; nd[1] = 0;
      for (int i = 0; i < 16; i++) if (depart[i]) nd[depart_color[i]]++;
      @(posedge clk);
      oc = m_cnt[!m_cur];
      pd = m_drain;
      for (int c = 0; c < 2; c++) m_cnt[c] = m_cnt[c] - nd[c] + ((c == int'(m_cur)) ? na : 0);
      if (!m_drain && oc > TH) begin m_drain = 1; drains++; end
      else if (m_drain && oc == 0) m_drain = 0;
      if (!pd && oc == 0 && m_timer >= EP) begin m_cur = !m_cur; m_timer = 0; flips++; end
      else if (m_timer < EP) m_timer++;
      @(negedge clk);
    end
    check(drains > 0 && flips > 0, "drain and flip happened");
    $display("drains=%0d flips=%0d", drains, flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
