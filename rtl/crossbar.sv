// crossbar: the X stage, from the 16 input-buffer read ports to the 7
// output ports.
//
// Each read port presents a flit with its destination output and packet
// marks. An output takes the flit of the read port that is sending to it;
// only read ports that the connection matrix (router_pkg::conn_ok) joins to
// that output are wired, so the datapath has the same 54 crosspoints as the
// arbiters. The output arbiters guarantee that at most one read port sends to
// an output at a time. One register stage (the X stage).
//
// As in the 21364 router: the datapath uses the arbiters' connection matrix.
// Own choice: the particular 54-point pattern (see router_pkg).
module crossbar
  import router_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_LA-1:0]   rp_valid,
  input  flit_t               rp_flit [NUM_LA],
  input  port_t               rp_out  [NUM_LA],
  input  logic [NUM_LA-1:0]   rp_sop,
  input  logic [NUM_LA-1:0]   rp_eop,
  output logic [NUM_OUT-1:0]  out_valid,
  output flit_t               out_flit [NUM_OUT],
  output logic [NUM_OUT-1:0]  out_sop,
  output logic [NUM_OUT-1:0]  out_eop
);

  logic [NUM_OUT-1:0] v_d, s_d, e_d;
  flit_t              f_d [NUM_OUT];

  always_comb begin
    for (int o = 0; o < NUM_OUT; o++) begin
      v_d[o] = 1'b0;
      s_d[o] = 1'b0;
      e_d[o] = 1'b0;
      f_d[o] = '0;
      for (int l = 0; l < NUM_LA; l++)
        if (conn_ok(l, o) && rp_valid[l] && rp_out[l] == port_t'(o)) begin
          v_d[o] = 1'b1;
          s_d[o] = rp_sop[l];
          e_d[o] = rp_eop[l];
          f_d[o] = rp_flit[l];
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_sop   <= '0;
      out_eop   <= '0;
    end else begin
      out_valid <= v_d;
      out_sop   <= s_d;
      out_eop   <= e_d;
    end
  end

  always_ff @(posedge clk) out_flit <= f_d;

  // one sender per output
  always_comb
    for (int o = 0; o < NUM_OUT; o++) begin
      int n;
      n = 0;
      for (int l = 0; l < NUM_LA; l++)
        if (conn_ok(l, o) && rp_valid[l] && rp_out[l] == port_t'(o)) n++;
      assert (n <= 1 || !rst_n) else $error("two read ports drive output %0d", o);
    end

endmodule
