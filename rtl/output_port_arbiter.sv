// output_port_arbiter: the global arbiter (GA) of one output port.
//
// In the GA stage it sees the nominations addressed to its output from the
// 16 input port arbiters (req, one bit per LA; the caller has already
// dropped nominations whose read port is busy). If the output is free it
// grants the nomination of the least-recently selected LA (SPAA step 2,
// SPAA-base). With the Rotary Rule enabled (a static, boot-time mode) the
// nominations from the four torus input ports are considered first and local
// ones only when no torus nomination is present; within each group the
// choice is again least-recently selected (SPAA-rotary). The grant is
// combinational in the GA cycle; the least-recently-selected matrix and the
// busy flag update at the clock edge. The output stays busy from the grant
// until the dispatch logic signals release after the packet's last flit.
//
// As in the 21364 router: least-recently selected, Rotary Rule priority,
// re-arbitration only after the whole packet. Own choice: the 16x16 matrix
// form of least-recently selected and its reset order (lower LA first).
module output_port_arbiter
  import router_pkg::*;
#(
  parameter int unsigned N = NUM_LA
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rotary_en,
  input  logic [N-1:0] net_mask,   // LAs of torus input ports
  input  logic [N-1:0] req,
  input  logic         release_i,  // last flit of the current packet sent
  output logic [N-1:0] gnt,
  output logic         busy
);

  logic [N-1:0] older [N];   // older[i][j]: i granted less recently than j
  logic [N-1:0] cand;

  always_comb begin
    cand = busy ? '0 : req;
    if (rotary_en && (cand & net_mask) != '0) cand = cand & net_mask;
    gnt = '0;
    for (int i = 0; i < N; i++)
      if (cand[i] && ((older[i] | ~cand) | (N'(1) << i)) == '1) gnt[i] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) older[i][j] <= (i < j);
    end else begin
      if (gnt != '0) busy <= 1'b1;
      else if (release_i) busy <= 1'b0;
      for (int i = 0; i < N; i++)
        if (gnt[i])
          for (int j = 0; j < N; j++) begin
            older[i][j] <= 1'b0;
            older[j][i] <= (j != i);
          end
    end
  end

  always_ff @(posedge clk) if (rst_n) begin
    assert ($onehot0(gnt)) else $error("more than one grant");
    if (cand != '0) assert ($onehot(gnt)) else $error("request left without grant");
  end

endmodule
