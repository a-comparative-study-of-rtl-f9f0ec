// input_port_arbiter: one local arbiter (LA) of the SPAA pipeline, serving
// one read port of an input buffer (16 of them in the router).
//
// Every cycle it looks at the entry table of its input port and keeps the
// packets that pass the readiness tests:
//   - the packet is waiting (valid, not nominated, not granted);
//   - one of its candidate outputs is connected to this read port (the
//     connection matrix, router_pkg::conn_ok) and is not busy;
//   - this read port is not busy delivering another packet;
//   - the partner read port did not pick the same packet this cycle;
//   - while the anti-starvation logic drains, the packet is old-colored.
// Among those it takes the least-recently selected virtual channel and, in
// it, the oldest packet, and nominates it to exactly one output: the first
// candidate if that one is usable, else the second (SPAA step 1). The
// nomination is registered (end of the LA stage) together with the packet's
// slot and length. The virtual-channel choice is a 19x19 least-recently-
// selected matrix updated on each nomination.
//
// As in the 21364 router: oldest packet from the least-recently selected VC,
// one output per nomination, pair synchronization. Own choices: the age is
// the arrival stamp counted modulo 2^AGE_W against the port's current stamp;
// preference for the first (X) candidate.
module input_port_arbiter
  import router_pkg::*;
#(
  parameter int unsigned DEPTH  = 316,
  parameter int unsigned LA_ID  = 0,
  localparam int unsigned IW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DEPTH-1:0] valid,
  input  logic [DEPTH-1:0] nominated,
  input  logic [DEPTH-1:0] granted,
  input  entry_t           ents      [DEPTH],
  input  logic [AGE_W-1:0] now_stamp,     // stamp the next arrival would get
  input  logic [NUM_OUT-1:0] out_busy,
  input  logic             rp_busy,
  input  logic             drain,
  input  logic             cur_color,
  input  logic             excl_valid,    // partner's pick this cycle
  input  logic [IW-1:0]    excl_idx,
  // this cycle's pick (combinational, for the partner)
  output logic             pick_valid,
  output logic [IW-1:0]    pick_idx,
  // registered nomination (LA stage output)
  output logic             nom_valid,
  output logic [IW-1:0]    nom_idx,
  output port_t            nom_out,
  output logic [LEN_W-1:0] nom_len
);

  logic [DEPTH-1:0]  elig;
  logic [DEPTH-1:0]  use1;             // second candidate chosen
  logic [NUM_VC-1:0] vc_has;
  logic [NUM_VC-1:0] older [NUM_VC];   // older[i][j]: i selected before j
  logic [NUM_VC-1:0] vc_sel;
  logic [VC_W-1:0]   vc_idx;
  logic [AGE_W-1:0]  best_age, age;
  port_t             pick_out;

  always_comb begin
    vc_has = '0;
    for (int i = 0; i < DEPTH; i++) begin
      logic ok0, ok1;
      ok0 = conn_ok(LA_ID, 32'(ents[i].cand0)) && !out_busy[ents[i].cand0];
      ok1 = ents[i].has_cand1 && conn_ok(LA_ID, 32'(ents[i].cand1)) && !out_busy[ents[i].cand1];
      use1[i] = !ok0;
      elig[i] = valid[i] && !nominated[i] && !granted[i] && (ok0 || ok1) && !rp_busy
                && !(drain && ents[i].color == cur_color)
                && !(excl_valid && excl_idx == IW'(i));
      if (elig[i] && ents[i].vc < VC_W'(NUM_VC)) vc_has[ents[i].vc] = 1'b1;
    end
  end

  // least-recently selected virtual channel that has an eligible packet
  always_comb begin
    vc_sel = '0;
    vc_idx = '0;
    for (int v = 0; v < NUM_VC; v++)
      if (vc_has[v] && ((older[v] | ~vc_has) | (NUM_VC'(1) << v)) == '1) begin
        vc_sel[v] = 1'b1;
        vc_idx    = VC_W'(v);
      end
  end

  // oldest eligible packet of that channel
  always_comb begin
    pick_valid = 1'b0;
    pick_idx   = '0;
    pick_out   = '0;
    best_age   = '0;
    for (int i = 0; i < DEPTH; i++) begin
      age = now_stamp - ents[i].stamp;
      if (elig[i] && ents[i].vc == vc_idx && (!pick_valid || age > best_age)) begin
        pick_valid = 1'b1;
        pick_idx   = IW'(i);
        best_age   = age;
        pick_out   = use1[i] ? ents[i].cand1 : ents[i].cand0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nom_valid <= 1'b0;
      nom_idx   <= '0;
      nom_out   <= '0;
      nom_len   <= '0;
      for (int i = 0; i < NUM_VC; i++)
        for (int j = 0; j < NUM_VC; j++) older[i][j] <= (i < j);
    end else begin
      nom_valid <= pick_valid;
      nom_idx   <= pick_idx;
      nom_out   <= pick_out;
      nom_len   <= ents[pick_idx].len;
      if (pick_valid)
        for (int j = 0; j < NUM_VC; j++) begin
          older[vc_idx][j] <= 1'b0;
          older[j][vc_idx] <= (j != 32'(vc_idx));
        end
    end
  end

  // exactly one channel is least recently selected among those with work
  always_ff @(posedge clk) if (rst_n && vc_has != '0)
    assert ($onehot(vc_sel)) else $error("LRS channel choice not one-hot");

endmodule
