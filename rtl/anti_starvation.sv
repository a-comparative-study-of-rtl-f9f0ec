// anti_starvation: two-color anti-starvation control of the router.
//
// Every arriving packet takes the current color (cur_color); packets of the
// other color are "old". The block counts waiting packets of each color
// (arrivals in, finished dispatches out). When the old-colored count rises
// above THRESH it enters drain mode, in which the input port arbiters
// nominate only old-colored packets; drain ends when no old packet is left.
// Outside drain, once no old packet is left and EPOCH cycles have passed
// since the last change, the current color flips, so the packets waiting now
// become the old ones. The Rotary Rule relies on this to clear the
// starvation its priority to torus traffic can cause.
//
// As in the 21364 router: two colors, a threshold on old packets, old packets
// drained before new ones are routed. Own choices (the 21364 description leaves them
// out): when the color flips, THRESH and EPOCH.
module anti_starvation
  import router_pkg::*;
#(
  parameter int unsigned THRESH = 64,
  parameter int unsigned EPOCH  = 1024,
  parameter int unsigned NA     = NUM_IN,   // arrival inputs
  parameter int unsigned ND     = NUM_LA,   // departure inputs
  localparam int unsigned CNT_W = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NA-1:0] arrive,
  input  logic [ND-1:0] depart,
  input  logic [ND-1:0] depart_color,
  output logic          cur_color,
  output logic          drain,
  output logic [CNT_W-1:0] old_count
);

  logic [CNT_W-1:0] cnt [2];
  logic [CNT_W-1:0] n_arr, n_dep [2];
  logic [$clog2(EPOCH+1)-1:0] timer;

  always_comb begin
    n_arr    = '0;
    n_dep[0] = '0;
    n_dep[1] = '0;
    for (int i = 0; i < NA; i++) n_arr += CNT_W'(arrive[i]);
    for (int i = 0; i < ND; i++)
      if (depart[i]) n_dep[depart_color[i]] += CNT_W'(1);
    old_count = cnt[!cur_color];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt[0]    <= '0;
      cnt[1]    <= '0;
      cur_color <= 1'b0;
      drain     <= 1'b0;
      timer     <= '0;
    end else begin
      for (int c = 0; c < 2; c++)
        cnt[c] <= cnt[c] - n_dep[c] + ((c == int'(cur_color)) ? n_arr : '0);
      if (!drain && old_count > CNT_W'(THRESH)) drain <= 1'b1;
      else if (drain && old_count == '0) drain <= 1'b0;
      if (!drain && old_count == '0 && 32'(timer) >= EPOCH) begin
        cur_color <= !cur_color;
        timer     <= '0;
      end else if (32'(timer) < EPOCH) begin
        timer <= timer + 1'b1;
      end
    end
  end

endmodule
