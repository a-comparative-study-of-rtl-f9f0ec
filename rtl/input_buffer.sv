// input_buffer: flit storage of one input port (WrQ / RQ stages).
//
// SLOTS packet slots of MAX_FLITS flits each; slot s, flit k lives at word
// s*MAX_FLITS+k. One write port takes the arriving flits; two independent
// read ports, one per input port arbiter, read with one cycle of latency
// (registered output, the RQ stage). For every slot the number of flits
// written so far is kept (written[s]) so that a packet can be forwarded
// while its tail is still arriving (virtual cut-through): writing flit 0 of
// a slot restarts its count.
//
// Sizes follow the 21364 (316 packets per input port, 19-flit packets,
// 39-bit flits, two read ports). Storing every packet in a full 19-flit slot
// is this design's simplification; the real buffer organisation is not
// described.
module input_buffer
  import router_pkg::*;
#(
  parameter int unsigned SLOTS     = 316,
  parameter int unsigned MAX_FL    = MAX_FLITS,
  localparam int unsigned SW       = $clog2(SLOTS),
  localparam int unsigned KW       = $clog2(MAX_FL + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           wr_en,
  input  logic [SW-1:0]  wr_slot,
  input  logic [KW-1:0]  wr_idx,
  input  flit_t          wr_data,
  input  logic [1:0]     rd_en,
  input  logic [SW-1:0]  rd_slot [2],
  input  logic [KW-1:0]  rd_idx  [2],
  output flit_t          rd_data [2],
  output logic [KW-1:0]  written [SLOTS]
);

  flit_t mem [SLOTS * MAX_FL];

  always_ff @(posedge clk) begin
    if (wr_en) mem[32'(wr_slot) * MAX_FL + 32'(wr_idx)] <= wr_data;
    for (int k = 0; k < 2; k++)
      if (rd_en[k]) rd_data[k] <= mem[32'(rd_slot[k]) * MAX_FL + 32'(rd_idx[k])];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SLOTS; s++) written[s] <= '0;
    end else if (wr_en) begin
      written[wr_slot] <= wr_idx + KW'(1);
    end
  end

  always_ff @(posedge clk) if (rst_n && wr_en)
    assert (32'(wr_idx) < MAX_FL && 32'(wr_slot) < SLOTS) else $error("write outside the buffer");

endmodule
