// entry_table: arbitration status of the packets waiting in one input port.
//
// One record per packet slot of the input buffer (slot number = entry
// number). Per slot it keeps a valid bit, a nominated bit (set while an input
// port arbiter's nomination is in flight through the RE and GA stages), a
// granted bit (set from the grant until the last flit has left) and the
// decoded record (entry_t). Operations, all taking effect at the clock edge:
//   write    - the decode stage stores a new packet in a free slot;
//   nominate - each of the two read-port arbiters marks the packet it picked,
//              so it is not nominated again while in flight (SPAA step 1);
//   result   - the output arbiter's decision comes back: a granted packet is
//              marked granted, a packet that lost is made nominable again
//              (SPAA step 3, reset);
//   free     - dispatch of the packet finished; the slot becomes free.
// alloc_idx/alloc_ok name the lowest free slot for the next arrival.
// The table size follows the 21364's 316 packets per input port; the record
// layout and the lowest-free-slot allocation are this design's choices.
module entry_table
  import router_pkg::*;
#(
  parameter int unsigned DEPTH = 316,
  localparam int unsigned IW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  logic [IW-1:0]   wr_idx,
  input  entry_t          wr_ent,
  input  logic [1:0]      nom_en,
  input  logic [IW-1:0]   nom_idx   [2],
  input  logic [1:0]      res_valid,
  input  logic [1:0]      res_grant,
  input  logic [IW-1:0]   res_idx   [2],
  input  logic [1:0]      free_en,
  input  logic [IW-1:0]   free_idx  [2],
  output logic [DEPTH-1:0] valid,
  output logic [DEPTH-1:0] nominated,
  output logic [DEPTH-1:0] granted,
  output entry_t          ents      [DEPTH],
  output logic [IW-1:0]   alloc_idx,
  output logic            alloc_ok
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid     <= '0;
      nominated <= '0;
      granted   <= '0;
    end else begin
      for (int k = 0; k < 2; k++) begin
        if (nom_en[k]) nominated[nom_idx[k]] <= 1'b1;
        if (res_valid[k]) begin
          nominated[res_idx[k]] <= 1'b0;
          if (res_grant[k]) granted[res_idx[k]] <= 1'b1;
        end
        if (free_en[k]) begin
          valid[free_idx[k]]   <= 1'b0;
          granted[free_idx[k]] <= 1'b0;
        end
      end
      if (wr_en) begin
        valid[wr_idx]     <= 1'b1;
        nominated[wr_idx] <= 1'b0;
        granted[wr_idx]   <= 1'b0;
      end
    end
  end

  // record storage needs no reset: it is only read where valid is set
  always_ff @(posedge clk) begin
    if (wr_en) ents[wr_idx] <= wr_ent;
  end

  always_comb begin
    alloc_ok  = 1'b0;
    alloc_idx = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (!valid[i]) begin
        alloc_ok  = 1'b1;
        alloc_idx = IW'(i);
      end
  end

  // a packet must not be written over a live slot or nominated twice
  always_ff @(posedge clk) if (rst_n) begin
    if (wr_en) assert (!valid[wr_idx]) else $error("write to a live slot %0d", wr_idx);
    for (int k = 0; k < 2; k++)
      if (nom_en[k]) assert (valid[nom_idx[k]] && !nominated[nom_idx[k]] && !granted[nom_idx[k]])
        else $error("bad nomination of slot %0d", nom_idx[k]);
  end

endmodule
