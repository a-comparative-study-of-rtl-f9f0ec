// dispatch_ctrl: delivery of one granted packet through one read port.
//
// After the output arbiter grants a packet nominated by this read port's
// arbiter, start loads the packet's slot, length and output. From then on
// the read port is busy and one flit read is issued per cycle in which
//   - the output may take a flit (pace_ok: always for a local output, two
//     cycles out of three for a torus output, whose link runs at 0.8 GHz
//     against the 1.2 GHz router clock), and
//   - the flit has already been written into the input buffer (written),
//     so a packet can leave before its tail has arrived.
// Each read carries sop/eop marks. With the last read, done pulses for one
// cycle: it frees the buffer slot and releases the output port, and the
// read port accepts a new start from the next cycle.
//
// As in the 21364 router: ports stay busy for a whole packet, links are a
// third slower than the router. Own choice: pacing the torus outputs here
// rather than timing the nominations.
module dispatch_ctrl
  import router_pkg::*;
#(
  parameter int unsigned SLOTS = 316,
  localparam int unsigned SW   = $clog2(SLOTS),
  localparam int unsigned KW   = $clog2(MAX_FLITS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SW-1:0]    start_slot,
  input  logic [LEN_W-1:0] start_len,
  input  port_t            start_out,
  input  logic             pace_ok,
  input  logic [KW-1:0]    written,      // flits written in the current slot
  output logic             busy,
  output logic [SW-1:0]    slot,
  output port_t            out,
  output logic             rd_en,
  output logic [KW-1:0]    rd_idx,
  output logic             rd_sop,
  output logic             rd_eop,
  output logic             done
);

  logic [LEN_W-1:0] len;

  always_comb begin
    rd_en  = busy && pace_ok && (rd_idx < written);
    rd_sop = (rd_idx == '0);
    rd_eop = (32'(rd_idx) + 1 == 32'(len));
    done   = rd_en && rd_eop;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      slot   <= '0;
      out    <= '0;
      len    <= '0;
      rd_idx <= '0;
    end else if (start && !busy) begin
      busy   <= 1'b1;
      slot   <= start_slot;
      out    <= start_out;
      len    <= start_len;
      rd_idx <= '0;
    end else if (done) begin
      busy   <= 1'b0;
    end else if (rd_en) begin
      rd_idx <= rd_idx + KW'(1);
    end
  end

  always_ff @(posedge clk) if (rst_n) begin
    assert (!(start && busy)) else $error("start while busy");
  end

endmodule
