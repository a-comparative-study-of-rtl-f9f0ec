// ecc_correct: the ECC stage of the data pipeline.
//
// A 39-bit flit carries 32 data bits and 7 check bits. This block recomputes
// the check bits, corrects any single-bit error (in data or check bits),
// flags double-bit errors, and re-encodes the (corrected) data so that the
// flit leaves with valid check bits. Combinational.
//
// The 32+7 split follows the 21364 flit. The code itself, an extended
// Hamming (SEC-DED) code laid out as in router_pkg, is this design's choice.
module ecc_correct
  import router_pkg::*;
(
  input  flit_t in_flit,
  output flit_t out_flit,
  output logic  err_single,
  output logic  err_double
);

  logic [37:0] cw;
  logic [5:0]  syn;
  logic        par;
  logic [DATA_W-1:0] d;

  always_comb begin
    cw  = ecc_positions(in_flit);
    syn = ecc_checks(cw);                 // zero for a clean word
    par = (^cw) ^ in_flit[FLIT_W-1];      // zero for a clean word
    d   = in_flit[DATA_W-1:0];
    err_single = par;                     // odd number of flipped bits
    err_double = !par && (syn != '0);
    if (par)
      for (int j = 0; j < DATA_W; j++)
        if (32'(syn) == ecc_data_pos(j)) d[j] = ~d[j];
    out_flit = ecc_encode(d);
  end

endmodule
