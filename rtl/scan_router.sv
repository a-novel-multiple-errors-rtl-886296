// scan_router: the bit-level recovery path of the proposed controller.
//
// For the scan bit now on the three SCO lines, the pairwise mismatches `mis`
// (P12, P13, P23) tell which module, if any, disagrees with the two others:
// module I is the odd one out when I/II and I/III mismatch, and so on. A
// priority encoder picks the lowest-numbered module that is not the odd one
// out as the fault-free source, a multiplexer forwards its SCO bit, and each
// module's SCI multiplexer takes that fault-free bit if the module is the odd
// one out, or its own SCO otherwise. Shifting L_SC times through this network
// compares and rewrites every flip-flop in one pass. The priority order and
// the use of the per-bit odd-one-out signals as multiplexer selects are this
// design's reading of the published block diagram, whose select wiring is
// not spelled out.
//
// Interface: purely combinational.
module scan_router
  import smertmr_pkg::*;
(
  input  mod_vec_t   sco,      // scan-out bit of modules I, II, III
  input  pair_vec_t  mis,      // pairwise mismatches of those bits
  output mod_vec_t   odd,      // module disagreeing with the two others
  output logic [1:0] src,      // fault-free source chosen (0 = I, 1 = II, 2 = III)
  output logic       ff_bit,   // fault-free scan bit
  output mod_vec_t   sci       // scan-in bit of modules I, II, III
);

  always_comb begin
    odd[0] = mis[P12] & mis[P13];
    odd[1] = mis[P12] & mis[P23];
    odd[2] = mis[P13] & mis[P23];

    // priority encoder over "not faulty at this bit"
    if (!odd[0])      src = 2'd0;
    else if (!odd[1]) src = 2'd1;
    else              src = 2'd2;

    ff_bit = sco[src];

    for (int m = 0; m < 3; m++)
      sci[m] = odd[m] ? ff_bit : sco[m];
  end

endmodule
