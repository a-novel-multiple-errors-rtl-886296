// tmr_voter: majority voter that also tells which module disagrees.
//
// Three comparators C12, C13 and C23 compare the outputs of modules I, II and
// III pairwise; TExy is high when outputs x and y differ. Each TExy is ORed
// with a permanent-fault input Prxy from the controller into the error line
// Exy. With one wrong output two error lines rise (a wrong Output I raises E12
// and E13); a faulty comparator raises only its own line. The ultimate output
// is Output I, or Output II when both E12 and E13 are high, i.e. when module I
// is the odd one out or has been declared permanently faulty (Pr12=Pr13=1).
// This structure follows the published voter; the output width W and the
// comparator fault-injection input are this design's own.
//
// Interface: purely combinational. `te_flip` inverts a comparator result
// (bit order P12, P13, P23) to model a faulty comparator; tie it to zero in use.
module tmr_voter
  import smertmr_pkg::*;
#(
  parameter int unsigned W = 1  // width of a module output
) (
  input  logic [W-1:0] out1,     // Output I
  input  logic [W-1:0] out2,     // Output II
  input  logic [W-1:0] out3,     // Output III
  input  pair_vec_t    pr,       // Pr12, Pr13, Pr23
  input  pair_vec_t    te_flip,  // comparator fault injection
  output pair_vec_t    te,       // TE12, TE13, TE23
  output pair_vec_t    e,        // E12, E13, E23
  output logic [W-1:0] vout      // ultimate output
);

  always_comb begin
    te[P12] = (out1 != out2) ^ te_flip[P12];
    te[P13] = (out1 != out3) ^ te_flip[P13];
    te[P23] = (out2 != out3) ^ te_flip[P23];
    e       = te | pr;
    vout    = (e[P12] && e[P13]) ? out2 : out1;
  end

endmodule
