// smertmr_pkg: types shared by the blocks of the scan-chain multiple error
// recovery TMR (SMERTMR) design.
//
// Modules of the TMR triple are numbered I, II, III and held in 3-bit vectors
// with bit 0 = module I, bit 1 = module II, bit 2 = module III. Module pairs
// are held in 3-bit vectors with bit 0 = pair I/II, bit 1 = pair I/III and
// bit 2 = pair II/III (the order of the comparators C12, C13, C23).
// The controller states follow the state diagram of the published technique
// (normal, combined compare-and-recover scan pass, master/checker,
// unrecoverable); the DECIDE state, in which the fault locator's verdict is
// taken, and all encodings are this design's own choices.
package smertmr_pkg;

  // Bit positions of the module pairs in a pair vector.
  localparam int unsigned P12 = 0;
  localparam int unsigned P13 = 1;
  localparam int unsigned P23 = 2;

  typedef logic [2:0] mod_vec_t;   // one bit per module (bit0 = I)
  typedef logic [2:0] pair_vec_t;  // one bit per pair (P12, P13, P23)

  typedef enum logic [2:0] {
    ST_NORMAL = 3'd0,  // TMR operation, voter watched
    ST_SCAN   = 3'd1,  // combined comparison and recovery scan pass
    ST_DECIDE = 3'd2,  // fault locator verdict on the mismatch counters
    ST_MC     = 3'd3,  // degraded master/checker operation
    ST_UNREC  = 3'd4   // unrecoverable condition: system halted
  } ctrl_state_t;

  typedef enum logic [1:0] {
    FLU_NONE  = 2'd0,  // all counters zero: no faulty module
    FLU_ONE   = 2'd1,  // one faulty module located
    FLU_TWO   = 2'd2,  // two faulty modules with disjoint erroneous flip-flops
    FLU_UNLOC = 2'd3   // faulty modules cannot be located
  } flu_class_t;

  // The pairs a module belongs to: module I -> I/II, I/III, etc.
  function automatic pair_vec_t pairs_of(input mod_vec_t m);
    pair_vec_t p;
    p[P12] = m[0] | m[1];
    p[P13] = m[0] | m[2];
    p[P23] = m[1] | m[2];
    return p;
  endfunction

endpackage
