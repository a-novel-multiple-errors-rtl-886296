// smertmr_controller: the proposed SMERTMR controller, in which comparison
// and recovery of the TMR modules' internal states happen in one scan pass.
//
// NORMAL  The modules run; the voter error lines E12/E13/E23 are watched.
//         A raised line freezes the modules for that cycle (mod_en low) and
//         starts a pass: the mismatch counters are cleared and the shift
//         counter is loaded with L_SC.
// SCAN    All scan chains shift (sce high) for L_SC cycles while the shift
//         counter counts down to zero. Each cycle the scan router writes the
//         majority bit into a module that disagrees and recirculates the
//         others' own bits, and the mismatch counters count pairwise
//         disagreements. After the pass every module holds the bitwise
//         majority state.
// DECIDE  One cycle, modules frozen. The fault locator classifies the
//         counts: no mismatch -> NORMAL (the error was outside the modules);
//         one or two faulty modules -> FMR loaded, permanent-fault detector
//         updated, then NORMAL, or MC when the same single module has failed
//         more than NCF_TH times in a row; unlocatable (all three modules
//         disagreed somewhere) -> UNREC.
// MC      Master/checker: Pr is raised for both pairs of the permanently
//         faulty module so the voter ignores it; a mismatch of the two
//         remaining modules -> UNREC.
// UNREC   Halted (modules frozen) until reset.
// The state diagram, counters, FLU, FMR, MRFM and NCF follow the published technique. The
// one-cycle freeze on detection, the DECIDE cycle and the handling of the
// error lines in MC are this design's own choices.
//
// Timing: a fault seen by the voter in cycle t is repaired at the edge that
// ends cycle t+L_SC; the modules resume after the DECIDE cycle t+L_SC+1.
module smertmr_controller
  import smertmr_pkg::*;
#(
  parameter int unsigned L_SC   = 3,  // scan chain length
  parameter int unsigned NCF_TH = 2,  // consecutive faults that mean permanent
  localparam int unsigned CW = $clog2(L_SC + 1),
  localparam int unsigned NW = $clog2(NCF_TH + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  pair_vec_t     e,              // voter error lines E12, E13, E23
  input  mod_vec_t      sco,            // scan-out of modules I, II, III
  output mod_vec_t      sci,            // scan-in of modules I, II, III
  output logic          sce,            // scan enable of all modules
  output logic          mod_en,         // functional clock enable of all modules
  output pair_vec_t     pr,             // Pr12, Pr13, Pr23 to the voter
  output ctrl_state_t   state,
  output mod_vec_t      fmr,            // faulty modules of the last pass
  output flu_class_t    flu_cls,        // FLU verdict (valid in DECIDE)
  output mod_vec_t      mrfm,
  output logic [NW-1:0] ncf,
  output mod_vec_t      perm_mod,       // permanently faulty module (MC)
  output logic [CW-1:0] cnt12,
  output logic [CW-1:0] cnt13,
  output logic [CW-1:0] cnt23,
  output logic          recovering,     // a scan pass or its verdict is running
  output logic          degraded,       // master/checker mode
  output logic          unrecoverable   // system halted
);

  ctrl_state_t   state_nxt;
  logic [CW-1:0] shift_cnt;
  logic          err;
  logic          start;
  logic          perm;
  pair_vec_t     mis;
  mod_vec_t      fmv;
  logic          decide_fault;

  mismatch_counters #(.L_SC(L_SC)) u_cnt (
    .clk, .rst_n,
    .clear    (start),
    .count_en (state == ST_SCAN),
    .sco, .mis, .cnt12, .cnt13, .cnt23
  );

  scan_router u_route (
    .sco, .mis, .odd(), .src(), .ff_bit(), .sci
  );

  assign decide_fault = (state == ST_DECIDE) &&
                        (flu_cls == FLU_ONE || flu_cls == FLU_TWO);

  fault_locator #(.L_SC(L_SC)) u_flu (
    .clk, .rst_n,
    .load (decide_fault),
    .c12  (cnt12), .c13 (cnt13), .c23 (cnt23),
    .cls  (flu_cls), .fmv, .fmr
  );

  permanent_fault_detector #(.NCF_TH(NCF_TH)) u_perm (
    .clk, .rst_n,
    .update (decide_fault),
    .fm     (fmv),
    .mrfm, .ncf, .perm
  );

  // Pr lines: both pairs of the permanently faulty module
  assign pr  = (state == ST_MC) ? pairs_of(perm_mod) : '0;
  // error seen on any pair the voter still trusts
  assign err = |(e & ~pr);
  assign start = (state == ST_NORMAL) && err;

  always_comb begin
    state_nxt = state;
    unique case (state)
      ST_NORMAL: if (err) state_nxt = ST_SCAN;
      ST_SCAN:   if (shift_cnt == CW'(1)) state_nxt = ST_DECIDE;
      ST_DECIDE: begin
        unique case (flu_cls)
          FLU_NONE:  state_nxt = ST_NORMAL;
          FLU_ONE,
          FLU_TWO:   state_nxt = perm ? ST_MC : ST_NORMAL;
          FLU_UNLOC: state_nxt = ST_UNREC;
        endcase
      end
      ST_MC:     if (err) state_nxt = ST_UNREC;
      ST_UNREC:  state_nxt = ST_UNREC;
      default:   state_nxt = ST_UNREC;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_NORMAL;
      shift_cnt <= '0;
      perm_mod  <= '0;
    end else begin
      state <= state_nxt;
      if (start)
        shift_cnt <= CW'(L_SC);
      else if (state == ST_SCAN)
        shift_cnt <= shift_cnt - 1'b1;
      if (decide_fault && perm)
        perm_mod <= fmv;
    end
  end

  always_comb begin
    sce           = (state == ST_SCAN);
    mod_en        = ((state == ST_NORMAL) || (state == ST_MC)) && !err;
    recovering    = (state == ST_SCAN) || (state == ST_DECIDE);
    degraded      = (state == ST_MC);
    unrecoverable = (state == ST_UNREC);
  end

  // the shift counter is never zero during a pass
  a_shift_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_SCAN) |-> (shift_cnt != '0));
  // a pass lasts exactly L_SC cycles
  a_pass_len: assert property (@(posedge clk) disable iff (!rst_n)
    start |=> (state == ST_SCAN) [*L_SC] ##1 (state == ST_DECIDE));
  // the halt is final
  a_unrec_sticky: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_UNREC) |=> (state == ST_UNREC));

endmodule
