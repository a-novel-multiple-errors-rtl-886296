// smertmr_top: a TMR system protected by the proposed scan-chain multiple
// error recovery technique.
//
// Three identical scan_module replicas get the same inputs. The voter compares
// their outputs and passes on the majority; when it sees a disagreement the
// controller shifts the three scan chains once around (L_SC cycles),
// comparing them bit by bit and overwriting a disagreeing bit with the bit of
// a module that agrees with the majority. This repairs one faulty module, or
// two whose erroneous flip-flops differ, including faults that had not yet
// reached the outputs (latent faults). Repeated faults in the same module
// degrade the system to master/checker operation; faults that cannot be
// located halt it.
//
// Interface: `din` is the functional input of all three replicas and `vout`
// the voted output. `upset1..3` (flip-flop flip masks) and `te_flip`
// (comparator flip mask) inject faults for verification and are tied to zero
// in use. `recovering` marks cycles in which `vout` is not a functional
// output; `fmr` shows the faulty modules of the last repair (bit 0 = module
// I); `degraded` and `unrecoverable` are the two failure outputs.
module smertmr_top
  import smertmr_pkg::*;
#(
  parameter int unsigned L_SC   = 3,  // flip-flops per module = scan chain length
  parameter int unsigned IN_W   = 2,  // module inputs (a, b)
  parameter int unsigned NCF_TH = 2,
  localparam int unsigned NW = $clog2(NCF_TH + 2),
  localparam int unsigned CW = $clog2(L_SC + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [IN_W-1:0] din,
  input  logic [L_SC-1:0] upset1,
  input  logic [L_SC-1:0] upset2,
  input  logic [L_SC-1:0] upset3,
  input  pair_vec_t       te_flip,
  output logic            vout,
  output pair_vec_t       te,
  output pair_vec_t       e,
  output ctrl_state_t     state,
  output mod_vec_t        fmr,
  output flu_class_t      flu_cls,
  output mod_vec_t        perm_mod,
  output mod_vec_t        mrfm,
  output logic [NW-1:0]   ncf,
  output logic [CW-1:0]   cnt12,
  output logic [CW-1:0]   cnt13,
  output logic [CW-1:0]   cnt23,
  output logic            recovering,
  output logic            degraded,
  output logic            unrecoverable,
  output logic [L_SC-1:0] state1,
  output logic [L_SC-1:0] state2,
  output logic [L_SC-1:0] state3
);

  mod_vec_t        sco, sci, dout;
  logic            sce, mod_en;
  pair_vec_t       pr;

  scan_module #(.L_SC(L_SC), .IN_W(IN_W)) u_m1 (
    .clk, .rst_n, .en(mod_en), .sce, .sci(sci[0]), .din, .upset(upset1),
    .sco(sco[0]), .dout(dout[0]), .state(state1)
  );
  scan_module #(.L_SC(L_SC), .IN_W(IN_W)) u_m2 (
    .clk, .rst_n, .en(mod_en), .sce, .sci(sci[1]), .din, .upset(upset2),
    .sco(sco[1]), .dout(dout[1]), .state(state2)
  );
  scan_module #(.L_SC(L_SC), .IN_W(IN_W)) u_m3 (
    .clk, .rst_n, .en(mod_en), .sce, .sci(sci[2]), .din, .upset(upset3),
    .sco(sco[2]), .dout(dout[2]), .state(state3)
  );

  tmr_voter #(.W(1)) u_voter (
    .out1(dout[0]), .out2(dout[1]), .out3(dout[2]),
    .pr, .te_flip, .te, .e, .vout
  );

  smertmr_controller #(.L_SC(L_SC), .NCF_TH(NCF_TH)) u_ctrl (
    .clk, .rst_n, .e, .sco, .sci, .sce, .mod_en, .pr, .state, .fmr,
    .flu_cls, .mrfm, .ncf, .perm_mod, .cnt12, .cnt13, .cnt23,
    .recovering, .degraded, .unrecoverable
  );

endmodule
