// fault_locator: the fault locator unit (FLU) and faulty modules register
// (FMR).
//
// From the three pairwise mismatch counts of a completed scan pass it decides,
// following the faulty-module detection algorithm of the published technique:
//   all counts zero                                   -> FLU_NONE
//   c_ij == c_ik != 0 and c_jk == 0                    -> FLU_ONE, module i
//   c_ik != 0, c_jk != 0 and c_ij == c_ik + c_jk       -> FLU_TWO, modules i, j
//   anything else                                     -> FLU_UNLOC
// `cls` and `fmv` are combinational; `load` copies `fmv` into the FMR at the
// rising clock edge. The FMR holds one bit per module (bit 0 = module I), so
// the "modules I and II faulty" value is 3'b011 here. Requiring the counts in
// the two-module case to be non-zero keeps it apart from the one-module case
// (an assumption; the algorithm checks the one-module case first).
module fault_locator
  import smertmr_pkg::*;
#(
  parameter int unsigned L_SC = 3,
  localparam int unsigned CW = $clog2(L_SC + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [CW-1:0] c12,
  input  logic [CW-1:0] c13,
  input  logic [CW-1:0] c23,
  output flu_class_t    cls,
  output mod_vec_t      fmv,   // faulty modules found now
  output mod_vec_t      fmr    // faulty modules register
);

  // one faulty module i, with c_ij, c_ik its pairs and c_jk the other pair
  function automatic logic one_faulty(input logic [CW-1:0] cij, cik, cjk);
    return (cij == cik) && (cij != '0) && (cjk == '0);
  endfunction

  // two faulty modules i, j and fault-free k: c_ij = c_ik + c_jk
  function automatic logic two_faulty(input logic [CW-1:0] cij, cik, cjk);
    return (cik != '0) && (cjk != '0) && ({1'b0, cij} == {1'b0, cik} + {1'b0, cjk});
  endfunction

  always_comb begin
    cls = FLU_UNLOC;
    fmv = 3'b000;
    if (c12 == '0 && c13 == '0 && c23 == '0) begin
      cls = FLU_NONE;
    end else if (one_faulty(c12, c13, c23)) begin
      cls = FLU_ONE; fmv = 3'b001;               // module I
    end else if (one_faulty(c12, c23, c13)) begin
      cls = FLU_ONE; fmv = 3'b010;               // module II
    end else if (one_faulty(c13, c23, c12)) begin
      cls = FLU_ONE; fmv = 3'b100;               // module III
    end else if (two_faulty(c12, c13, c23)) begin
      cls = FLU_TWO; fmv = 3'b011;               // modules I, II; III fault-free
    end else if (two_faulty(c13, c12, c23)) begin
      cls = FLU_TWO; fmv = 3'b101;               // modules I, III; II fault-free
    end else if (two_faulty(c23, c12, c13)) begin
      cls = FLU_TWO; fmv = 3'b110;               // modules II, III; I fault-free
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    fmr <= '0;
    else if (load) fmr <= fmv;
  end

endmodule
