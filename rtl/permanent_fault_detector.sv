// permanent_fault_detector: tells a permanent fault from transient ones with
// the most recent faulty module register (MRFM) and the number of
// consecutive faults register (NCF).
//
// On every `update` (one per located fault) the new faulty-module set `fm`
// is compared with MRFM. If it names the same single module again, NCF is
// incremented; otherwise NCF is reset to zero. MRFM then takes `fm`. When the
// incremented NCF exceeds NCF_TH the module is taken as permanently faulty:
// `perm` is raised combinationally in that update cycle. NCF saturates.
// Counting only repeats of a single module (two faulty modules cannot leave a
// master/checker pair behind), the reset value zero and the default
// threshold are this design's own choices.
module permanent_fault_detector
  import smertmr_pkg::*;
#(
  parameter int unsigned NCF_TH = 2,  // NCF above this value means permanent
  localparam int unsigned NW = $clog2(NCF_TH + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          update,
  input  mod_vec_t      fm,
  output mod_vec_t      mrfm,
  output logic [NW-1:0] ncf,
  output logic          perm
);

  logic          same;
  logic [NW-1:0] ncf_nxt;

  always_comb begin
    same    = (fm == mrfm) && (fm == 3'b001 || fm == 3'b010 || fm == 3'b100);
    ncf_nxt = '0;
    if (same)
      ncf_nxt = (ncf == NW'(NCF_TH + 1)) ? ncf : ncf + 1'b1;
    perm    = update && same && (ncf_nxt > NW'(NCF_TH));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mrfm <= '0;
      ncf  <= '0;
    end else if (update) begin
      mrfm <= fm;
      ncf  <= ncf_nxt;
    end
  end

endmodule
