// mismatch_counters: pairwise comparison of the scan-out bits of the three
// modules and one mismatch counter per pair (counter12, counter13, counter23).
//
// While `count_en` is high, one bit of every scan chain arrives per cycle on
// `sco`; the comparators flag each pair whose bits differ (`mis`, bit order
// P12, P13, P23) and the counter of every flagged pair is incremented at the
// rising clock edge. `clear` zeroes all counters and wins over counting. A
// counter never needs more than L_SC, so it is $clog2(L_SC+1) bits wide and
// cannot wrap within one pass. The comparators and per-pair counters follow
// the published technique; the clear/enable interface and reset are this
// design's own.
module mismatch_counters
  import smertmr_pkg::*;
#(
  parameter int unsigned L_SC = 3,
  localparam int unsigned CW = $clog2(L_SC + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          count_en,
  input  mod_vec_t      sco,
  output pair_vec_t     mis,
  output logic [CW-1:0] cnt12,
  output logic [CW-1:0] cnt13,
  output logic [CW-1:0] cnt23
);

  always_comb begin
    mis[P12] = sco[0] ^ sco[1];
    mis[P13] = sco[0] ^ sco[2];
    mis[P23] = sco[1] ^ sco[2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt12 <= '0;
      cnt13 <= '0;
      cnt23 <= '0;
    end else if (clear) begin
      cnt12 <= '0;
      cnt13 <= '0;
      cnt23 <= '0;
    end else if (count_en) begin
      cnt12 <= cnt12 + CW'(mis[P12]);
      cnt13 <= cnt13 + CW'(mis[P13]);
      cnt23 <= cnt23 + CW'(mis[P23]);
    end
  end

endmodule
