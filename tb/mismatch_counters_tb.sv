// mismatch_counters_tb: self-checking test of the pairwise comparators and
// mismatch counters: random scan-out bits with random count enables and
// clears, compared cycle by cycle with counts kept by the testbench.
module mismatch_counters_tb;
  import smertmr_pkg::*;
  localparam int unsigned L = 7;
  localparam int unsigned CW = $clog2(L + 1);
  logic clk = 0, rst_n = 0, clear = 0, count_en = 0;
  mod_vec_t sco = '0;
  pair_vec_t mis;
  logic [CW-1:0] cnt12, cnt13, cnt23;
  int m12, m13, m23, n;
  int checks = 0, failures = 0;

  mismatch_counters #(.L_SC(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m12 = 0; m13 = 0; m23 = 0; n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      sco      = 3'($urandom);
      clear    = (n >= L) || (($urandom % 10) == 0);
      count_en = 1'($urandom);
      #1;
      checks++;
      if (mis !== {sco[1] != sco[2], sco[0] != sco[2], sco[0] != sco[1]}) begin
        failures++;
        $display("FAIL mis sco=%b mis=%b", sco, mis);
      end
      if (clear) begin
        m12 = 0; m13 = 0; m23 = 0; n = 0;
      end else if (count_en) begin
        m12 += int'(sco[0] != sco[1]);
        m13 += int'(sco[0] != sco[2]);
        m23 += int'(sco[1] != sco[2]);
        n++;
      end
      @(posedge clk); #1;
      checks++;
      if (cnt12 != CW'(m12) || cnt13 != CW'(m13) || cnt23 != CW'(m23)) begin
        failures++;
        $display("FAIL cnt %0d %0d %0d exp %0d %0d %0d", cnt12, cnt13, cnt23, m12, m13, m23);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
