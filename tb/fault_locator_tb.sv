// fault_locator_tb: exhaustive self-checking test of the fault locator unit.
// The expected verdict is computed a different way from the counters: the
// number of flip-flops in which module i alone disagrees is
// n_i = (c_ij + c_ik - c_jk) / 2. The counts can be located when every n_i is
// a non-negative integer and at least one module is clean; the faulty
// modules are those with n_i > 0. Also checks that `load` captures the FMR.
module fault_locator_tb;
  import smertmr_pkg::*;
  localparam int unsigned L = 5;
  localparam int unsigned CW = $clog2(L + 1);
  logic clk = 0, rst_n = 0, load = 0;
  logic [CW-1:0] c12, c13, c23;
  flu_class_t cls, exp_cls;
  mod_vec_t fmv, fmr, exp_fm;
  int n1, n2, n3, s1, s2, s3, nf;
  int checks = 0, failures = 0;

  fault_locator #(.L_SC(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c12 = '0; c13 = '0; c23 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int v = 0; v < (1 << (3 * CW)); v++) begin
      @(negedge clk);
      {c23, c13, c12} = (3 * CW)'(v);
      s1 = int'(c12) + int'(c13) - int'(c23);
      s2 = int'(c12) + int'(c23) - int'(c13);
      s3 = int'(c13) + int'(c23) - int'(c12);
      n1 = s1 / 2; n2 = s2 / 2; n3 = s3 / 2;
      exp_fm = '0;
      if (c12 == 0 && c13 == 0 && c23 == 0) begin
        exp_cls = FLU_NONE;
      end else if (s1 < 0 || s2 < 0 || s3 < 0 || (s1 % 2) != 0 ||
                   (n1 > 0 && n2 > 0 && n3 > 0)) begin
        exp_cls = FLU_UNLOC;
      end else begin
        exp_fm = {n3 > 0, n2 > 0, n1 > 0};
        nf = int'(exp_fm[0]) + int'(exp_fm[1]) + int'(exp_fm[2]);
        exp_cls = (nf == 1) ? FLU_ONE : FLU_TWO;
      end
      load = 1'($urandom);
      #1;
      checks++;
      if (cls !== exp_cls || fmv !== exp_fm) begin
        failures++;
        $display("FAIL c12=%0d c13=%0d c23=%0d cls=%s/%s fm=%b/%b",
                 c12, c13, c23, cls.name(), exp_cls.name(), fmv, exp_fm);
      end
      if (load) begin
        @(posedge clk); #1;
        checks++;
        if (fmr !== exp_fm) begin
          failures++;
          $display("FAIL fmr=%b exp=%b", fmr, exp_fm);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
