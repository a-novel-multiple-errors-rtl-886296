// smertmr_controller_tb: self-checking test of the proposed controller with
// three plain shift registers standing in for the scan chains of the TMR
// modules. The error lines are driven directly. Each scenario loads the
// registers with chosen erroneous bits, raises an error line and checks the
// length of the scan pass, the repaired contents (bitwise majority), the
// fault locator verdict, the FMR, and the next state: normal after a located
// fault or a false alarm, master/checker after repeated faults of one module,
// unrecoverable when all three modules disagree or the master/checker pair
// mismatches.
module smertmr_controller_tb;
  import smertmr_pkg::*;
  localparam int unsigned L  = 3;
  localparam int unsigned TH = 2;
  localparam int unsigned CW = $clog2(L + 1);
  localparam int unsigned NW = $clog2(TH + 2);

  logic clk = 0, rst_n = 0;
  pair_vec_t e = '0, pr;
  mod_vec_t sco, sci, fmr, mrfm, perm_mod;
  logic sce, mod_en, recovering, degraded, unrecoverable;
  ctrl_state_t state;
  flu_class_t flu_cls;
  logic [NW-1:0] ncf;
  logic [CW-1:0] cnt12, cnt13, cnt23;
  logic [L-1:0] r [3];
  int checks = 0, failures = 0;

  smertmr_controller #(.L_SC(L), .NCF_TH(TH)) dut (.*);

  always #5 clk = ~clk;

  // stand-in scan chains
  always_comb for (int m = 0; m < 3; m++) sco[m] = r[m][L-1];
  always_ff @(posedge clk)
    if (sce) for (int m = 0; m < 3; m++) r[m] <= {r[m][L-2:0], sci[m]};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (state=%s)", what, state.name());
    end
  endtask

  // load states, pulse an error line, follow the pass; returns the verdict
  task automatic run_pass(input logic [L-1:0] good, input logic [L-1:0] f1, f2, f3,
                          input pair_vec_t err, input string name,
                          input ctrl_state_t exp_next, input flu_class_t exp_cls,
                          input mod_vec_t exp_fm);
    logic [L-1:0] maj;
    int ncyc;
    @(negedge clk);
    r[0] = good ^ f1; r[1] = good ^ f2; r[2] = good ^ f3;
    maj  = (r[0] & r[1]) | (r[0] & r[2]) | (r[1] & r[2]);
    e = err;
    #1 expect_true(!mod_en, {name, ": modules frozen on detection"});
    @(negedge clk);
    e = '0;
    ncyc = 0;
    while (state == ST_SCAN && ncyc < 4 * L) begin
      expect_true(sce && !mod_en, {name, ": scan enabled during pass"});
      ncyc++;
      @(negedge clk);
    end
    expect_true(ncyc == L, $sformatf("%s: pass of %0d cycles, expected %0d", name, ncyc, L));
    expect_true(state == ST_DECIDE, {name, ": DECIDE after pass"});
    expect_true(flu_cls == exp_cls, $sformatf("%s: FLU verdict %s", name, flu_cls.name()));
    expect_true(r[0] == maj && r[1] == maj && r[2] == maj, {name, ": all modules hold the majority state"});
    @(negedge clk);
    expect_true(state == exp_next, $sformatf("%s: next state %s", name, state.name()));
    if (exp_cls == FLU_ONE || exp_cls == FLU_TWO)
      expect_true(fmr == exp_fm, $sformatf("%s: FMR=%b expected %b", name, fmr, exp_fm));
  endtask

  initial begin
    r[0] = '0; r[1] = '0; r[2] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    expect_true(state == ST_NORMAL && mod_en && !sce && pr == '0, "idle after reset");

    run_pass(3'b101, 3'b000, 3'b010, 3'b000, 3'b101, "one faulty (II)",
             ST_NORMAL, FLU_ONE, 3'b010);
    run_pass(3'b011, 3'b000, 3'b001, 3'b110, 3'b110, "two faulty (II, III)",
             ST_NORMAL, FLU_TWO, 3'b110);
    run_pass(3'b110, 3'b011, 3'b000, 3'b000, 3'b011, "one faulty, two bits (I)",
             ST_NORMAL, FLU_ONE, 3'b001);
    run_pass(3'b010, 3'b000, 3'b000, 3'b000, 3'b100, "false alarm",
             ST_NORMAL, FLU_NONE, 3'b000);
    expect_true(fmr == 3'b001, "false alarm leaves FMR unchanged");

    // the same module fails repeatedly: the first fault leaves NCF at 0, each
    // repeat adds one, and NCF > TH declares the module permanent
    for (int k = 0; k <= TH; k++)
      run_pass(3'b100, 3'b000, 3'b000, 3'b100, 3'b110, "repeated III",
               ST_NORMAL, FLU_ONE, 3'b100);
    run_pass(3'b100, 3'b000, 3'b000, 3'b001, 3'b110, "permanent III",
             ST_MC, FLU_ONE, 3'b100);
    expect_true(degraded && perm_mod == 3'b100 && pr == 3'b110, "master/checker with Pr13, Pr23");
    // errors on the pairs of the dropped module are ignored
    @(negedge clk); e = 3'b110;
    #1 expect_true(mod_en, "MC ignores the dropped module");
    @(negedge clk); e = '0;
    expect_true(state == ST_MC, "still MC");
    // a master/checker mismatch halts the system
    e = 3'b001;
    @(negedge clk); e = '0;
    expect_true(state == ST_UNREC && unrecoverable && !mod_en, "MC error -> unrecoverable");
    repeat (3) @(negedge clk);
    expect_true(state == ST_UNREC, "unrecoverable is final");

    // all three modules disagree somewhere: cannot be located
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    run_pass(3'b000, 3'b001, 3'b010, 3'b100, 3'b111, "three faulty",
             ST_UNREC, FLU_UNLOC, 3'b000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
