// smertmr_top_tb: end-to-end self-checking test of the protected TMR system
// at its default size (three 3-flip-flop modules with inputs a and b).
//
// A golden copy of the module's state is kept by the testbench and advanced
// with random inputs whenever the system is expected to run (normal or
// master/checker operation with no disagreement on a trusted pair). Faults
// are injected as flip-flop upsets and comparator flips; after each the
// testbench waits for the controller to settle and checks the outcome:
//   one faulty module              -> all states equal the golden state
//   two faulty modules, disjoint   -> all states equal the golden state
//   a latent fault (wrong bit not yet at the output when the error is seen)
//   comparator flip only           -> false alarm, nothing changed
//   all three modules faulty       -> unrecoverable
//   repeated faults in module I    -> master/checker on modules II and III
//   checker mismatch in M/C        -> unrecoverable
// The voted output is checked against the golden output in every running
// cycle, and the time from detection to resumed operation must be
// L_SC + 2 cycles (freeze, L_SC shifts, verdict). Every mechanism above must
// occur at least once.
module smertmr_top_tb;
  import smertmr_pkg::*;
  localparam int unsigned L  = 3;
  localparam int unsigned IW = 2;
  localparam int unsigned TH = 2;

  logic clk = 0, rst_n = 0;
  logic [IW-1:0] din = '0;
  logic [L-1:0] upset1 = '0, upset2 = '0, upset3 = '0;
  pair_vec_t te_flip = '0, te, e;
  logic vout, recovering, degraded, unrecoverable;
  ctrl_state_t state;
  mod_vec_t fmr, perm_mod, mrfm;
  flu_class_t flu_cls;
  logic [1:0] ncf;
  logic [1:0] cnt12, cnt13, cnt23;
  logic [L-1:0] state1, state2, state3;

  logic [L-1:0] g;          // golden module state
  logic [L-1:0] st [3];
  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0, n_latent = 0, n_false = 0;
  int n_unloc = 0, n_perm = 0, n_mc_err = 0, n_mc_ignore = 0;
  logic mc;                 // testbench's own view: module I dropped

  smertmr_top dut (.*);

  always #5 clk = ~clk;

  always_comb begin
    st[0] = state1; st[1] = state2; st[2] = state3;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: state=%s g=%b m=%b %b %b", what, state.name(), g, state1, state2, state3);
    end
  endtask

  // disagreement the controller should react to, computed from the states
  function automatic logic tb_err();
    logic [2:0] o;
    o = {state3[L-1], state2[L-1], state1[L-1]};
    if (mc) return (o[1] != o[2]) ^ te_flip[P23];
    return (o[0] != o[1]) || (o[0] != o[2]) || (te_flip != '0);
  endfunction

  // one clock with random inputs; the golden state advances if the system
  // is expected to run in this cycle
  task automatic step();
    logic run;
    din = IW'($urandom);
    #1;
    run = !tb_err() && (state == ST_NORMAL || state == ST_MC);
    if (run) begin
      checks++;
      if (vout !== g[L-1]) begin
        failures++;
        $display("FAIL voted output %b expected %b", vout, g[L-1]);
      end
    end
    @(posedge clk);
    if (run) g = {g[L-2:0], g[L-1] ^ (^din)};
    @(negedge clk);
    upset1 = '0; upset2 = '0; upset3 = '0; te_flip = '0;
  endtask

  task automatic do_reset();
    rst_n = 0; mc = 0;
    @(negedge clk);
    rst_n = 1; g = '0;
  endtask

  task automatic run_normal(int n);
    for (int i = 0; i < n; i++) step();
    expect_true(state2 == g && state3 == g && (mc || state1 == g),
                "states match golden in normal run");
  endtask

  initial begin
    int lat, nf;
    mod_vec_t fmr_before;
    logic [L-1:0] m [3];
    mc = 0; g = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_normal(5);

    for (int ep = 0; ep < 300; ep++) begin
      // random fault pattern: each module gets at most one wrong bit, all in
      // different positions, so that two faulty modules never share one
      int pos [3];
      int sel;
      pos[0] = $urandom % L;
      pos[1] = (pos[0] + 1 + ($urandom % (L - 1))) % L;
      pos[2] = 3 - pos[0] - pos[1];
      sel = $urandom % 10;
      for (int k = 0; k < 3; k++) m[k] = '0;
      nf = (sel < 4) ? 1 : (sel < 8) ? 2 : (sel < 9) ? 3 : 0;
      begin
        int first;
        first = $urandom % 3;
        for (int k = 0; k < nf; k++) m[(first + k) % 3] = L'(1) << pos[k];
      end
      // the golden state does not see the upsets
      fmr_before = fmr;
      upset1 = m[0]; upset2 = m[1]; upset3 = m[2];
      if (nf == 0) te_flip = 3'b001 << ($urandom % 3);
      begin
        int t_det, c;
        logic latent;
        t_det = -1;
        latent = 0;
        for (c = 0; c < 4 * L + 10; c++) begin
          #1;
          if (t_det < 0 && tb_err()) begin
            t_det = c;
            for (int k = 0; k < 3; k++)
              if ((st[k] ^ g) != 0 && (st[k][L-1] == g[L-1])) latent = 1;
          end
          step();
          if (t_det >= 0 && !recovering && !tb_err()) break;
        end
        lat = c + 1 - t_det;
        if (nf == 3) begin
          expect_true(state == ST_UNREC && unrecoverable, "three faulty modules -> unrecoverable");
          if (state == ST_UNREC) n_unloc++;
          do_reset();
          run_normal(3);
          continue;
        end
        expect_true(t_det >= 0, "fault detected");
        expect_true(lat == L + 2, $sformatf("recovery took %0d cycles, expected %0d", lat, L + 2));
        expect_true(state == ST_NORMAL, "back to normal");
        expect_true(state1 == g && state2 == g && state3 == g, "all modules hold the golden state");
        if (nf == 0) begin
          expect_true(fmr == fmr_before, "false alarm leaves FMR unchanged");
          n_false++;
        end else begin
          mod_vec_t exp_fm;
          exp_fm = {m[2] != 0, m[1] != 0, m[0] != 0};
          expect_true(fmr == exp_fm, $sformatf("FMR=%b expected %b", fmr, exp_fm));
          if (nf == 1) n_single++; else n_double++;
          if (latent) n_latent++;
        end
      end
      // after a few repeats of the same single module the system would
      // degrade; keep this phase in normal mode by resetting the history
      if (ncf >= 2'(TH)) do_reset();
      run_normal(1 + ($urandom % 4));
    end

    // permanent fault: module I fails again and again
    do_reset();
    run_normal(2);
    for (int k = 0; k < TH + 2; k++) begin
      upset1 = L'(1) << ($urandom % L);
      for (int c = 0; c < 3 * L + 6; c++) begin
        step();
        if (state == ST_MC) break;
      end
      repeat (L + 3) step();
    end
    expect_true(state == ST_MC && degraded && perm_mod == 3'b001, "module I declared permanent");
    if (state == ST_MC) n_perm++;
    mc = 1;
    // a fault in the dropped module is ignored; the output follows module II
    upset1 = L'(1) << (L - 1);
    for (int c = 0; c < 8; c++) step();
    expect_true(state == ST_MC && state2 == g && state3 == g, "M/C ignores module I");
    if (state == ST_MC) n_mc_ignore++;
    // a checker mismatch halts the system
    upset3 = L'(1) << (L - 1);
    step();
    step();
    expect_true(state == ST_UNREC, "M/C mismatch -> unrecoverable");
    if (state == ST_UNREC) n_mc_err++;

    $display("mechanisms: single=%0d double=%0d latent=%0d false_alarm=%0d unlocatable=%0d permanent=%0d mc_ignore=%0d mc_error=%0d",
             n_single, n_double, n_latent, n_false, n_unloc, n_perm, n_mc_ignore, n_mc_err);
    expect_true(n_single > 0, "single-module recovery happened");
    expect_true(n_double > 0, "two-module recovery happened");
    expect_true(n_latent > 0, "latent-fault recovery happened");
    expect_true(n_false > 0, "false alarm happened");
    expect_true(n_unloc > 0, "unlocatable fault happened");
    expect_true(n_perm > 0, "permanent fault happened");
    expect_true(n_mc_ignore > 0, "M/C ignored the dropped module");
    expect_true(n_mc_err > 0, "M/C error happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
