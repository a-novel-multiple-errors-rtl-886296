// smertmr_multibit_tb: the protected system with longer scan chains
// (L_SC = 8) and faults that hit several flip-flops of a module at once.
//
// Each episode assigns every flip-flop position to no module or to one of the
// three modules at random and flips, in one clock edge, the flip-flops so
// assigned. As long as at most two modules are hit, one pass must restore
// the golden state in all modules and the faulty modules register must name
// exactly the hit modules. Episodes that hit all three modules must end in
// the unrecoverable state. A last group of episodes makes two modules wrong
// in the same flip-flop, the case the technique cannot handle: the two wrong
// bits outvote the good one, so all modules end up equal to each other but
// wrong in that flip-flop, and the good module is reported as the faulty one.
module smertmr_multibit_tb;
  import smertmr_pkg::*;
  localparam int unsigned L  = 8;
  localparam int unsigned IW = 2;
  localparam int unsigned TH = 14;
  localparam int unsigned NW = $clog2(TH + 2);
  localparam int unsigned CW = $clog2(L + 1);

  logic clk = 0, rst_n = 0;
  logic [IW-1:0] din = '0;
  logic [L-1:0] upset1 = '0, upset2 = '0, upset3 = '0;
  pair_vec_t te_flip = '0, te, e;
  logic vout, recovering, degraded, unrecoverable;
  ctrl_state_t state;
  mod_vec_t fmr, perm_mod, mrfm;
  flu_class_t flu_cls;
  logic [NW-1:0] ncf;
  logic [CW-1:0] cnt12, cnt13, cnt23;
  logic [L-1:0] state1, state2, state3, g;
  int checks = 0, failures = 0;
  int n_one = 0, n_two = 0, n_three = 0, n_common = 0;

  smertmr_top #(.L_SC(L), .IN_W(IW), .NCF_TH(TH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: %s g=%b m=%b %b %b fmr=%b", what, state.name(), g, state1, state2, state3, fmr);
    end
  endtask

  function automatic logic tb_err();
    return (state1[L-1] != state2[L-1]) || (state1[L-1] != state3[L-1]);
  endfunction

  // one clock; the golden state advances when the system should run
  task automatic step();
    logic run;
    din = IW'($urandom);
    #1;
    run = !tb_err() && state == ST_NORMAL;
    @(posedge clk);
    if (run) g = {g[L-2:0], g[L-1] ^ (^din)};
    @(negedge clk);
    upset1 = '0; upset2 = '0; upset3 = '0;
  endtask

  task automatic do_reset();
    rst_n = 0;
    @(negedge clk);
    rst_n = 1; g = '0;
  endtask

  task automatic settle();
    int c;
    for (c = 0; c < 4 * L + 10; c++) begin
      step();
      if (!recovering && !tb_err() && c > L) break;
    end
  endtask

  initial begin
    logic [L-1:0] m [3];
    mod_vec_t hit;
    int owner, nh;
    g = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (4) step();

    for (int ep = 0; ep < 200; ep++) begin
      for (int k = 0; k < 3; k++) m[k] = '0;
      // bias towards one or two hit modules
      nh = 1 + ($urandom % 5 == 0 ? 2 : $urandom % 2);
      hit = (nh == 3) ? 3'b111 : (nh == 1) ? 3'b001 << ($urandom % 3)
                                           : ~(3'b001 << ($urandom % 3));
      for (int p = 0; p < L; p++) begin
        owner = $urandom % 4;
        if (owner < 3 && hit[owner]) m[owner][p] = 1'b1;
      end
      // make sure every chosen module has at least one wrong flip-flop, in
      // positions no other module uses
      for (int k = 0; k < 3; k++)
        if (hit[k] && m[k] == '0) begin
          for (int p = 0; p < L; p++)
            if (m[0][p] == 0 && m[1][p] == 0 && m[2][p] == 0) begin
              m[k][p] = 1'b1;
              break;
            end
        end
      hit = {m[2] != 0, m[1] != 0, m[0] != 0};
      upset1 = m[0]; upset2 = m[1]; upset3 = m[2];
      settle();
      if (hit == 3'b111) begin
        expect_true(state == ST_UNREC, "three hit modules -> unrecoverable");
        n_three++;
        do_reset();
        repeat (2) step();
      end else begin
        expect_true(state == ST_NORMAL, "back to normal");
        expect_true(state1 == g && state2 == g && state3 == g, $sformatf("all modules restored (masks %b %b %b)", m[0], m[1], m[2]));
        expect_true(fmr == hit, $sformatf("FMR names the hit modules %b", hit));
        if (hit == 3'b001 || hit == 3'b010 || hit == 3'b100) n_one++; else n_two++;
      end
      repeat (1 + $urandom % 3) step();
    end

    // common erroneous flip-flop: modules II and III wrong in the same place
    for (int ep = 0; ep < 10; ep++) begin
      int p;
      p = $urandom % L;
      upset2 = L'(1) << p; upset3 = L'(1) << p;
      step();
      settle();
      // the golden state has moved on since the upset; the wrong bit has
      // moved with it, so compare the three modules with each other and
      // with the golden state
      expect_true(state == ST_NORMAL && fmr == 3'b001, "good module I reported faulty");
      expect_true(state1 == state2 && state2 == state3, "modules made equal");
      expect_true(state1 != g, "common fault is not repaired");
      if (state1 != g) n_common++;
      do_reset();
      repeat (2) step();
    end

    $display("episodes: one=%0d two=%0d three=%0d common=%0d", n_one, n_two, n_three, n_common);
    expect_true(n_one > 0 && n_two > 0 && n_three > 0 && n_common > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
