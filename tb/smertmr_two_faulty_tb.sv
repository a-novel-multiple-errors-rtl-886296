// smertmr_two_faulty_tb: directed run of the evaluated scenario: a TMR system
// of three 3-flip-flop circuits with inputs a and b, in which modules II and
// III are both faulty (different flip-flops, one of the faults not yet
// visible at the outputs). Checks that the voter raises the error, that the
// scan enable is high for exactly three rising clock edges, that after them
// the three modules hold identical, correct states, that the faulty-module
// register names modules II and III, and that normal operation resumes with
// the voted output following the fault-free circuit.
module smertmr_two_faulty_tb;
  import smertmr_pkg::*;
  localparam int unsigned L = 3;

  logic clk = 0, rst_n = 0;
  logic a = 0, b = 0;
  logic [L-1:0] upset1 = '0, upset2 = '0, upset3 = '0;
  pair_vec_t te_flip = '0, te, e;
  logic vout, recovering, degraded, unrecoverable;
  ctrl_state_t state;
  mod_vec_t fmr, perm_mod, mrfm;
  flu_class_t flu_cls;
  logic [1:0] ncf, cnt12, cnt13, cnt23;
  logic [L-1:0] state1, state2, state3, g;
  int checks = 0, failures = 0, shifts = 0;

  smertmr_top dut (.din({b, a}), .*);

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: %s g=%b m=%b %b %b", what, state.name(), g, state1, state2, state3);
    end
  endtask

  // count rising edges with the scan chains enabled
  always @(posedge clk) if (dut.sce) shifts++;

  initial begin
    g = '0;
    @(negedge clk) rst_n = 1;
    // a few normal cycles; the golden circuit follows the same rule
    for (int i = 0; i < 6; i++) begin
      a = 1'($urandom); b = 1'($urandom);
      @(posedge clk) g = {g[L-2:0], g[L-1] ^ a ^ b};
      @(negedge clk) expect_true(vout == g[L-1], "voted output in normal operation");
    end
    // module II gets a latent fault in flip-flop 0, module III a visible one
    // in flip-flop 2
    upset2 = 3'b001; upset3 = 3'b100;
    a = 1'($urandom); b = 1'($urandom);
    @(posedge clk) g = {g[L-2:0], g[L-1] ^ a ^ b};
    @(negedge clk);
    upset2 = '0; upset3 = '0;
    expect_true(e != '0, "voter reports the error");
    expect_true(state2 != g && state3 != g && state1 == g, "modules II and III are faulty");
    // recovery: freeze, three scan shifts, verdict
    repeat (L + 2) @(negedge clk);
    expect_true(shifts == L, $sformatf("%0d scan shifts, expected %0d", shifts, L));
    expect_true(state1 == g && state2 == g && state3 == g, "all modules recovered");
    expect_true(fmr == 3'b110, $sformatf("FMR %b names modules II and III", fmr));
    expect_true(state == ST_NORMAL && !recovering, "normal operation resumed");
    for (int i = 0; i < 6; i++) begin
      a = 1'($urandom); b = 1'($urandom);
      @(posedge clk) g = {g[L-2:0], g[L-1] ^ a ^ b};
      @(negedge clk) expect_true(vout == g[L-1] && state2 == g && state3 == g, "normal operation after recovery");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
