// scan_module_tb: self-checking test of one TMR replica.
// Drives random inputs, scan-enable, hold and upset masks and compares the
// state with a reference model of the three operations (normal rotate with
// input parity, hold, scan shift), then checks that L_SC scan shifts with SCI
// tied to SCO restore the state.
module scan_module_tb;
  localparam int unsigned L = 3;
  localparam int unsigned IW = 2;
  logic clk = 0, rst_n = 0, en = 0, sce = 0, sci = 0;
  logic [IW-1:0] din = '0;
  logic [L-1:0]  upset = '0;
  logic sco, dout;
  logic [L-1:0] state, model, saved;
  int checks = 0, failures = 0;

  scan_module #(.L_SC(L), .IN_W(IW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (state !== model || sco !== model[L-1] || dout !== model[L-1]) begin
      failures++;
      $display("FAIL %s: state=%b model=%b sco=%b dout=%b", what, state, model, sco, dout);
    end
  endtask

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("reset");
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en    = 1'($urandom);
      sce   = ($urandom % 4) == 0;
      sci   = 1'($urandom);
      din   = IW'($urandom);
      upset = (($urandom % 5) == 0) ? L'($urandom) : '0;
      if (sce)     model = {model[L-2:0], sci};
      else if (en) model = {model[L-2:0], model[L-1] ^ (^din)};
      model = model ^ upset;
      @(posedge clk); #1;
      check("step");
    end
    // recirculating scan restores the state after L shifts
    @(negedge clk);
    upset = '0; saved = state;
    for (int k = 0; k < L; k++) begin
      sce = 1; sci = sco;
      @(posedge clk); #1;
      @(negedge clk);
    end
    sce = 0; en = 0;
    checks++;
    if (state !== saved) begin
      failures++;
      $display("FAIL recirculate: %b vs %b", state, saved);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
