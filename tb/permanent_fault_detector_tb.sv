// permanent_fault_detector_tb: self-checking test of the MRFM/NCF logic.
// A random stream of located fault sets (mostly single modules, biased to
// repeat) is applied with random update strobes and compared with a model:
// NCF counts consecutive repeats of the same single module, saturating, and
// a permanent fault is declared when it exceeds the threshold.
module permanent_fault_detector_tb;
  import smertmr_pkg::*;
  localparam int unsigned TH = 2;
  localparam int unsigned NW = $clog2(TH + 2);
  logic clk = 0, rst_n = 0, update = 0, perm;
  mod_vec_t fm = '0, mrfm, m_mrfm, last;
  logic [NW-1:0] ncf;
  int m_ncf, nperm;
  logic exp_perm, same;
  int checks = 0, failures = 0;

  permanent_fault_detector #(.NCF_TH(TH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_mrfm = '0; m_ncf = 0; nperm = 0; last = 3'b001;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      case ($urandom % 6)
        0, 1, 2: fm = last;
        3:       fm = 3'b001 << ($urandom % 3);
        4:       fm = 3'b110;
        default: fm = 3'b011;
      endcase
      last   = fm;
      update = ($urandom % 4) != 0;
      same   = (fm == m_mrfm) && (fm == 3'b001 || fm == 3'b010 || fm == 3'b100);
      exp_perm = update && same && (m_ncf + 1 > TH);
      #1;
      checks++;
      if (perm !== exp_perm) begin
        failures++;
        $display("FAIL perm=%b exp=%b fm=%b mrfm=%b ncf=%0d", perm, exp_perm, fm, m_mrfm, m_ncf);
      end
      if (exp_perm) nperm++;
      if (update) begin
        m_ncf  = same ? ((m_ncf == TH + 1) ? m_ncf : m_ncf + 1) : 0;
        m_mrfm = fm;
      end
      @(posedge clk); #1;
      checks++;
      if (mrfm !== m_mrfm || int'(ncf) != m_ncf) begin
        failures++;
        $display("FAIL mrfm=%b/%b ncf=%0d/%0d", mrfm, m_mrfm, ncf, m_ncf);
      end
    end
    checks++;
    if (nperm == 0) begin
      failures++;
      $display("FAIL no permanent fault was ever declared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
