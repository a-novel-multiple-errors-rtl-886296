// tmr_voter_tb: exhaustive self-checking test of the voter: every
// combination of the three outputs, the Pr lines and the comparator fault
// mask, against independently written expected TE, E and output values.
module tmr_voter_tb;
  import smertmr_pkg::*;
  logic o1, o2, o3, vout;
  pair_vec_t pr, te_flip, te, e;
  int checks = 0, failures = 0;
  logic [2:0] exp_te, exp_e;
  logic exp_out;

  tmr_voter #(.W(1)) dut (.out1(o1), .out2(o2), .out3(o3), .pr, .te_flip, .te, .e, .vout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {o3, o2, o1} = v[2:0];
      pr           = v[5:3];
      te_flip      = v[8:6];
      #1;
      exp_te  = {(o2 != o3), (o1 != o3), (o1 != o2)} ^ te_flip;
      exp_e   = exp_te | pr;
      // module I is voted out when it disagrees with both others
      exp_out = (exp_e[0] && exp_e[1]) ? o2 : o1;
      checks++;
      if (te !== exp_te || e !== exp_e || vout !== exp_out) begin
        failures++;
        $display("FAIL v=%0d te=%b/%b e=%b/%b out=%b/%b", v, te, exp_te, e, exp_e, vout, exp_out);
      end
      // with a healthy voter and no Pr, the output is the majority
      if (pr == 0 && te_flip == 0) begin
        checks++;
        if (vout !== ((o1 & o2) | (o1 & o3) | (o2 & o3))) begin
          failures++;
          $display("FAIL majority v=%0d", v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
