// scan_router_tb: exhaustive self-checking test of the bit-level recovery
// path: for all eight combinations of the three scan-out bits, every module's
// scan-in must equal the majority bit, the chosen source must agree with the
// majority, and the odd-one-out flags must name the disagreeing module.
module scan_router_tb;
  import smertmr_pkg::*;
  mod_vec_t sco, odd, sci;
  pair_vec_t mis;
  logic [1:0] src;
  logic ff_bit, maj;
  int checks = 0, failures = 0;

  scan_router dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      sco = v[2:0];
      mis = {sco[1] ^ sco[2], sco[0] ^ sco[2], sco[0] ^ sco[1]};
      #1;
      maj = (sco[0] & sco[1]) | (sco[0] & sco[2]) | (sco[1] & sco[2]);
      checks++;
      if (sci !== {3{maj}} || ff_bit !== maj || sco[src] !== maj) begin
        failures++;
        $display("FAIL sco=%b sci=%b ff=%b src=%0d", sco, sci, ff_bit, src);
      end
      checks++;
      if (odd !== (sco ^ {3{maj}})) begin
        failures++;
        $display("FAIL odd sco=%b odd=%b", sco, odd);
      end
      // lowest fault-free module is preferred
      checks++;
      if (src !== ((sco[0] == maj) ? 2'd0 : 2'd1)) begin
        failures++;
        $display("FAIL src sco=%b src=%0d", sco, src);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
