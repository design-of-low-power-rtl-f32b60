// Self-checking testbench of the High-Priority scheme.
//
// Applies all 16 request patterns and compares the grant with the
// lowest-numbered requesting master (master 0 has the highest priority), and
// DEFAULT with "nobody requests". Also checks the worked example of masters 1
// and 3 requesting, where master 1 must win.
module tb_ahb_high_priority;
  import ahb_arb_pkg::*;

  req_vec_t req, grant, exp_grant;
  logic     dflt;
  int       checks = 0, failures = 0;

  ahb_high_priority dut (.req(req), .grant(grant), .dflt(dflt));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 16; p++) begin
      req = req_vec_t'(p);
      #1;
      exp_grant = '0;
      for (int i = 0; i < NUM_MASTERS; i++)
        if (req[i] && exp_grant == '0) exp_grant[i] = 1'b1;
      checks++;
      if (grant !== exp_grant || dflt !== (p == 0)) begin
        failures++;
        $display("FAIL req=%b grant=%b exp=%b dflt=%b", req, grant, exp_grant, dflt);
      end
    end
    req = 4'b1010;
    #1;
    checks++;
    if (grant !== 4'b0010) begin
      failures++;
      $display("FAIL masters 1 and 3 requesting: grant=%b", grant);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
