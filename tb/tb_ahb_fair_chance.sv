// Self-checking testbench of the Fair-Chance scheme.
//
// A reference token (one-hot, reset 0001, rotating left on each edge with
// ENABLE high) is kept beside the block. Each cycle the expected grant is the
// first requester found walking up from the token holder round the ring.
// Random requests and ENABLE run for 2000 cycles. A final phase holds all
// requests high with ENABLE high and checks that the grant visits masters
// 0, 1, 2, 3 in consecutive cycles (no starvation).
module tb_ahb_fair_chance;
  import ahb_arb_pkg::*;

  logic     hclk = 1'b0, hresetn = 1'b0, enable = 1'b0;
  req_vec_t req = '0, grant, token, ref_token, exp_grant;
  logic     dflt;
  int       checks = 0, failures = 0, cycles = 0;

  ahb_fair_chance dut (
    .hclk(hclk), .hresetn(hresetn), .enable(enable), .req(req),
    .grant(grant), .dflt(dflt), .token(token)
  );

  always #5 hclk = ~hclk;

  initial begin
    repeat (5000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic req_vec_t expect_grant(req_vec_t r, req_vec_t t);
    int start = 0;
    for (int i = 0; i < NUM_MASTERS; i++) if (t[i]) start = i;
    for (int k = 0; k < NUM_MASTERS; k++)
      if (r[(start + k) % NUM_MASTERS]) return req_vec_t'(1) << ((start + k) % NUM_MASTERS);
    return '0;
  endfunction

  task automatic check_now();
    exp_grant = expect_grant(req, ref_token);
    checks++;
    if (token !== ref_token || grant !== exp_grant || dflt !== (req == '0)) begin
      failures++;
      $display("FAIL t=%0t req=%b token=%b/%b grant=%b exp=%b", $time, req, token,
               ref_token, grant, exp_grant);
    end
  endtask

  initial begin
    ref_token = 4'b0001;
    repeat (2) @(posedge hclk);
    #1 hresetn = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      req    = req_vec_t'($urandom_range(0, 15));
      enable = ($urandom_range(0, 2) == 0);
      #1 check_now();
      @(posedge hclk);
      if (enable) ref_token = {ref_token[2:0], ref_token[3]};
      #1;
    end
    // All request, token moves every cycle: grants 0,1,2,3 in turn.
    req = 4'b1111;
    enable = 1'b1;
    for (int c = 0; c < 8; c++) begin
      #1 check_now();
      checks++;
      if (grant !== (req_vec_t'(1) << ((onehot_to_id(ref_token)) % NUM_MASTERS))) begin
        failures++;
        $display("FAIL starvation phase grant=%b token=%b", grant, ref_token);
      end
      @(posedge hclk);
      ref_token = {ref_token[2:0], ref_token[3]};
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
