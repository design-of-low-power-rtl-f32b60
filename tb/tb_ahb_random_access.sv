// Self-checking testbench of the Random-Access scheme.
//
// Keeps a reference 16-bit LFSR (taps 16, 14, 13, 11, seed ACE1) beside the
// block, shifting it on each edge with ENABLE high. Each cycle it checks the
// four numbers (the LFSR nibbles, zero for masters that do not request) and
// the grant (largest number among requesters, lowest index on a tie).
// Random requests and ENABLE run for 3000 cycles. A directed case feeds the
// comparator with NUM_3 = 1111, NUM_2 = NUM_1 = 0111, NUM_0 = 0000 and
// masters 1..3 requesting: master 3 must win.
module tb_ahb_random_access;
  import ahb_arb_pkg::*;

  logic        hclk = 1'b0, hresetn = 1'b0, enable = 1'b0;
  req_vec_t    req = '0, grant, exp_grant, c_req, c_grant;
  logic        dflt, c_dflt;
  logic [3:0]  num [NUM_MASTERS];
  logic [3:0]  c_num [NUM_MASTERS];
  logic [15:0] ref_lfsr;
  int          checks = 0, failures = 0;

  ahb_random_access dut (
    .hclk(hclk), .hresetn(hresetn), .enable(enable), .req(req),
    .grant(grant), .dflt(dflt), .num(num)
  );

  ahb_comparator cmp (.req(c_req), .num(c_num), .grant(c_grant), .dflt(c_dflt));

  always #5 hclk = ~hclk;

  initial begin
    repeat (6000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    logic [3:0] best;
    logic [3:0] n;
    exp_grant = '0;
    best = '0;
    for (int i = 0; i < NUM_MASTERS; i++) begin
      n = req[i] ? ref_lfsr[4*i +: 4] : 4'd0;
      checks++;
      if (num[i] !== n) begin
        failures++;
        $display("FAIL num[%0d]=%h exp %h", i, num[i], n);
      end
      if (req[i] && (exp_grant == '0 || n > best)) begin
        best = n;
        exp_grant = req_vec_t'(1) << i;
      end
    end
    checks++;
    if (grant !== exp_grant || dflt !== (req == '0)) begin
      failures++;
      $display("FAIL req=%b lfsr=%h grant=%b exp=%b", req, ref_lfsr, grant, exp_grant);
    end
  endtask

  initial begin
    ref_lfsr = 16'hACE1;
    c_req = 4'b1110;
    c_num[3] = 4'b1111; c_num[2] = 4'b0111; c_num[1] = 4'b0111; c_num[0] = 4'b0000;
    #1;
    checks++;
    if (c_grant !== 4'b1000 || c_dflt !== 1'b0) begin
      failures++;
      $display("FAIL directed comparator grant=%b", c_grant);
    end
    c_req = 4'b0110;  // tie between masters 1 and 2: lower index wins
    #1;
    checks++;
    if (c_grant !== 4'b0010) begin
      failures++;
      $display("FAIL tie grant=%b", c_grant);
    end
    repeat (2) @(posedge hclk);
    #1 hresetn = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      req    = req_vec_t'($urandom_range(0, 15));
      enable = ($urandom_range(0, 3) != 0);
      #1 check_now();
      @(posedge hclk);
      if (enable)
        ref_lfsr = {ref_lfsr[14:0], ref_lfsr[15] ^ ref_lfsr[13] ^ ref_lfsr[12] ^ ref_lfsr[10]};
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
