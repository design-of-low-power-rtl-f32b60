// Self-checking testbench of the arbitration select controller.
//
// The four scheme decisions are driven directly by the testbench, so the
// controller is tested on its own. Directed scenarios check: the reset state
// (IDLE, DEFAULT, HMASTER = default id); the state sequence IDLE ->
// ARBITRATION -> scheme state -> HMASTER and the three-edge request-to-grant
// latency; that ARBITRATION[1:0] picks the matching scheme's decision for
// each of its four codes; the per-scheme enables; HMASTER held while HREADY is
// low; grant held under HLOCK with HMASTLOCK; grant held during a Round-Robin
// slot; SPLIT masking and its release by HSPLIT; a DEFAULT grant when the
// scheme finds nobody; the return to IDLE.
module tb_ahb_arb_ctrl;
  import ahb_arb_pkg::*;

  logic       hclk = 1'b0, hresetn = 1'b0, enable = 1'b1, hready = 1'b1;
  arb_sel_e   arbitration = ARB_HIGH_PRIORITY;
  req_vec_t   hbusreq = '0, hlock = '0, hsplit = '0;
  hresp_e     hresp = HRESP_OKAY;
  req_vec_t   hp_grant = '0, fc_grant = '0, ra_grant = '0, rr_grant = '0;
  logic       rr_slot_over = 1'b1;
  req_vec_t   req_masked, hgrant;
  logic       en_fc, en_ra, en_rr, rr_load, dflt, hmastlock;
  master_id_t hmaster;
  arb_state_e state;
  int         checks = 0, failures = 0;

  ahb_arb_ctrl dut (.*);

  always #5 hclk = ~hclk;

  initial begin
    repeat (2000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int n = 1);
    repeat (n) @(posedge hclk);
    #1;
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  // Request with the given scheme; returns after the grant is registered.
  task automatic arbitrate(arb_sel_e sel, arb_state_e scheme_state, req_vec_t g);
    arbitration = sel;
    hp_grant = '0; fc_grant = '0; ra_grant = '0; rr_grant = '0;
    case (sel)
      ARB_HIGH_PRIORITY: hp_grant = g;
      ARB_FAIR_CHANCE:   fc_grant = g;
      ARB_RANDOM_ACCESS: ra_grant = g;
      default:           rr_grant = g;
    endcase
    expect_eq("state ARBITRATION", state, ST_ARBITRATION);
    step();
    expect_eq("scheme state", state, scheme_state);
    expect_eq("rr_load", rr_load, scheme_state == ST_ROUND_ROBIN);
    step();
    expect_eq("state HMASTER", state, ST_HMASTER);
    expect_eq("hgrant", hgrant, g);
    expect_eq("dflt", dflt, g == '0);
  endtask

  initial begin
    step(2);
    expect_eq("reset state", state, ST_IDLE);
    expect_eq("reset dflt", dflt, 1);
    expect_eq("reset hgrant", hgrant, 0);
    expect_eq("reset hmaster", hmaster, NUM_MASTERS);
    hresetn = 1'b1;
    step(3);
    expect_eq("idle stays idle", state, ST_IDLE);

    // High priority: master 1 requests; grant three edges after the request.
    hbusreq = 4'b0010;
    step();
    arbitrate(ARB_HIGH_PRIORITY, ST_HIGH_PRIORITY, 4'b0010);
    expect_eq("hmaster before hready edge", hmaster, NUM_MASTERS);
    hready = 1'b0;
    step(3);
    expect_eq("held in HMASTER while HREADY low", state, ST_HMASTER);
    expect_eq("hmaster unchanged while HREADY low", hmaster, NUM_MASTERS);
    hready = 1'b1;
    step();
    expect_eq("hmaster = 1", hmaster, 1);
    expect_eq("hmastlock low", hmastlock, 0);

    // Fair chance, with its enable gating.
    arbitrate(ARB_FAIR_CHANCE, ST_FAIR_CHANCE, 4'b0100);
    expect_eq("en_fc", {en_fc, en_ra, en_rr}, 3'b100);
    step();
    expect_eq("hmaster = 2", hmaster, 2);

    // Random access.
    arbitrate(ARB_RANDOM_ACCESS, ST_RANDOM_ACCESS, 4'b1000);
    expect_eq("en_ra", {en_fc, en_ra, en_rr}, 3'b010);
    step();
    expect_eq("hmaster = 3", hmaster, 3);

    // Round robin: slot not over and owner requesting -> grant held.
    hbusreq = 4'b0001;
    rr_slot_over = 1'b0;
    arbitrate(ARB_ROUND_ROBIN, ST_ROUND_ROBIN, 4'b0001);
    expect_eq("en_rr", {en_fc, en_ra, en_rr}, 3'b001);
    for (int c = 0; c < 4; c++) begin
      step();
      expect_eq("held during slot", state, ST_HMASTER);
    end
    expect_eq("hmaster = 0", hmaster, 0);
    rr_slot_over = 1'b1;
    step();
    expect_eq("slot over -> ARBITRATION", state, ST_ARBITRATION);

    // Lock: master 2 holds HLOCK.
    hbusreq = 4'b0100;
    hlock   = 4'b0100;
    arbitrate(ARB_HIGH_PRIORITY, ST_HIGH_PRIORITY, 4'b0100);
    for (int c = 0; c < 5; c++) begin
      step();
      expect_eq("held under HLOCK", state, ST_HMASTER);
    end
    expect_eq("hmastlock", hmastlock, 1);
    expect_eq("hmaster = 2 locked", hmaster, 2);
    hlock = '0;
    step();
    expect_eq("lock released -> ARBITRATION", state, ST_ARBITRATION);

    // SPLIT: master 2 owns the data phase; a SPLIT response masks it.
    hresp = HRESP_SPLIT;
    step();
    hresp = HRESP_OKAY;
    expect_eq("split masks master 2", req_masked, 4'b0000);
    hbusreq = 4'b0110;
    step();
    expect_eq("only master 1 visible", req_masked, 4'b0010);
    hsplit = 4'b0100;
    step();
    hsplit = '0;
    expect_eq("HSPLIT releases master 2", req_masked, 4'b0110);

    // Scheme finds nobody: DEFAULT grant.
    while (state != ST_ARBITRATION) step();
    arbitrate(ARB_HIGH_PRIORITY, ST_HIGH_PRIORITY, 4'b0000);
    hbusreq = '0;
    step();
    expect_eq("default hmaster", hmaster, NUM_MASTERS);
    expect_eq("back to IDLE", state, ST_IDLE);
    step();
    expect_eq("IDLE dflt", dflt, 1);
    expect_eq("IDLE hgrant", hgrant, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
