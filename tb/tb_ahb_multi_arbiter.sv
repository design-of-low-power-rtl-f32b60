// End-to-end self-checking testbench of the reconfigurable AHB arbiter, at
// the default parameters.
//
// A cycle-level reference model runs beside the design: the selected scheme
// (sampled in ARBITRATION), the SPLIT mask, the data-phase master, the
// Fair-Chance token, the Random-Access LFSR and the Round-Robin owner and
// slot. Just before each rising edge the testbench snapshots the design's
// state and inputs and predicts, for that edge, the next controller state,
// the decision written to HGRANT_x/DEFAULT in a scheme state, and HMASTER /
// HMASTLOCK in the HMASTER state. After the edge it compares.
//
// Stimulus: directed runs first (masters 1 and 3 under High Priority, all
// masters under Fair Chance, masters 1 to 3 under Fair Chance with ENABLE
// pulses and under Random Access, all masters under Round Robin with INCR4
// bursts), then
// random traffic in each of the four modes and with the mode switched at
// random: random requests, HREADY low about one cycle in five, HLOCK, SPLIT
// responses and HSPLIT releases. Each mechanism is counted and a mechanism
// that never occurs counts as a failure.
module tb_ahb_multi_arbiter;
  import ahb_arb_pkg::*;

  logic             hclk = 1'b0, hresetn = 1'b0, enable = 1'b1, hready = 1'b1;
  logic [1:0]       arbitration = 2'b00, hresp = 2'b00;
  logic [2:0]       hburst = 3'b000;
  req_vec_t         hbusreq = '0, hlock = '0, hsplit = '0;
  req_vec_t         hgrant, token;
  logic             default_grant, hmastlock;
  master_id_t       hmaster;
  logic [NUM_W-1:0] number [NUM_MASTERS];
  arb_state_e       state;

  ahb_multi_arbiter dut (.*);

  always #5 hclk = ~hclk;

  int checks = 0, failures = 0, cycles = 0;

  // mechanism counters
  int n_hp, n_fc, n_ra, n_rr, n_default, n_token_moves, n_stall, n_lock_hold,
      n_rr_slot_hold, n_split, n_split_release, n_mode_switch, n_rr_rotation,
      n_fc_rotation;

  // reference model state
  arb_sel_e    sel_ref;
  req_vec_t    split_ref, token_ref, rr_owner_ref;
  master_id_t  dmaster_ref;
  logic [15:0] lfsr_ref;
  int          rr_cnt_ref;
  arb_sel_e    last_decided_sel;
  logic        have_decided;
  int          last_rr_master, last_fc_master;

  // snapshot and predictions
  arb_state_e s_state;
  req_vec_t   s_hgrant, exp_grant;
  logic       s_dflt, pred_decision, pred_hmaster;
  master_id_t s_hmaster, exp_hmaster;
  logic       exp_hmastlock;
  arb_state_e exp_state;

  initial begin
    repeat (40000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int slot_of(logic [2:0] b);
    case (b)
      3'b010, 3'b011: return 4;
      3'b100, 3'b101: return 8;
      3'b110, 3'b111: return 16;
      default:        return 1;
    endcase
  endfunction

  function automatic int id_of(req_vec_t v);
    for (int i = 0; i < NUM_MASTERS; i++) if (v[i]) return i;
    return 0;
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  // Decision of each scheme from the reference model.
  function automatic req_vec_t hp_decide(req_vec_t r);
    for (int i = 0; i < NUM_MASTERS; i++) if (r[i]) return req_vec_t'(1) << i;
    return '0;
  endfunction

  function automatic req_vec_t fc_decide(req_vec_t r, req_vec_t t);
    int s = id_of(t);
    for (int k = 0; k < NUM_MASTERS; k++)
      if (r[(s + k) % NUM_MASTERS]) return req_vec_t'(1) << ((s + k) % NUM_MASTERS);
    return '0;
  endfunction

  function automatic req_vec_t ra_decide(req_vec_t r, logic [15:0] l);
    req_vec_t g = '0;
    logic [3:0] best = '0;
    for (int i = 0; i < NUM_MASTERS; i++)
      if (r[i] && (g == '0 || l[4*i +: 4] > best)) begin
        best = l[4*i +: 4];
        g = req_vec_t'(1) << i;
      end
    return g;
  endfunction

  // Round-robin choice; also reports whether it starts a new turn.
  task automatic rr_decide(input req_vec_t r, output req_vec_t g, output logic new_turn);
    int  o = id_of(rr_owner_ref);
    logic keep = r[o] && rr_cnt_ref != 0;
    g = '0;
    new_turn = 1'b0;
    if (keep) g = rr_owner_ref;
    else
      for (int k = 1; k <= NUM_MASTERS; k++)
        if (g == '0 && r[(o + k) % NUM_MASTERS]) begin
          g = req_vec_t'(1) << ((o + k) % NUM_MASTERS);
          new_turn = 1'b1;
        end
  endtask

  // Snapshot before the edge, predict, update the model.
  always @(negedge hclk) if (hresetn) begin
    req_vec_t   req_m, rr_g;
    logic       rr_new, hold, any_req;
    cycles++;
    req_m   = hbusreq & ~split_ref;
    any_req = |req_m;
    s_state = state; s_hgrant = hgrant; s_dflt = default_grant; s_hmaster = hmaster;

    // observation outputs
    checks++;
    if (token !== token_ref) fail($sformatf("token %b expected %b", token, token_ref));
    for (int i = 0; i < NUM_MASTERS; i++) begin
      checks++;
      if (number[i] !== (req_m[i] ? lfsr_ref[4*i +: 4] : 4'd0))
        fail($sformatf("number[%0d]=%h expected %h", i, number[i], lfsr_ref[4*i +: 4]));
    end

    rr_decide(req_m, rr_g, rr_new);
    pred_decision = 1'b0;
    pred_hmaster  = 1'b0;
    hold = |(s_hgrant & hlock) ||
           (sel_ref == ARB_ROUND_ROBIN && rr_cnt_ref != 0 && |(s_hgrant & req_m));

    unique case (s_state)
      ST_IDLE:        exp_state = any_req ? ST_ARBITRATION : ST_IDLE;
      ST_ARBITRATION: begin
        case (arbitration)
          2'b00:   exp_state = ST_HIGH_PRIORITY;
          2'b01:   exp_state = ST_FAIR_CHANCE;
          2'b10:   exp_state = ST_RANDOM_ACCESS;
          default: exp_state = ST_ROUND_ROBIN;
        endcase
      end
      ST_HMASTER: begin
        exp_state = (hready && !hold) ? (any_req ? ST_ARBITRATION : ST_IDLE) : ST_HMASTER;
        if (hready) begin
          pred_hmaster  = 1'b1;
          exp_hmaster   = s_dflt ? master_id_t'(NUM_MASTERS) : master_id_t'(id_of(s_hgrant));
          exp_hmastlock = |(s_hgrant & hlock);
          if (hold && |(s_hgrant & hlock)) n_lock_hold++;
          else if (hold) n_rr_slot_hold++;
        end else begin
          n_stall++;
        end
      end
      default: begin
        exp_state     = ST_HMASTER;
        pred_decision = 1'b1;
        case (s_state)
          ST_HIGH_PRIORITY: begin exp_grant = hp_decide(req_m); n_hp++; end
          ST_FAIR_CHANCE:   begin exp_grant = fc_decide(req_m, token_ref); n_fc++; end
          ST_RANDOM_ACCESS: begin exp_grant = ra_decide(req_m, lfsr_ref); n_ra++; end
          default:          begin exp_grant = rr_g; n_rr++; end
        endcase
        if (exp_grant == '0) n_default++;
        if (have_decided && last_decided_sel != sel_ref) n_mode_switch++;
        have_decided = 1'b1;
        last_decided_sel = sel_ref;
        if (s_state == ST_ROUND_ROBIN && rr_new && exp_grant != '0) begin
          if (id_of(exp_grant) == (last_rr_master + 1) % NUM_MASTERS && hbusreq == 4'b1111)
            n_rr_rotation++;
          last_rr_master = id_of(exp_grant);
        end
        if (s_state == ST_FAIR_CHANCE && exp_grant != '0) begin
          if (id_of(exp_grant) == (last_fc_master + 1) % NUM_MASTERS && hbusreq == 4'b1111)
            n_fc_rotation++;
          last_fc_master = id_of(exp_grant);
        end
      end
    endcase

    // model updates for this edge
    if (enable && sel_ref == ARB_FAIR_CHANCE) begin
      token_ref = {token_ref[2:0], token_ref[3]};
      n_token_moves++;
    end
    if (enable && sel_ref == ARB_RANDOM_ACCESS)
      lfsr_ref = {lfsr_ref[14:0], lfsr_ref[15] ^ lfsr_ref[13] ^ lfsr_ref[12] ^ lfsr_ref[10]};
    if (s_state == ST_ROUND_ROBIN && rr_new) begin
      rr_owner_ref = rr_g;
      rr_cnt_ref   = slot_of(hburst) - 1;
    end else if (enable && sel_ref == ARB_ROUND_ROBIN && rr_cnt_ref != 0) begin
      rr_cnt_ref--;
    end
    if (s_state == ST_ARBITRATION) sel_ref = arb_sel_e'(arbitration);
    for (int i = 0; i < NUM_MASTERS; i++) begin
      if (hsplit[i]) begin
        if (split_ref[i]) n_split_release++;
        split_ref[i] = 1'b0;
      end else if (hready && hresp == 2'b11 && dmaster_ref == master_id_t'(i)) begin
        split_ref[i] = 1'b1;
        n_split++;
      end
    end
    if (hready) dmaster_ref = s_hmaster;
  end

  // Compare after the edge.
  always @(posedge hclk) if (hresetn) begin
    #1;
    checks++;
    if (state !== exp_state) fail($sformatf("state %b expected %b (from %b)", state, exp_state, s_state));
    if (pred_decision) begin
      checks++;
      if (hgrant !== exp_grant || default_grant !== (exp_grant == '0))
        fail($sformatf("decision in %b: hgrant %b expected %b", s_state, hgrant, exp_grant));
    end else if (s_state != ST_IDLE) begin
      checks++;
      if (hgrant !== s_hgrant) fail("hgrant changed outside a scheme state");
    end
    if (pred_hmaster) begin
      checks++;
      if (hmaster !== exp_hmaster || hmastlock !== exp_hmastlock)
        fail($sformatf("hmaster %0d/%b expected %0d/%b", hmaster, hmastlock, exp_hmaster, exp_hmastlock));
    end else if (s_state == ST_HMASTER) begin
      checks++;
      if (hmaster !== s_hmaster) fail("hmaster changed while HREADY low");
    end
  end

  task automatic cycles_of(int n);
    repeat (n) begin
      @(posedge hclk);
      #2;
    end
  endtask

  // Random traffic in one mode (mode < 0: switch modes at random).
  task automatic random_traffic(int mode, int n);
    logic lock_on = 1'b0;
    for (int c = 0; c < n; c++) begin
      @(posedge hclk);
      #2;
      arbitration = (mode < 0) ? 2'($urandom_range(0, 3)) : 2'(mode);
      if ($urandom_range(0, 3) == 0) hbusreq = req_vec_t'($urandom_range(0, 15));
      hready = ($urandom_range(0, 4) != 0);
      enable = ($urandom_range(0, 5) != 0);
      if ($urandom_range(0, 7) == 0) hburst = 3'($urandom_range(0, 7));
      if ($urandom_range(0, 30) == 0) lock_on = ~lock_on;
      hlock = lock_on ? (hbusreq & 4'b0101) : '0;
      hresp  = (hready && $urandom_range(0, 40) == 0 && dmaster_ref < NUM_MASTERS) ? 2'b11 : 2'b00;
      hsplit = (split_ref != '0 && $urandom_range(0, 15) == 0) ? split_ref : '0;
    end
    hresp = 2'b00; hsplit = '0; hlock = '0;
  endtask

  initial begin
    sel_ref = ARB_HIGH_PRIORITY; split_ref = '0; token_ref = 4'b0001;
    rr_owner_ref = 4'b1000; rr_cnt_ref = 0; lfsr_ref = 16'hACE1;
    dmaster_ref = master_id_t'(NUM_MASTERS);
    have_decided = 1'b0; last_rr_master = NUM_MASTERS - 1; last_fc_master = 0;
    {n_hp, n_fc, n_ra, n_rr, n_default, n_token_moves, n_stall, n_lock_hold,
     n_rr_slot_hold, n_split, n_split_release, n_mode_switch, n_rr_rotation, n_fc_rotation} = '0;
    cycles_of(2);
    hresetn = 1'b1;
    cycles_of(2);

    // High priority: masters 1 and 3 request; master 1 wins, in 3 edges.
    arbitration = 2'b00;
    hbusreq = 4'b1010;
    cycles_of(3);
    checks++;
    if (hgrant !== 4'b0010) fail($sformatf("HP example: hgrant %b", hgrant));
    cycles_of(1);
    checks++;
    if (hmaster !== 4'd1) fail($sformatf("HP example: hmaster %0d", hmaster));

    // Fair chance, all requesting: the grant walks round the masters.
    arbitration = 2'b01;
    hbusreq = 4'b1111;
    cycles_of(60);

    // Fair chance with ENABLE given as short pulses, masters 1..3 requesting.
    hbusreq = 4'b1110;
    for (int c = 0; c < 40; c++) begin
      enable = (c % 6 == 0);
      cycles_of(1);
    end
    enable = 1'b1;

    // Random access, masters 1..3 requesting: the largest number wins.
    arbitration = 2'b10;
    cycles_of(60);
    hbusreq = 4'b1111;

    // Round robin, all requesting INCR4 bursts.
    arbitration = 2'b11;
    hburst = 3'b011;
    cycles_of(80);
    hbusreq = '0;
    cycles_of(10);

    for (int m = 0; m < 4; m++) random_traffic(m, 2000);
    random_traffic(-1, 4000);

    $display("mechanisms: hp=%0d fc=%0d ra=%0d rr=%0d default=%0d token_moves=%0d stall=%0d",
             n_hp, n_fc, n_ra, n_rr, n_default, n_token_moves, n_stall);
    $display("            lock_hold=%0d rr_slot_hold=%0d split=%0d split_release=%0d mode_switch=%0d rr_rotation=%0d fc_rotation=%0d",
             n_lock_hold, n_rr_slot_hold, n_split, n_split_release, n_mode_switch, n_rr_rotation, n_fc_rotation);
    checks++; if (n_hp == 0)            fail("High Priority never decided");
    checks++; if (n_fc == 0)            fail("Fair Chance never decided");
    checks++; if (n_ra == 0)            fail("Random Access never decided");
    checks++; if (n_rr == 0)            fail("Round Robin never decided");
    checks++; if (n_default == 0)       fail("DEFAULT grant never occurred");
    checks++; if (n_token_moves == 0)   fail("token never moved");
    checks++; if (n_stall == 0)         fail("HREADY stall never occurred");
    checks++; if (n_lock_hold == 0)     fail("HLOCK hold never occurred");
    checks++; if (n_rr_slot_hold == 0)  fail("Round-Robin slot hold never occurred");
    checks++; if (n_split == 0)         fail("SPLIT never occurred");
    checks++; if (n_split_release == 0) fail("HSPLIT release never occurred");
    checks++; if (n_mode_switch == 0)   fail("mode switch never occurred");
    checks++; if (n_rr_rotation < 4)    fail("Round-Robin rotation not seen");
    checks++; if (n_fc_rotation < 4)    fail("Fair-Chance rotation not seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
