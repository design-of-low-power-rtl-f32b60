// Arbitration select controller of the reconfigurable AHB arbiter.
//
// A one-hot Moore state machine with the states
//   IDLE          nobody requests; DEFAULT is asserted, no HGRANT_x is high
//   ARBITRATION   a request is pending; ARBITRATION[1:0] is sampled and the
//                 machine moves to the state of the chosen scheme
//   HIGH_PRIORITY, FAIR_CHANCE, RANDOM_ACCESS, ROUND_ROBIN
//                 the chosen scheme's decision is written to HGRANT_x (or
//                 DEFAULT when it finds no requester)
//   HMASTER       once HREADY is high, the granted master's number is put on
//                 HMASTER and its HLOCK on HMASTLOCK
// From HMASTER the machine returns to ARBITRATION (or IDLE when nobody
// requests) at the first edge with HREADY high, unless the granted master
// holds HLOCK, or the Round-Robin scheme is active and the granted master
// still requests within its time slot; then the grant is held.
//
// SPLIT: a SPLIT response (HRESP = 11 with HREADY high) masks the master of
// the data phase out of arbitration until a slave sets its HSPLIT bit. The
// masked request vector is what the four schemes see.
//
// Power: the scheme enables EN_x follow ENABLE only for the scheme that is
// selected, so the ring counter, the LFSR and the slot timer of the unused
// schemes do not switch.
//
// Timing: a request seen in IDLE gives HGRANT_x three HCLK edges later, and
// HMASTER at the next edge with HREADY high. Reset is asynchronous, active
// low. The default master's number on HMASTER is DEFAULT_ID.
// The states, their order and the one-hot Moore style follow the published
// design; the hold rules, the way back from HMASTER, the SPLIT mask (standard
// AMBA 2 behaviour) and DEFAULT_ID are choices made here. The assertions
// sample hresetn synchronously while the flops use it asynchronously, which
// lint in Verilator reports as SYNCASYNCNET; that is intended.
module ahb_arb_ctrl
  import ahb_arb_pkg::*;
#(
  parameter master_id_t DEFAULT_ID = master_id_t'(NUM_MASTERS)
) (
  input  logic       hclk,
  input  logic       hresetn,
  input  logic       enable,
  input  arb_sel_e   arbitration,
  input  req_vec_t   hbusreq,
  input  req_vec_t   hlock,
  input  logic       hready,
  input  hresp_e     hresp,
  input  req_vec_t   hsplit,
  // decisions of the four schemes
  input  req_vec_t   hp_grant,
  input  req_vec_t   fc_grant,
  input  req_vec_t   ra_grant,
  input  req_vec_t   rr_grant,
  input  logic       rr_slot_over,
  // to the schemes
  output req_vec_t   req_masked,
  output logic       en_fc,
  output logic       en_ra,
  output logic       en_rr,
  output logic       rr_load,
  // bus outputs
  output req_vec_t   hgrant,
  output logic       dflt,
  output master_id_t hmaster,
  output logic       hmastlock,
  output arb_state_e state
);

  arb_sel_e   sel_q;
  req_vec_t   split_mask;
  master_id_t dmaster;        // master of the data phase
  req_vec_t   cand;
  logic       any_req;
  logic       hold;
  arb_state_e state_d;

  assign req_masked = hbusreq & ~split_mask;
  assign any_req    = |req_masked;

  always_comb begin
    unique case (sel_q)
      ARB_HIGH_PRIORITY: cand = hp_grant;
      ARB_FAIR_CHANCE:   cand = fc_grant;
      ARB_RANDOM_ACCESS: cand = ra_grant;
      default:           cand = rr_grant;
    endcase
  end

  assign en_fc   = enable && sel_q == ARB_FAIR_CHANCE;
  assign en_ra   = enable && sel_q == ARB_RANDOM_ACCESS;
  assign en_rr   = enable && sel_q == ARB_ROUND_ROBIN;
  assign rr_load = (state == ST_ROUND_ROBIN);

  assign hold = |(hgrant & hlock)
             || (sel_q == ARB_ROUND_ROBIN && !rr_slot_over && |(hgrant & req_masked));

  always_comb begin
    state_d = state;
    unique case (state)
      ST_IDLE:        if (any_req) state_d = ST_ARBITRATION;
      ST_ARBITRATION: begin
        unique case (arbitration)
          ARB_HIGH_PRIORITY: state_d = ST_HIGH_PRIORITY;
          ARB_FAIR_CHANCE:   state_d = ST_FAIR_CHANCE;
          ARB_RANDOM_ACCESS: state_d = ST_RANDOM_ACCESS;
          default:           state_d = ST_ROUND_ROBIN;
        endcase
      end
      ST_HIGH_PRIORITY, ST_FAIR_CHANCE,
      ST_RANDOM_ACCESS, ST_ROUND_ROBIN: state_d = ST_HMASTER;
      ST_HMASTER: if (hready && !hold) state_d = any_req ? ST_ARBITRATION : ST_IDLE;
      default:        state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state     <= ST_IDLE;
      sel_q     <= ARB_HIGH_PRIORITY;
      hgrant    <= '0;
      dflt      <= 1'b1;
      hmaster   <= DEFAULT_ID;
      hmastlock <= 1'b0;
    end else begin
      state <= state_d;
      unique case (state)
        ST_IDLE: begin
          hgrant <= '0;
          dflt   <= 1'b1;
          if (hready) begin
            hmaster   <= DEFAULT_ID;
            hmastlock <= 1'b0;
          end
        end
        ST_ARBITRATION: sel_q <= arbitration;
        ST_HIGH_PRIORITY, ST_FAIR_CHANCE,
        ST_RANDOM_ACCESS, ST_ROUND_ROBIN: begin
          hgrant <= cand;
          dflt   <= ~|cand;
        end
        ST_HMASTER: if (hready) begin
          hmaster   <= dflt ? DEFAULT_ID : onehot_to_id(hgrant);
          hmastlock <= |(hgrant & hlock);
        end
        default: ;
      endcase
    end
  end

  // Data-phase owner and SPLIT mask.
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dmaster    <= DEFAULT_ID;
      split_mask <= '0;
    end else begin
      if (hready) dmaster <= hmaster;
      for (int unsigned i = 0; i < NUM_MASTERS; i++) begin
        if (hsplit[i])
          split_mask[i] <= 1'b0;
        else if (hready && hresp == HRESP_SPLIT && dmaster == master_id_t'(i))
          split_mask[i] <= 1'b1;
      end
    end
  end

  a_grant_onehot: assert property (@(posedge hclk) disable iff (!hresetn)
    $onehot0(hgrant) && (dflt == (hgrant == '0)));
  a_state_onehot: assert property (@(posedge hclk) disable iff (!hresetn) $onehot(state));

endmodule
