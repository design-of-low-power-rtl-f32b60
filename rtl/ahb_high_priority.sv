// High-Priority arbitration scheme (ARBITRATION = 00).
//
// The priority order is fixed: HBUSREQ_0 > HBUSREQ_1 > HBUSREQ_2 >
// HBUSREQ_3, so with masters 1 and 3 requesting, master 1 is granted. When no
// master requests, DEFAULT is asserted instead of a grant. The block is
// combinational; the arbitration select controller registers its result in
// the HIGH_PRIORITY state, so the grant appears on HGRANT_x one clock later.
// The priority order and the DEFAULT output follow the published design;
// keeping the block combinational, with the register in the controller, is
// this design's choice.
module ahb_high_priority
  import ahb_arb_pkg::*;
(
  input  req_vec_t req,    // HBUSREQ_x after SPLIT masking
  output req_vec_t grant,  // one-hot grant
  output logic     dflt    // no master requests: the default master is granted
);

  always_comb begin
    grant = '0;
    for (int i = NUM_MASTERS - 1; i >= 0; i--)
      if (req[i]) grant = req_vec_t'(1) << i;
  end

  assign dflt = ~|req;

endmodule
