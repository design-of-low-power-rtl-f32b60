// Fair-Chance arbitration scheme (ARBITRATION = 01).
//
// A ring counter passes a one-hot token round the four masters. Four rotated
// priority logic blocks exist, block k giving request k the highest priority
// and the others following in ring order; only the block whose token bit is
// set is enabled, and its grant is the output. The token holder therefore
// wins whenever it requests, and otherwise the next requester round the ring
// wins, so no master starves. With no request, DEFAULT is asserted.
//
// Timing: the grant is combinational in the requests and the current token;
// the token advances on each HCLK edge with ENABLE high. The ring counter,
// the four rotated priority blocks and the token rule follow the published
// design; the token's reset value and its advance on ENABLE are choices made
// here.
module ahb_fair_chance
  import ahb_arb_pkg::*;
(
  input  logic     hclk,
  input  logic     hresetn,
  input  logic     enable,   // advances the token ring
  input  req_vec_t req,      // HBUSREQ_x after SPLIT masking
  output req_vec_t grant,    // one-hot grant
  output logic     dflt,     // no master requests
  output req_vec_t token     // TOKEN[3:0], for observation
);

  req_vec_t blk_grant [NUM_MASTERS];

  ahb_ring_counter u_ring (
    .hclk    (hclk),
    .hresetn (hresetn),
    .enable  (enable),
    .token   (token)
  );

  for (genvar k = 0; k < NUM_MASTERS; k++) begin : g_logic
    ahb_priority_logic #(.START(k)) u_logic (
      .en    (token[k]),
      .req   (req),
      .grant (blk_grant[k])
    );
  end

  always_comb begin
    grant = '0;
    for (int k = 0; k < NUM_MASTERS; k++) grant |= blk_grant[k];
  end

  assign dflt = ~|req;

endmodule
