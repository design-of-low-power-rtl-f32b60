// Rotated fixed-priority logic block, one of the four blocks of the
// Fair-Chance arbiter.
//
// Block number START gives the highest priority to request START, then
// START+1, and so on around the ring, so that request START-1 has the lowest
// priority (block 0: 0 > 1 > 2 > 3; block 1: 1 > 2 > 3 > 0). The block is
// enabled by its token bit: with `en` low its grant is all zero, so the grant
// outputs of the four blocks can simply be ORed. Purely combinational.
module ahb_priority_logic
  import ahb_arb_pkg::*;
#(
  parameter int unsigned START = 0
) (
  input  logic     en,     // token bit of this block
  input  req_vec_t req,    // HBUSREQ_x after SPLIT masking
  output req_vec_t grant   // one-hot grant, all zero when disabled or idle
);

  always_comb begin
    grant = '0;
    if (en) begin
      // Walk from the lowest to the highest priority so that the last hit,
      // the highest-priority requester, wins.
      for (int k = NUM_MASTERS - 1; k >= 0; k--) begin
        if (req[(START + k) % NUM_MASTERS])
          grant = req_vec_t'(1) << ((START + k) % NUM_MASTERS);
      end
    end
  end

endmodule
