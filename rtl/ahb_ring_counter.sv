// Token ring counter of the Fair-Chance arbiter.
//
// Holds a one-hot token TOKEN[3:0] that selects which rotated priority logic
// block is active. It resets to 0001 (token at block 0) and rotates one
// place towards the higher blocks (0001 -> 0010 -> 0100 -> 1000 -> 0001) on
// every rising HCLK edge at which ENABLE is high. Reset is asynchronous,
// active low.
module ahb_ring_counter
  import ahb_arb_pkg::*;
(
  input  logic     hclk,
  input  logic     hresetn,
  input  logic     enable,
  output req_vec_t token
);

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)    token <= req_vec_t'(1);
    else if (enable) token <= {token[NUM_MASTERS-2:0], token[NUM_MASTERS-1]};
  end

  a_token_onehot: assert property (@(posedge hclk) disable iff (!hresetn) $onehot(token));

endmodule
