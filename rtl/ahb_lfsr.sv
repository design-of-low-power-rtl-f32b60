// Random pattern generator of the Random-Access arbiter: a 16-bit Fibonacci
// linear feedback shift register.
//
// The feedback polynomial x^16 + x^14 + x^13 + x^11 + 1 is maximal length, so
// the register runs through all 65535 non-zero states. It shifts one place
// on each rising HCLK edge at which ENABLE is high, and is loaded with the
// non-zero SEED by the asynchronous active-low reset. The four 4-bit fields
// of the state, NUM_3..NUM_0, are the random numbers of the four masters.
module ahb_lfsr #(
  parameter int unsigned WIDTH = 16,
  parameter logic [WIDTH-1:0] SEED = 16'hACE1
) (
  input  logic             hclk,
  input  logic             hresetn,
  input  logic             enable,
  output logic [WIDTH-1:0] state
);

  logic fb;
  assign fb = state[15] ^ state[13] ^ state[12] ^ state[10];

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)    state <= SEED;
    else if (enable) state <= {state[WIDTH-2:0], fb};
  end

  a_nonzero: assert property (@(posedge hclk) disable iff (!hresetn) state != '0);

endmodule
