// Time-slot timer of the Round-Robin arbiter.
//
// LOAD (from the point controller) starts a slot of COUNT cycles (COUNT >= 1;
// 0 is treated as 1): the counter is loaded with COUNT-1 and then counts
// down by one on every HCLK edge at which ENABLE is high. T_ENABLE is high
// once it has reached zero, so with ENABLE held high T_ENABLE rises COUNT-1
// edges after the load and the cycle of the load plus the COUNT-1 cycles
// that follow make up the slot. After reset the timer is zero, so the first
// arbitration sees an expired slot.
module ahb_rr_timer (
  input  logic       hclk,
  input  logic       hresetn,
  input  logic       enable,
  input  logic       load,
  input  logic [4:0] count,
  output logic       t_enable
);

  logic [4:0] cnt;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)                 cnt <= '0;
    else if (load)                cnt <= (count == '0) ? '0 : count - 5'd1;
    else if (enable && cnt != '0) cnt <= cnt - 5'd1;
  end

  assign t_enable = (cnt == '0);

endmodule
