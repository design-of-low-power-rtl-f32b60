// Comparator of the Random-Access arbiter.
//
// Compares the random numbers of the requesting masters and grants the one
// with the largest number. Non-requesting masters take no part. When two
// requesting masters hold the same largest number, the lower-numbered master
// wins. With no request, DEFAULT is asserted. Purely combinational.
module ahb_comparator
  import ahb_arb_pkg::*;
(
  input  req_vec_t         req,
  input  logic [NUM_W-1:0] num [NUM_MASTERS],
  output req_vec_t         grant,
  output logic             dflt
);

  always_comb begin
    logic [NUM_W-1:0] best;
    logic             found;
    best  = '0;
    found = 1'b0;
    grant = '0;
    for (int i = 0; i < NUM_MASTERS; i++) begin
      if (req[i] && (!found || num[i] > best)) begin
        best  = num[i];
        found = 1'b1;
        grant = req_vec_t'(1) << i;
      end
    end
  end

  assign dflt = ~|req;

endmodule
