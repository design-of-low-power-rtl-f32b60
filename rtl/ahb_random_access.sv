// Random-Access arbitration scheme (ARBITRATION = 10).
//
// A random pattern generator (16-bit LFSR) gives each master a 4-bit random
// number, NUM_x = bits [4x+3:4x] of the LFSR state. The number of a master
// that does not request is shown as 0000. A comparator grants the requesting
// master with the largest number (lowest index on a tie); with no request,
// DEFAULT is asserted.
//
// Timing: the numbers change on each HCLK edge with ENABLE high; the grant is
// combinational in the requests and the current numbers. The LFSR plus
// comparator structure and the 4-bit numbers follow the published design;
// the LFSR length, polynomial and seed and the tie rule are choices made
// here.
module ahb_random_access
  import ahb_arb_pkg::*;
#(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic             hclk,
  input  logic             hresetn,
  input  logic             enable,
  input  req_vec_t         req,     // HBUSREQ_x after SPLIT masking
  output req_vec_t         grant,   // one-hot grant
  output logic             dflt,    // no master requests
  output logic [NUM_W-1:0] num [NUM_MASTERS]  // NUM_x[3:0], for observation
);

  logic [15:0] rnd;

  ahb_lfsr #(.WIDTH(16), .SEED(SEED)) u_lfsr (
    .hclk    (hclk),
    .hresetn (hresetn),
    .enable  (enable),
    .state   (rnd)
  );

  for (genvar i = 0; i < NUM_MASTERS; i++) begin : g_num
    assign num[i] = req[i] ? rnd[NUM_W*i +: NUM_W] : '0;
  end

  ahb_comparator u_cmp (
    .req   (req),
    .num   (num),
    .grant (grant),
    .dflt  (dflt)
  );

endmodule
