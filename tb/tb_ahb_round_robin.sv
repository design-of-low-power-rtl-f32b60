// Self-checking testbench of the Round-Robin scheme.
//
// A reference model keeps the owner and the remaining slot beside the block:
// the owner keeps the grant while it requests and its slot lasts, otherwise
// the first requester after it round the ring is chosen; a new turn loads a
// slot of 1, 4, 8 or 16 cycles from HBURST. 3000 cycles of random requests,
// LOAD, ENABLE and HBURST are compared cycle by cycle. Then a directed phase
// with all masters requesting an INCR4 burst and LOAD and ENABLE held high
// checks that each master owns the bus for exactly 4 cycles, in the order
// 0, 1, 2, 3, 0; a WRAP8 and an INCR16 run check 8- and 16-cycle slots.
module tb_ahb_round_robin;
  import ahb_arb_pkg::*;

  logic       hclk = 1'b0, hresetn = 1'b0, enable = 1'b0, load = 1'b0;
  logic [2:0] hburst = 3'b000;
  req_vec_t   req = '0, grant, owner, exp_grant;
  logic       dflt, slot_over;
  int         ref_owner, ref_cnt, choice;
  logic       keep, found;
  int         checks = 0, failures = 0;

  ahb_round_robin dut (
    .hclk(hclk), .hresetn(hresetn), .enable(enable), .load(load), .req(req),
    .hburst(hburst), .grant(grant), .dflt(dflt), .owner(owner), .slot_over(slot_over)
  );

  always #5 hclk = ~hclk;

  initial begin
    repeat (8000) @(posedge hclk);
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

  task automatic model_comb();
    keep  = req[ref_owner] && ref_cnt != 0;
    found = 1'b0;
    choice = ref_owner;
    for (int k = 1; k <= NUM_MASTERS; k++)
      if (!found && req[(ref_owner + k) % NUM_MASTERS]) begin
        found  = 1'b1;
        choice = (ref_owner + k) % NUM_MASTERS;
      end
    if (keep)       exp_grant = req_vec_t'(1) << ref_owner;
    else if (found) exp_grant = req_vec_t'(1) << choice;
    else            exp_grant = '0;
  endtask

  task automatic check_now();
    model_comb();
    checks++;
    if (grant !== exp_grant || owner !== (req_vec_t'(1) << ref_owner) ||
        slot_over !== (ref_cnt == 0) || dflt !== (req == '0)) begin
      failures++;
      $display("FAIL t=%0t req=%b grant=%b exp=%b owner=%b ref=%0d slot_over=%b cnt=%0d",
               $time, req, grant, exp_grant, owner, ref_owner, slot_over, ref_cnt);
    end
  endtask

  task automatic model_edge();
    if (load && found && !keep) begin
      ref_owner = choice;
      ref_cnt   = slot_of(hburst) - 1;
    end else if (enable && ref_cnt != 0) begin
      ref_cnt--;
    end
  endtask

  task automatic tenure_run(logic [2:0] b, int slot);
    int last, run;
    req = 4'b1111; hburst = b; load = 1'b1; enable = 1'b1;
    // let the current slot expire so the run starts on a fresh turn
    while (!(ref_cnt == 0)) begin
      #1 check_now(); @(posedge hclk); model_edge(); #1;
    end
    #1 check_now(); @(posedge hclk); model_edge(); #1;
    last = onehot_to_id(owner); run = 1;
    for (int c = 0; c < 5 * slot; c++) begin
      #1 check_now();
      @(posedge hclk); model_edge(); #1;
      if (int'(onehot_to_id(owner)) == last) run++;
      else begin
        checks++;
        if (run != slot || int'(onehot_to_id(owner)) != (last + 1) % NUM_MASTERS) begin
          failures++;
          $display("FAIL tenure of master %0d was %0d, expected %0d; next %0d",
                   last, run, slot, onehot_to_id(owner));
        end
        last = onehot_to_id(owner); run = 1;
      end
    end
  endtask

  initial begin
    ref_owner = NUM_MASTERS - 1;
    ref_cnt   = 0;
    repeat (2) @(posedge hclk);
    #1 hresetn = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      req    = req_vec_t'($urandom_range(0, 15));
      load   = ($urandom_range(0, 2) == 0);
      enable = ($urandom_range(0, 3) != 0);
      hburst = 3'($urandom_range(0, 7));
      #1 check_now();
      @(posedge hclk);
      model_edge();
      #1;
    end
    tenure_run(3'b011, 4);
    tenure_run(3'b100, 8);
    tenure_run(3'b111, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
