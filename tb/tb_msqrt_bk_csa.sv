// tb_msqrt_bk_csa - end-to-end test of the 16-bit modified square-root
// carry select adder at its default parameters.
//
// Applies directed corner cases, then random operand pairs of three kinds:
// uniform, near-complementary (b = ~a with a few bits flipped, so long
// propagate chains cross many sections) and sparse.  Every result
// {cout, sum} is compared with the integer a + b + cin.  From the operands
// alone it also works out the true carry into each section and counts how
// often each section took its carry-in-1 (converter) result and its
// carry-in-0 (Brent-Kung) result, how often a section's carry out came only
// from the converter (the section propagates end to end), and how often the
// adder carry-in and carry-out were 1.  A mechanism that never happened
// counts as a failure.
module tb_msqrt_bk_csa;
  import csa_pkg::*;

  int checks   = 0;
  int failures = 0;

  int sel_bec     [N_GROUPS];   // carry into section was 1
  int sel_bk      [N_GROUPS];   // carry into section was 0
  int bec_carry   [N_GROUPS];   // section carry out produced only via cin = 1
  int n_cin1      = 0;
  int n_cout1     = 0;

  logic [15:0] a, b, sum;
  logic        cin, cout;

  msqrt_bk_csa u_dut (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .sum  (sum),
    .cout (cout)
  );

  task automatic apply();
    logic [16:0] expv;
    #1;
    expv = {1'b0, a} + {1'b0, b} + {16'd0, cin};
    checks++;
    if ({cout, sum} !== expv) begin
      failures++;
      if (failures <= 10)
        $display("FAIL a=%h b=%h cin=%0d got=%h exp=%h", a, b, cin, {cout, sum}, expv);
    end
    if (cin)  n_cin1++;
    if (cout) n_cout1++;
    // Section coverage, from the operands only.
    for (int k = 1; k < N_GROUPS; k++) begin
      int unsigned lsb, w;
      logic [16:0] lo_mask, sec_mask, lo_sum;
      logic        c_in_k;
      lsb      = group_lsb(DEFAULT_GROUP_W, k);
      w        = DEFAULT_GROUP_W[k];
      lo_mask  = (17'd1 << lsb) - 17'd1;
      sec_mask = ((17'd1 << w) - 17'd1) << lsb;
      lo_sum   = ({1'b0, a} & lo_mask) + ({1'b0, b} & lo_mask) + {16'd0, cin};
      c_in_k   = lo_sum[lsb];
      if (c_in_k) sel_bec[k]++; else sel_bk[k]++;
      if (c_in_k && ((({1'b0, a} & sec_mask) + ({1'b0, b} & sec_mask)) == sec_mask))
        bec_carry[k]++;
    end
  endtask

  initial begin
    for (int k = 0; k < N_GROUPS; k++) begin
      sel_bec[k] = 0; sel_bk[k] = 0; bec_carry[k] = 0;
    end

    // Directed corners.
    a = 16'h0000; b = 16'h0000; cin = 1'b0; apply();
    a = 16'hFFFF; b = 16'h0000; cin = 1'b1; apply();
    a = 16'hFFFF; b = 16'hFFFF; cin = 1'b1; apply();
    a = 16'h8000; b = 16'h8000; cin = 1'b0; apply();
    a = 16'h7FFF; b = 16'h0001; cin = 1'b0; apply();
    a = 16'hAAAA; b = 16'h5555; cin = 1'b1; apply();
    a = 16'h0003; b = 16'h0001; cin = 1'b0; apply();

    // Random operands.
    for (int n = 0; n < 300000; n++) begin
      a   = {$urandom()} [15:0];
      cin = {$urandom()} [0];
      case (n % 3)
        0: b = {$urandom()} [15:0];
        1: b = ~a ^ (16'd1 << ({$urandom()} % 16));
        default: b = {$urandom()} [15:0] & {$urandom()} [15:0] & {$urandom()} [15:0];
      endcase
      apply();
    end

    for (int k = 1; k < N_GROUPS; k++) begin
      $display("section %0d (bits %0d+): converter result chosen %0d, adder result chosen %0d, carry made by converter %0d",
               k, group_lsb(DEFAULT_GROUP_W, k), sel_bec[k], sel_bk[k], bec_carry[k]);
      checks += 3;
      if (sel_bec[k] == 0)   failures++;
      if (sel_bk[k] == 0)    failures++;
      if (bec_carry[k] == 0) failures++;
    end
    $display("carry-in 1: %0d, carry-out 1: %0d", n_cin1, n_cout1);
    checks += 2;
    if (n_cin1 == 0)  failures++;
    if (n_cout1 == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
