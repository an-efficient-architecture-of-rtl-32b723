// tb_csa_section - self-checking test of one carry select section.
//
// Instantiates csa_section with N = 4 (default) and N = 2, 3, 5, the widths
// of the sections above the bottom one in the 16-bit adder.  Both operands
// and the incoming carry are swept exhaustively over 5 bits, each instance
// taking the low N bits, and {cout, sum} is compared with the integer
// a + b + cin.  It also counts the cases where the carry-in-1 path alone
// produces the carry out (all bits propagate), and fails if any width never
// saw that case.
module tb_csa_section;

  localparam int NSZ = 4;
  localparam int SZ [NSZ] = '{4, 2, 3, 5};

  int checks   = 0;
  int failures = 0;
  int bec_carry [NSZ];

  logic [4:0] a, b;
  logic       cin;
  logic [4:0] s  [NSZ];
  logic       co [NSZ];

  csa_section u_default (.a(a[3:0]), .b(b[3:0]), .cin(cin), .sum(s[0][3:0]), .cout(co[0]));
  assign s[0][4] = 1'b0;

  for (genvar k = 1; k < NSZ; k++) begin : g_dut
    csa_section #(.N(SZ[k])) u_dut (
      .a    (a[SZ[k]-1:0]),
      .b    (b[SZ[k]-1:0]),
      .cin  (cin),
      .sum  (s[k][SZ[k]-1:0]),
      .cout (co[k])
    );
    if (SZ[k] < 5) begin : g_pad
      assign s[k][4:SZ[k]] = '0;
    end
  end

  initial begin
    for (int k = 0; k < NSZ; k++) bec_carry[k] = 0;
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        for (int c = 0; c < 2; c++) begin
          a = i[4:0]; b = j[4:0]; cin = c[0];
          #1;
          for (int k = 0; k < NSZ; k++) begin
            int mask, expv, got;
            mask = (1 << SZ[k]) - 1;
            expv = (i & mask) + (j & mask) + c;
            got  = (int'(s[k]) & mask) | (int'(co[k]) << SZ[k]);
            checks++;
            if (got != expv) begin
              failures++;
              if (failures <= 10)
                $display("FAIL N=%0d a=%0h b=%0h cin=%0d got=%0h exp=%0h",
                         SZ[k], i & mask, j & mask, c, got, expv);
            end
            if (c == 1 && ((i & mask) + (j & mask)) == mask) bec_carry[k]++;
          end
        end
    for (int k = 0; k < NSZ; k++) begin
      $display("N=%0d carry-out made by the carry-in-1 path: %0d times", SZ[k], bec_carry[k]);
      checks++;
      if (bec_carry[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
