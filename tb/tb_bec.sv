// tb_bec - self-checking test of the binary to excess-1 converter.
//
// Instantiates bec with N = 4 (its default, the drawn 4-bit converter) and
// with N = 3, 5 and 6, the widths used in the 16-bit adder's sections.
// Every input value of every width is applied and the output is compared
// with (b + 1) mod 2^N worked out in integer arithmetic.
module tb_bec;

  localparam int NSZ = 4;
  localparam int SZ [NSZ] = '{4, 3, 5, 6};

  int checks   = 0;
  int failures = 0;

  logic [5:0] b;
  logic [5:0] x [NSZ];

  bec u_default (.b(b[3:0]), .x(x[0][3:0]));
  assign x[0][5:4] = '0;

  for (genvar k = 1; k < NSZ; k++) begin : g_dut
    bec #(.N(SZ[k])) u_dut (.b(b[SZ[k]-1:0]), .x(x[k][SZ[k]-1:0]));
    if (SZ[k] < 6) begin : g_pad
      assign x[k][5:SZ[k]] = '0;
    end
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      b = v[5:0];
      #1;
      for (int k = 0; k < NSZ; k++) begin
        int mask, expv;
        mask = (1 << SZ[k]) - 1;
        expv = ((v & mask) + 1) & mask;
        checks++;
        if (int'(x[k]) != expv) begin
          failures++;
          if (failures <= 10)
            $display("FAIL N=%0d b=%0h got=%0h exp=%0h", SZ[k], v & mask, x[k], expv);
        end
      end
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
