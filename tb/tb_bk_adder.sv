// tb_bk_adder - self-checking test of the Brent-Kung adder at several widths.
//
// Instantiates bk_adder with N = 4 (its default, the width of the drawn
// adder) and N = 2, 3, 5, 8, 16 so that both the power-of-two trees and the
// uneven ones of the carry select sections are covered.  All share one pair
// of 16-bit stimulus words, each instance taking the low N bits.  Expected
// results come from the integer sum a + b + cin.  The low 5 bits of both
// operands and the carry-in are swept exhaustively, then random words and
// all-propagate / all-generate patterns follow.  Ends with a TB_RESULT line;
// a watchdog stops a hung run.
module tb_bk_adder;

  localparam int NSZ = 6;
  localparam int SZ [NSZ] = '{4, 2, 3, 5, 8, 16};

  int checks   = 0;
  int failures = 0;

  logic [15:0] a, b;
  logic        cin;
  logic [15:0] s  [NSZ];
  logic        co [NSZ];

  bk_adder u_default (.a(a[3:0]), .b(b[3:0]), .cin(cin), .sum(s[0][3:0]), .cout(co[0]));
  assign s[0][15:4] = '0;

  for (genvar k = 1; k < NSZ; k++) begin : g_dut
    bk_adder #(.N(SZ[k])) u_dut (
      .a    (a[SZ[k]-1:0]),
      .b    (b[SZ[k]-1:0]),
      .cin  (cin),
      .sum  (s[k][SZ[k]-1:0]),
      .cout (co[k])
    );
    if (SZ[k] < 16) begin : g_pad
      assign s[k][15:SZ[k]] = '0;
    end
  end

  task automatic check_all();
    #1;
    for (int k = 0; k < NSZ; k++) begin
      logic [16:0] mask, expv, got;
      mask = (17'd1 << SZ[k]) - 17'd1;
      expv = ({1'b0, a} & mask) + ({1'b0, b} & mask) + {16'd0, cin};
      got  = ({1'b0, s[k]} & mask) | ({16'd0, co[k]} << SZ[k]);
      checks++;
      if (got !== expv) begin
        failures++;
        if (failures <= 10)
          $display("FAIL N=%0d a=%h b=%h cin=%0d got=%h exp=%h",
                   SZ[k], a & mask[15:0], b & mask[15:0], cin, got, expv);
      end
    end
  endtask

  initial begin
    // Exhaustive over the low 5 bits and the carry-in.
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        for (int c = 0; c < 2; c++) begin
          a   = {$urandom()} [15:0];
          b   = {$urandom()} [15:0];
          a[4:0] = i[4:0];
          b[4:0] = j[4:0];
          cin = c[0];
          check_all();
        end
    // Full-width propagate chains and generate patterns.
    a = 16'hFFFF; b = 16'h0000; cin = 1'b1; check_all();
    a = 16'h0000; b = 16'hFFFF; cin = 1'b1; check_all();
    a = 16'hFFFF; b = 16'hFFFF; cin = 1'b1; check_all();
    a = 16'hAAAA; b = 16'h5555; cin = 1'b1; check_all();
    a = 16'h5555; b = 16'h5555; cin = 1'b0; check_all();
    // Random words.
    for (int n = 0; n < 20000; n++) begin
      a   = {$urandom()} [15:0];
      b   = {$urandom()} [15:0];
      cin = {$urandom()} [0];
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
