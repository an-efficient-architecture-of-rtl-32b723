// tb_csa_mux2 - self-checking test of the section multiplexer.
//
// Drives random carry-in-0 and carry-in-1 results into csa_mux2 at its
// default width (5, the 10:5 stage) and at 3 and 6 bits, for both values of
// the select, and checks that the output equals the chosen input.  Inputs
// are forced to differ in every bit for part of the run so that a wrong
// select shows on each bit.
module tb_csa_mux2;

  int checks   = 0;
  int failures = 0;

  logic [5:0] d0, d1;
  logic       sel;
  logic [4:0] y5;
  logic [2:0] y3;
  logic [5:0] y6;

  csa_mux2             u_default (.d0(d0[4:0]), .d1(d1[4:0]), .sel(sel), .y(y5));
  csa_mux2 #(.N(3))    u_n3      (.d0(d0[2:0]), .d1(d1[2:0]), .sel(sel), .y(y3));
  csa_mux2 #(.N(6))    u_n6      (.d0(d0),      .d1(d1),      .sel(sel), .y(y6));

  task automatic check(input logic [5:0] got, input int w);
    logic [5:0] expv, mask;
    mask = 6'((1 << w) - 1);
    expv = (sel ? d1 : d0) & mask;
    checks++;
    if ((got & mask) !== expv) begin
      failures++;
      if (failures <= 10)
        $display("FAIL N=%0d sel=%0d d0=%h d1=%h got=%h exp=%h", w, sel, d0, d1, got, expv);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      d0  = {$urandom()} [5:0];
      d1  = (n % 2 == 0) ? ~d0 : {$urandom()} [5:0];
      sel = n[1];
      #1;
      check({1'b0, y5}, 5);
      check({3'b0, y3}, 3);
      check(y6, 6);
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
