// round_rne_tb: checks round-to-nearest-even on the four-bit cases of the
// rounding table (X.00 .. X.11 for an even and an odd LSB) and on random
// significands. The expected value treats sig.R S as a number with two
// fraction bits and rounds it to the nearest integer, ties to even.
module round_rne_tb;
  localparam int P = 8;
  int checks = 0, failures = 0;
  logic [P-1:0] sig, y;
  logic r, s, cout, inexact;

  round_rne #(.P(P)) dut (.sig(sig), .r(r), .s(s), .y(y), .cout(cout), .inexact(inexact));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int q, x4;
    for (int v = 0; v < (1 << P); v++) begin
      for (int f = 0; f < 4; f++) begin
        sig = P'(v); r = f[1]; s = f[0];
        #1;
        x4 = v * 4 + f;                  // value in quarters
        q  = x4 / 4;
        if (x4 % 4 == 3 || (x4 % 4 == 2 && (q % 2 == 1))) q++;
        checks++;
        if ({cout, y} !== (P+1)'(q) || inexact !== (f != 0)) begin
          failures++;
          if (failures < 10) $display("MISMATCH %0d.%b got %0d", v, f[1:0], {cout, y});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
