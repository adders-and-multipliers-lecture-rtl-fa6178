// round_select_tb: every rounding mode, sign, LSB and g, r, s combination.
// The expected decision is worked out from the value: the part below the
// LSB, g r s read as a binary fraction (s standing for "something more"),
// is compared with one half for nearest even, and tested for nonzero for
// the directed modes; Sum+1 and Sum are distinct random words so the output
// shows which was chosen.
module round_select_tb;
  import fp_pkg::*;
  localparam int W = 24;
  int checks = 0, failures = 0;
  logic [W-1:0] sum, sum1, y;
  logic c0, c1, sign, g, r, s, cout, inc;
  round_mode_t mode;

  round_select #(.W(W)) dut (.sum(sum), .sum1(sum1), .c0(c0), .c1(c1), .mode(mode), .sign(sign),
                             .g(g), .r(r), .s(s), .y(y), .cout(cout), .inc(inc));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic up;
    int   frac8;     // g r s as eighths
    for (int rep = 0; rep < 8; rep++) begin
      for (int m = 0; m < 4; m++) begin
        for (int v = 0; v < 32; v++) begin
          sum  = W'($urandom);
          sum[0] = v[4];
          sum1 = sum + 1;
          c0 = 1'($urandom); c1 = ~c0;
          mode = round_mode_t'(m);
          sign = v[3]; g = v[2]; r = v[1]; s = v[0];
          #1;
          frac8 = int'(v[2:0]);
          case (m)
            0: up = (frac8 > 4) || (frac8 == 4 && sum[0]);
            1: up = 1'b0;
            2: up = (frac8 != 0) && !sign;
            default: up = (frac8 != 0) && sign;
          endcase
          checks++;
          if (inc !== up || y !== (up ? sum1 : sum) || cout !== (up ? c1 : c0)) begin
            failures++;
            if (failures < 10) $display("MISMATCH mode=%0d v=%b got inc=%0d", m, v[4:0], inc);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
