// barrel_rotate_tb: the 4-bit select table written out row by row (Y3..Y0
// for each S1 S0), checked for every data word; then the shift mode, whose
// expected value is D * 2**sel truncated to 4 bits.
module barrel_rotate_tb;
  int checks = 0, failures = 0;
  logic [3:0] d, y, e;
  logic [1:0] sel;
  logic       rot;

  barrel_rotate #(.W(4)) dut (.d(d), .sel(sel), .rot(rot), .y(y));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int s = 0; s < 4; s++) begin
        d = 4'(v); sel = 2'(s); rot = 1'b1;
        case (s)
          0: e = {d[3], d[2], d[1], d[0]};
          1: e = {d[2], d[1], d[0], d[3]};
          2: e = {d[1], d[0], d[3], d[2]};
          default: e = {d[0], d[3], d[2], d[1]};
        endcase
        #1;
        checks++;
        if (y !== e) begin
          failures++;
          $display("ROTATE MISMATCH d=%b sel=%0d got %b exp %b", d, s, y, e);
        end
        rot = 1'b0;
        #1;
        checks++;
        if (y !== 4'(v * (1 << s))) begin
          failures++;
          $display("SHIFT MISMATCH d=%b sel=%0d got %b", d, s, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
