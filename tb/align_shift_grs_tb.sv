// align_shift_grs_tb: checks the alignment shifter with guard, round and
// sticky bits for every shift amount 0..255 on random significands. The
// expected word is computed from the definition: bits of sig shifted right
// by shamt in a wide field, G and R are the first two bits below the
// significand, S is the OR of all bits further down.
module align_shift_grs_tb;
  localparam int P = 24;
  int checks = 0, failures = 0;
  logic [P-1:0] sig;
  logic [7:0]   shamt;
  logic [P+2:0] aligned;

  align_shift_grs #(.P(P), .SHW(8)) dut (.sig(sig), .shamt(shamt), .aligned(aligned));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [P+301:0]   w;
    logic [P+2:0]     e;
    for (int n = 0; n < 40; n++) begin
      for (int s = 0; s < 256; s++) begin
        sig   = {1'b1, 23'($urandom)};
        if (n % 4 == 1) sig = {1'b1, {(P-1){1'b0}}};
        if (n % 4 == 2) sig = '1;
        shamt = 8'(s);
        #1;
        w = {sig, {(302){1'b0}}} >> s;         // sig ends right above 302 zero bits
        e = {w[P+301 -: P+2], |w[299:0]};
        checks++;
        if (aligned !== e) begin
          failures++;
          if (failures < 10) $display("MISMATCH sig=%h sh=%0d got %b exp %b", sig, s, aligned, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
