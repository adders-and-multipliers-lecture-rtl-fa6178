// barrel_dist_tb: every 8-bit word, shift amount and fill value. Expected:
// the word shifted right with `fill` copied into each vacated top bit,
// formed as a 16-bit {fill x 8, d} word shifted right and truncated.
module barrel_dist_tb;
  int checks = 0, failures = 0;
  logic [7:0] d, y;
  logic [2:0] shamt;
  logic       fill;

  barrel_dist #(.W(8)) dut (.d(d), .shamt(shamt), .fill(fill), .y(y));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] w;
    for (int v = 0; v < 256; v++) begin
      for (int s = 0; s < 8; s++) begin
        for (int f = 0; f < 2; f++) begin
          d = 8'(v); shamt = 3'(s); fill = f[0];
          #1;
          w = {{8{f[0]}}, 8'(v)} >> s;
          checks++;
          if (y !== w[7:0]) begin
            failures++;
            if (failures < 10) $display("MISMATCH %h >> %0d fill %0d got %h", d, s, f, y);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
