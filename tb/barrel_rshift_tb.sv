// barrel_rshift_tb: every shift amount on random 8-bit words, compared with
// the result of integer division by 2**shamt.
module barrel_rshift_tb;
  int checks = 0, failures = 0;
  logic [7:0] d, y;
  logic [2:0] shamt;

  barrel_rshift #(.W(8), .SHW(3)) dut (.d(d), .shamt(shamt), .y(y));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int s = 0; s < 8; s++) begin
        d = 8'(v); shamt = 3'(s);
        #1;
        checks++;
        if (y !== 8'(v / (1 << s))) begin
          failures++;
          if (failures < 10) $display("MISMATCH %h >> %0d got %h", d, s, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
