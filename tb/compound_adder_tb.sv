// compound_adder_tb: random and boundary 24-bit operands in both modes.
// Expected values from plain integer arithmetic: Sum = A + B or A + ~B,
// Sum+1 one more, both with their carry outs; in subtract mode the four
// identities A+~B+1 = A-B, A+~B = A-B-1 and their complements B-A-1, B-A
// are also checked.
module compound_adder_tb;
  localparam int W = 24;
  int checks = 0, failures = 0;
  logic [W-1:0] a, b, sum, sum1;
  logic sub, cout, cout1;

  compound_adder #(.W(W)) dut (.a(a), .b(b), .sub(sub), .sum(sum), .sum1(sum1), .cout(cout), .cout1(cout1));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [W-1:0] x, logic [W-1:0] z, logic m);
    logic [W:0] e0, e1;
    logic [W-1:0] bb;
    a = x; b = z; sub = m;
    #1;
    bb = m ? ~z : z;
    e0 = {1'b0, x} + {1'b0, bb};
    e1 = e0 + 1;
    checks++;
    if ({cout, sum} !== e0 || {cout1, sum1} !== e1) begin
      failures++;
      if (failures < 10) $display("MISMATCH a=%h b=%h sub=%0d got %h %h", x, z, m, {cout, sum}, {cout1, sum1});
    end
    if (m) begin
      logic [W-1:0] amb, bma, one;
      one = W'(1);
      amb = x - z;
      bma = z - x;
      checks++;
      if (sum1 !== amb || sum !== amb - one || ~sum1 !== bma - one || ~sum !== bma) begin
        failures++;
        if (failures < 10) $display("SUB IDENTITY MISMATCH a=%h b=%h", x, z);
      end
    end
  endtask

  initial begin
    chk('1, '0, 1'b0);
    chk('1, 24'h1, 1'b0);
    chk(24'h7fffff, 24'h7fffff, 1'b0);
    chk(24'h123456, 24'h123456, 1'b1);
    chk('0, '0, 1'b1);
    for (int i = 0; i < 20000; i++) begin
      logic [W-1:0] x, z;
      x = W'($urandom);
      z = W'($urandom);
      if (i % 5 == 0) z = ~x ^ W'(1 << $urandom_range(0, W - 1));   // long propagate runs
      if (i % 7 == 0) z = x;
      chk(x, z, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
