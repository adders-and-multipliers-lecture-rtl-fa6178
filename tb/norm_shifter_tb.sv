// norm_shifter_tb: checks the normalization shifter on random words with
// every possible position of the leading one, and on zero. The expected
// count comes from a scan from the MSB; the expected word is the input
// multiplied by 2**count, truncated to W bits.
module norm_shifter_tb;
  localparam int W = 27;
  int checks = 0, failures = 0;
  logic [W-1:0] d, y;
  logic [4:0]   lzc;
  logic         zero;

  norm_shifter #(.W(W)) dut (.d(d), .y(y), .lzc(lzc), .zero(zero));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int k = -1; k < W; k++) begin
      for (int t = 0; t < 50; t++) begin
        d = W'($urandom);
        if (k < 0) d = '0;
        else begin
          d = d & ((W'(1) << k) - 1);
          d[k] = 1'b1;
        end
        #1;
        n = 0;
        while (n < W && !d[W-1-n]) n++;
        checks++;
        if (lzc !== 5'(n) || y !== W'(d * (64'(1) << n)) || zero !== (k < 0)) begin
          failures++;
          if (failures < 10) $display("MISMATCH d=%b lzc=%0d y=%b", d, lzc, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
