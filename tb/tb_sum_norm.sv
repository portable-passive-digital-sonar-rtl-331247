// tb_sum_norm: random and corner-case channel triples; the output must be the
// truncated mean (a+b+c)/3 one cycle after in_valid, and hold without it.
module tb_sum_norm;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  logic [11:0] din [3], dout;
  int checks = 0, failures = 0;

  sum_norm dut (.clk, .rst, .in_valid, .din, .out_valid, .dout);

  always #5 clk = ~clk;

  initial begin
    for (int c = 0; c < 3; c++) din[c] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 2000; t++) begin
      int a, b, c, e;
      a = $urandom_range(0, 4095); b = $urandom_range(0, 4095); c = $urandom_range(0, 4095);
      if (t == 0) begin a = 4095; b = 4095; c = 4095; end
      if (t == 1) begin a = 0; b = 0; c = 2; end
      if (t == 2) begin a = 2048; b = 2048; c = 2048; end
      e = (a + b + c) / 3;
      @(posedge clk);
      din[0] <= 12'(a); din[1] <= 12'(b); din[2] <= 12'(c);
      in_valid <= 1'b1;
      @(posedge clk);
      in_valid <= 1'b0;
      din[0] <= 12'($urandom);
      #1;
      checks++;
      if (!out_valid || int'(dout) != e) begin
        failures++;
        $display("FAIL: %0d+%0d+%0d -> %0d (valid %b), expected %0d", a, b, c, dout, out_valid, e);
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid || int'(dout) != e) begin failures++; $display("FAIL: output changed without in_valid"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
