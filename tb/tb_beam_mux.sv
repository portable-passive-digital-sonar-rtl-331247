// tb_beam_mux: random beams and random 32-bit selection words (upper bits
// random too); the registered output must be the beam chosen by the low four
// bits, with out_valid following in_valid by one cycle.
module tb_beam_mux;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  logic [11:0] beams [16], dout;
  logic [31:0] sel = '0;
  int checks = 0, failures = 0;

  beam_mux dut (.clk, .rst, .in_valid, .beams, .sel, .out_valid, .dout);

  always #5 clk = ~clk;

  initial begin
    for (int k = 0; k < 16; k++) beams[k] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 1000; t++) begin
      logic [11:0] e;
      logic v;
      @(posedge clk);
      for (int k = 0; k < 16; k++) beams[k] <= 12'($urandom);
      sel      <= $urandom;
      in_valid <= 1'($urandom);
      #1;
      e = beams[sel % 16];
      v = in_valid;
      @(posedge clk); #1;
      checks++;
      if (dout != e || out_valid != v) begin
        failures++;
        $display("FAIL: sel %08h -> %03h (valid %b), expected %03h (%b)", sel, dout, out_valid, e, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
