// tb_axi_serializer: inputs din[i] = i+1, as in the reference waveforms.
// With intime = 16 the stream must repeat: 16 valid words 1..16, tlast on the
// 16th, then one cycle with tvalid low and data 0. Then intime = 5 (frames
// 1..5 with tlast on 5, then a gap) and intime = 20 (the channel order wraps
// within a frame). A reset in mid-frame must give tvalid low and data 0, and
// the stream must restart at din[0]. tstrb is all ones throughout.
module tb_axi_serializer;
  logic clk = 1'b0, rst = 1'b1;
  logic [11:0] din [16];
  logic [11:0] intime = 12'd16;
  logic        tvalid, tlast;
  logic [31:0] tdata;
  logic [3:0]  tstrb;
  int checks = 0, failures = 0, frames = 0;

  axi_serializer dut (.clk, .rst, .din, .intime, .m_axis_tvalid(tvalid),
                      .m_axis_tdata(tdata), .m_axis_tstrb(tstrb), .m_axis_tlast(tlast));

  always #5 clk = ~clk;

  task automatic expect_word(bit v, int data, bit last, string where);
    @(posedge clk); #1;
    checks++;
    if (tvalid !== v || int'(tdata) != data || tlast !== last || tstrb != 4'hF) begin
      failures++;
      $display("FAIL: %s: valid %b data %0d last %b, expected %b %0d %b", where, tvalid, tdata, tlast, v, data, last);
    end
  endtask

  task automatic expect_frames(int len, int count);
    for (int f = 0; f < count; f++) begin
      for (int w = 0; w < len; w++) expect_word(1, (w % 16) + 1, w == len - 1, $sformatf("intime %0d word %0d", len, w));
      expect_word(0, 0, 0, "gap");
      frames++;
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) din[i] = 12'(i + 1);
    repeat (3) @(posedge clk);
    #1; checks++;
    if (tvalid || tdata != 0) begin failures++; $display("FAIL: not idle in reset"); end
    rst <= 1'b0;
    expect_frames(16, 4);
    // reset in the middle of a frame
    expect_word(1, 1, 0, "before reset"); expect_word(1, 2, 0, "before reset");
    rst <= 1'b1;
    expect_word(0, 0, 0, "in reset");
    rst <= 1'b0;
    expect_frames(16, 2);
    intime <= 12'd5;
    expect_frames(5, 3);
    intime <= 12'd20;
    expect_frames(20, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
