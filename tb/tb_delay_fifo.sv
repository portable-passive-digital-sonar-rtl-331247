// tb_delay_fifo: feeds random samples with random gaps into the delay line at
// its default depth (2048) and checks every output against a history kept by
// the testbench: dout must be the sample written `delay` samples earlier, or
// the mid-scale fill value while fewer samples than that have been written.
// The delay is changed several times during the run, including 0, 512 and the
// largest value (DEPTH-1). Output latency is one cycle.
module tb_delay_fifo;
  localparam int DEPTH = 2048;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  logic [11:0] din = '0, dout;
  logic [11:0] delay = '0;
  logic out_valid;
  int checks = 0, failures = 0;
  logic [11:0] hist [0:16383];   // every sample accepted, by index
  int n_written = 0;
  int fills = 0;

  delay_fifo dut (.clk, .rst, .in_valid, .din, .delay, .out_valid, .dout);

  always #5 clk = ~clk;

  initial begin
    int unsigned delays [7] = '{1135, 0, 3, 2047, 512, 568, 1};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int phase = 0; phase < 7; phase++) begin
      delay <= 12'(delays[phase]);
      for (int i = 0; i < 2500; i++) begin
        logic [11:0] exp_v;
        @(posedge clk);
        in_valid <= ($urandom_range(0, 3) != 0);
        din      <= 12'($urandom);
        #1;
        if (in_valid) begin
          // the sample offered now is accepted at the next edge
          hist[n_written] = din;
          n_written++;
          @(posedge clk); #1;
          checks++;
          if (delay == 0)                    exp_v = hist[n_written-1];
          else if (int'(delay) >= n_written) exp_v = 12'h800;
          else                               exp_v = hist[n_written-1-int'(delay)];
          if (int'(delay) >= n_written && delay != 0) fills++;
          if (!out_valid || dout != exp_v) begin
            failures++;
            $display("FAIL: delay %0d sample %0d: got %03h valid %b expected %03h",
                     delay, n_written, dout, out_valid, exp_v);
          end
          in_valid <= 1'b0;
        end
      end
    end
    checks++;
    if (fills == 0) begin failures++; $display("FAIL: fill state never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
