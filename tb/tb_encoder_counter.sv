// tb_encoder_counter: sends bursts of encoder pulses between reads and checks that the
// count read equals the pulses sent since the last clear, and that the counter is cleared
// after every 16th read. Also checks saturation at 254.
//
// The clear after 16 reads follows the original report; the 254 limit is this design's
// choice.
module tb_encoder_counter;
  logic clk = 0, rst_n = 0, enc = 0, rd = 0;
  logic [7:0] count;
  int checks = 0, failures = 0;
  int expected = 0, reads = 0;

  encoder_counter dut (.clk, .rst_n, .enc, .rd, .count);

  always #5 clk = ~clk;

  task automatic pulses(int n);
    repeat (n) begin
      enc = 1; repeat (3) @(posedge clk);
      enc = 0; repeat (3) @(posedge clk);
      expected++;
    end
    repeat (6) @(posedge clk);
  endtask

  task automatic do_read();
    @(negedge clk);
    checks++;
    if (count != 8'(expected > 254 ? 254 : expected)) begin
      failures++;
      $display("read %0d: count %0d expected %0d", reads, count, expected);
    end
    rd = 1; @(negedge clk); rd = 0;
    reads++;
    if (reads % 16 == 0) expected = 0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      pulses($urandom_range(0, 9));
      do_read();
    end
    // saturation
    while (reads % 16 != 0) do_read();
    pulses(300);
    do_read();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
