// tb_preamble_fsm: feeds random bits containing no 14-bit "1010...10" run, then full
// packets. pkt_start must come exactly once per packet, in the clock after the 14th
// preamble bit, never in the random data; hunting must drop while locked and come back
// on done or on a failed security check.
//
// The 14-bit match follows the original report; the return-to-hunt conditions are this
// design's choice.
module tb_preamble_fsm;
  logic clk = 0, rst_n = 0, bit_en = 0, rx_bit = 0, sec_fail = 0, done = 0;
  logic pkt_start, hunting;
  int checks = 0, failures = 0, nstart = 0;

  preamble_fsm dut (.clk, .rst_n, .bit_en, .rx_bit, .sec_fail, .done, .pkt_start, .hunting);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && pkt_start) nstart++;

  task automatic send_bit(logic b);
    @(negedge clk); rx_bit = b; bit_en = 1;
    @(negedge clk); bit_en = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic send_noise(int n);
    repeat (n) send_bit(($urandom_range(0, 3) == 0) ? rx_bit : 1'($urandom) | rx_bit);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 10; p++) begin
      int nprev;
      // noise: runs of ones break any alternation
      repeat (30) send_bit(1'($urandom_range(0, 2) != 0));
      send_bit(1); send_bit(1);
      checks++;
      if (nstart != p) begin failures++; $display("false start in noise, packet %0d", p); end
      checks++;
      if (!hunting) begin failures++; $display("not hunting nprev packet %0d", p); end
      for (int i = 0; i < 14; i++) begin
        nprev = nstart;
        send_bit(i % 2 == 0);
        if (i < 13) begin
          checks++;
          if (nstart != nprev) begin failures++; $display("early start at bit %0d", i); end
        end
      end
      checks++;
      if (nstart != p + 1) begin failures++; $display("no start after 14 bits, packet %0d", p); end
      checks++;
      if (hunting) begin failures++; $display("still hunting after preamble"); end
      // more alternating bits must not restart while locked
      send_bit(1); send_bit(0); send_bit(1); send_bit(0);
      checks++;
      if (nstart != p + 1) begin failures++; $display("restart while locked"); end
      @(negedge clk);
      if (p % 2 == 0) done = 1; else sec_fail = 1;
      @(negedge clk); done = 0; sec_fail = 0;
      @(negedge clk);
      checks++;
      if (!hunting) begin failures++; $display("did not return to hunting"); end
    end
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
