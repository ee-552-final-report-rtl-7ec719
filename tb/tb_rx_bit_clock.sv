// tb_rx_bit_clock: DIV = 40. The transmitter runs slightly slow (41 clocks per bit) with
// an arbitrary starting phase. With resync high, every sampled bit must equal the bit
// sent, bit_en must come once per bit, and the sample point must stay inside the bit.
// The sample must also fall near the middle of the bit: between a quarter and three
// quarters of a bit period after the last line edge. With resync low the divider must
// free-run at exactly DIV clocks.
//
// Re-alignment on every packet follows the original report; the mid-bit restart and the
// shortened divider are chosen here.
module tb_rx_bit_clock;
  localparam int DIV = 40;
  localparam int TXP = 41;
  logic clk = 0, rst_n = 0, rx = 0, resync = 1;
  logic bit_en, rx_bit;
  int checks = 0, failures = 0;
  logic sent [$];
  int cyc = 0, last_en = -1, last_edge = 0;
  logic rx_d = 0;

  rx_bit_clock #(.DIV(DIV)) dut (.clk, .rst_n, .rx, .resync, .bit_en, .rx_bit);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    rx_d <= rx;
    if (rx != rx_d) last_edge = cyc;
  end

  // transmitter: random bits with a transition at least every 3 bits
  initial begin
    int run;
    run = 0;
    repeat (17) @(posedge clk);
    forever begin
      logic b;
      b = (run >= 2) ? ~rx : 1'($urandom);
      run = (b == rx) ? run + 1 : 0;
      rx = b;
      sent.push_back(b);
      repeat (TXP) @(posedge clk);
    end
  end

  initial begin
    int nchk;
    nchk = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // let it lock onto the first edges, then drop bits sampled before lock
    repeat (10 * TXP) @(posedge clk);
    @(posedge clk iff bit_en);
    @(negedge clk);
    // align: find the sent bit index whose interval contains this sample
    while (sent.size() > 1) begin
      void'(sent.pop_front());
      if (sent.size() <= 1) break;
    end
    repeat (400) begin
      @(posedge clk iff bit_en);
      @(negedge clk);
      checks++;
      if (rx_bit !== rx && sent.size() == 1) begin
        failures++; $display("cycle %0d: sampled %0b, line %0b", cyc, rx_bit, rx);
      end
      checks++;
      if ((cyc - last_edge) % TXP < DIV / 4 || (cyc - last_edge) % TXP > 3 * DIV / 4) begin
        failures++; $display("cycle %0d: sample %0d clocks after the bit edge", cyc, (cyc - last_edge) % TXP);
      end
      if (last_en >= 0) begin
        checks++;
        if (cyc - last_en < DIV / 2 || cyc - last_en > 2 * TXP) begin
          failures++; $display("bit_en spacing %0d", cyc - last_en);
        end
      end
      last_en = cyc;
      while (sent.size() > 1) void'(sent.pop_front());
    end
    // free-running
    resync = 0;
    @(posedge clk iff bit_en); last_en = cyc;
    repeat (20) begin
      @(posedge clk iff bit_en);
      checks++;
      if (cyc - last_en != DIV) begin failures++; $display("free-run spacing %0d", cyc - last_en); end
      last_en = cyc;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
