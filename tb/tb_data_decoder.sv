// tb_data_decoder: after start, sends pad, byte, pad, byte, pad, byte, pad and checks
// that each byte is in `data` when `shifting` drops, that shifting is high for exactly
// eight bits per byte, and that done comes after the last padding bit.
//
// The pad-then-8-bits rhythm follows the original report; the exact timing of `shifting`
// and `done` is this design's choice.
module tb_data_decoder;
  logic clk = 0, rst_n = 0, bit_en = 0, rx_bit = 0, start = 0;
  logic [7:0] data;
  logic shifting, done;
  int checks = 0, failures = 0, ndone = 0;
  logic [7:0] expq [$];
  int hi_bits = 0;

  data_decoder dut (.clk, .rst_n, .bit_en, .rx_bit, .start, .data, .shifting, .done);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && done) ndone++;

  // on each falling edge of shifting, compare with the next expected byte
  logic shifting_d = 0;
  always @(posedge clk) begin
    shifting_d <= shifting;
    if (rst_n && shifting_d && !shifting) begin
      checks++;
      if (expq.size() == 0 || data != expq[0]) begin
        failures++; $display("byte %h, expected %h", data, expq.size() ? expq[0] : 8'hxx);
      end
      if (expq.size()) void'(expq.pop_front());
    end
  end

  task automatic send_bit(logic b);
    @(negedge clk); rx_bit = b; bit_en = 1;
    if (shifting) hi_bits++;
    @(negedge clk); bit_en = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 20; p++) begin
      logic [7:0] b [3];
      hi_bits = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int f = 0; f < 3; f++) begin
        b[f] = 8'($urandom);
        expq.push_back(b[f]);
        send_bit(1); send_bit(1);
        for (int i = 7; i >= 0; i--) send_bit(b[f][i]);
      end
      send_bit(1);
      checks++;
      if (ndone != p) begin failures++; $display("done too early"); end
      send_bit(1);
      @(negedge clk);
      checks++;
      if (ndone != p + 1) begin failures++; $display("no done after packet %0d", p); end
      checks++;
      if (hi_bits != 3 * 8) begin failures++; $display("shifting high for %0d bit strobes", hi_bits); end
      checks++;
      if (expq.size() != 0) begin failures++; $display("%0d bytes not delivered", expq.size()); expq.delete(); end
      // idle bits are ignored
      repeat (5) send_bit(1'($urandom));
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
