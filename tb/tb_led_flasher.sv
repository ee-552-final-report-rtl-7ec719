// tb_led_flasher: with HALF_BITS = 3 the two LED halves must swap every 8 enables.
//
// The flashing pattern itself is this design's own; the original only names an LED
// controller.
module tb_led_flasher;
  logic clk = 0, rst_n = 0, bit_en = 0;
  logic [7:0] led;
  int checks = 0, failures = 0;

  led_flasher #(.N_LEDS(8), .HALF_BITS(3)) dut (.clk, .rst_n, .bit_en, .led);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 64; n++) begin
      @(negedge clk);
      checks++;
      if (led != (((n / 8) % 2 == 0) ? 8'h0F : 8'hF0)) begin
        failures++; $display("enable %0d: led %h", n, led);
      end
      bit_en = 1; @(negedge clk); bit_en = 0;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
