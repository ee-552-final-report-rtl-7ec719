// tb_sensor_regs: random proximity and compass inputs must appear as
// {prox, compass} two clocks later.
//
// Registering the inputs follows the original report; the second stage is this design's
// choice.
module tb_sensor_regs;
  logic clk = 0, rst_n = 0;
  logic [3:0] prox_n = 4'hF, compass_n = 4'hF;
  logic [7:0] proxcmp;
  int checks = 0, failures = 0;

  sensor_regs dut (.clk, .rst_n, .prox_n, .compass_n, .proxcmp);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      logic [3:0] p, c;
      p = 4'($urandom); c = 4'($urandom);
      @(negedge clk); prox_n = p; compass_n = c;
      repeat (2) @(posedge clk);
      @(negedge clk);
      checks++;
      if (proxcmp != {p, c}) begin failures++; $display("got %h expected %h", proxcmp, {p, c}); end
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
