// tb_accel_pwm_counter: drives both PWM inputs with known high times and checks every
// register write: axis alternates x, y, x ..., and the value is floor(ticks/32) of the
// pulse that has just ended (saturated at 126), with ticks = 500 kHz periods.
//
// The divide-by-32 and the x/y alternation follow the original report; the saturation
// at 126 and the skipping of a pulse already in progress are this design's choices.
module tb_accel_pwm_counter;
  logic clk = 0, rst_n = 0, cnt_en = 0;
  logic pwm_x = 0, pwm_y = 0;
  logic [7:0] accel_byte;
  logic writing;
  int checks = 0, failures = 0;
  int kx = 78, ky = 40;          // target counts
  int last_k [2];
  bit  exp_axis = 0;
  int nwrites = 0;

  accel_pwm_counter dut (.clk, .rst_n, .cnt_en, .pwm_x, .pwm_y, .accel_byte, .writing);

  always #5 clk = ~clk;
  always @(posedge clk) cnt_en <= ~cnt_en;

  function automatic int width_clocks(int k);
    return (k * 32 + 16) * 2;    // middle of the k-th /32 bucket, in 1 MHz clocks
  endfunction

  // x channel: 10000-clock period
  initial begin
    @(posedge rst_n);
    forever begin
      int w, k;
      k = kx;
      w = width_clocks(k);
      pwm_x = 1; repeat (w) @(posedge clk);
      pwm_x = 0; last_k[0] = k > 126 ? 126 : k;
      repeat (10000 - w) @(posedge clk);
    end
  end
  // y channel: 10000-clock period, offset by 3000 clocks
  initial begin
    @(posedge rst_n);
    repeat (3000) @(posedge clk);
    forever begin
      int w, k;
      k = ky;
      w = width_clocks(k);
      pwm_y = 1; repeat (w) @(posedge clk);
      pwm_y = 0; last_k[1] = k > 126 ? 126 : k;
      repeat (10000 - w) @(posedge clk);
    end
  end

  always @(posedge clk) begin
    if (rst_n && writing) begin
      @(negedge clk);
      checks++;
      if (accel_byte[7] != exp_axis || accel_byte[6:0] != 7'(last_k[exp_axis])) begin
        failures++;
        $display("write %0d: got axis %0b count %0d, expected axis %0b count %0d",
                 nwrites, accel_byte[7], accel_byte[6:0], exp_axis, last_k[exp_axis]);
      end
      exp_axis = ~exp_axis;
      nwrites++;
    end
  end

  // writing lasts one clock
  always @(posedge clk) if (rst_n && writing && $past(writing)) begin
    failures++; $display("writing held for more than one clock");
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (45000) @(posedge clk);
    kx = 100; ky = 0;
    repeat (40000) @(posedge clk);
    kx = 140; ky = 126;
    repeat (40000) @(posedge clk);
    checks++;
    if (nwrites < 10) begin failures++; $display("only %0d writes", nwrites); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
