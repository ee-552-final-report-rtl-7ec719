// tb_driversed_workloads: the whole system at its default parameters, driven the way the
// original car was tested, with sensor rates worked out from physical quantities:
//   1. straight run at 1 m/s for 2 m: encoder at 800 pulses/s (128 pulses per 16 cm turn),
//      so the displayed distance must reach 2.00 m less at most one 16-packet window, and
//      the velocity must be within 7 cm/s of 100 cm/s (the 2 cm/s-per-pulse scale reads
//      about 5 % low);
//   2. accelerometer at rest (high time giving count 74, 0.0 m/s^2) for 1 s, then tilted
//      by 1 g (12.5 % more duty cycle of the 10 ms period, count 93): every displayed
//      acceleration must be 0.0 or 9.5 m/s^2 and both must be seen;
//   3. the car's stated top speed, 20 km/h (4444 pulses/s): 264 pulses per window do not
//      fit the 8-bit counter, so every full window must arrive as the saturated 254 and
//      the velocity must show 5.0 m/s (508 cm/s) instead of 5.6.
// The base station is started first and the car 1 ms later, so the base station receives
// the car's first packet and their 16-packet windows line up.
//
// Speeds, wheel size, pulse counts, accelerometer period and scale follow the original
// report; the exact high times (chosen in the middle of a count) and run lengths are chosen
// here.
module tb_driversed_workloads;
  import driversed_pkg::*;
  logic car_clk = 0, base_clk = 0;
  always #500 car_clk = ~car_clk;          // 1 MHz
  always #19.861 base_clk = ~base_clk;     // 25.175 MHz
  logic car_rst_n = 0, base_rst_n = 0;
  logic accel_x = 0, accel_y = 0, enc = 0;
  logic [3:0] prox_n = 4'hF, compass_n = 4'b0111;
  logic rf_tx, rf_rx;
  logic [3:0] kp_row_n = 4'hF, kp_col_n;
  logic car_pkt_start, car_dp_error;
  logic [7:0] led;
  logic [3:0] key; logic key_valid; logic [6:0] key_seg;
  logic [2:0] vga_rgb; logic vga_hsync_n, vga_vsync_n, vga_frame;
  logic pkt_start, sec_corrupted;
  logic [7:0] accel_reg, dis_reg, dirprox_reg;
  logic accel_we, dis_we, dirprox_we;
  logic acc_neg, acc_updated, vel_updated, dist_updated, dir_updated;
  logic [3:0] acc_ones, acc_tenths, vel_ones, vel_tenths, prox_warn;
  logic [9:0] vel_cms;
  logic [15:0] dist_pulses;
  bcd3_t dist_cm;
  heading_e heading;

  driversed_top dut (.*);
  assign rf_rx = rf_tx;

  int checks = 0, failures = 0;

  // encoder: one pulse every enc_period_us (0 = wheel stopped)
  int enc_period_us = 0;
  int pulses = 0;
  initial forever begin
    if (enc_period_us == 0) @(posedge car_clk);
    else begin
      enc = 1; repeat (enc_period_us / 2) @(posedge car_clk);
      enc = 0; repeat (enc_period_us - enc_period_us / 2) @(posedge car_clk);
      pulses++;
    end
  end

  // accelerometer: 10 ms period, both axes the same high time
  int acc_high_us = 4768;   // 2384 ticks of 500 kHz = count 74
  initial forever begin
    {accel_x, accel_y} = 2'b11; repeat (acc_high_us) @(posedge car_clk);
    {accel_x, accel_y} = 2'b00; repeat (10000 - acc_high_us) @(posedge car_clk);
  end

  // displayed acceleration
  int n_zero = 0, n_1g = 0;
  always @(posedge base_clk) if (base_rst_n && acc_updated) begin
    checks++;
    if (!acc_neg && acc_ones == 0 && acc_tenths == 0) n_zero++;
    else if (!acc_neg && acc_ones == 9 && acc_tenths == 5) n_1g++;
    else begin failures++; $display("acceleration %s%0d.%0d", acc_neg ? "-" : "", acc_ones, acc_tenths); end
  end

  // velocity and saturation bookkeeping
  bit phase_cruise = 0, phase_fast = 0;
  int n_cruise = 0, n_sat = 0;
  always @(posedge base_clk) if (base_rst_n && vel_updated) begin
    if (phase_cruise) begin
      n_cruise++;
      checks++;
      if (vel_cms < 93 || vel_cms > 107) begin failures++; $display("1 m/s read as %0d cm/s", vel_cms); end
    end
    if (phase_fast) begin
      n_sat++;
      checks++;
      if (vel_cms != 508 || vel_ones != 5 || vel_tenths != 0) begin
        failures++; $display("20 km/h read as %0d cm/s (%0d.%0d m/s)", vel_cms, vel_ones, vel_tenths);
      end
    end
  end

  function automatic int shown_cm();
    return 100 * int'(dist_cm.hundreds) + 10 * int'(dist_cm.tens) + int'(dist_cm.ones);
  endfunction

  localparam int WINDOW_US = 16 * 58 * 64;

  initial begin
    int d;
    repeat (3) @(posedge car_clk);
    @(posedge base_clk) base_rst_n = 1;
    #1ms;
    @(posedge car_clk) car_rst_n = 1;
    // straight run at 1 m/s until 2 m (1600 pulses); tilt after 1 s
    enc_period_us = 1250;
    repeat (3 * WINDOW_US) @(posedge car_clk);
    phase_cruise = 1;
    fork
      begin #1000ms; acc_high_us = 5984; end   // 2992 ticks = count 93
      wait (pulses >= 1600);
    join
    phase_cruise = 0;
    enc_period_us = 0;
    repeat (2 * WINDOW_US) @(posedge car_clk);
    d = shown_cm();
    $display("2 m run: %0d pulses, distance shown %0d cm, %0d velocity readings", pulses, d, n_cruise);
    checks++;
    if (d > 200 || d < 200 - 48 / 8 - 1) begin failures++; $display("distance %0d cm for 2.00 m", d); end
    checks++;
    if (n_cruise < 20) begin failures++; $display("only %0d velocity readings", n_cruise); end
    // top speed, 20 km/h = 555.6 cm/s = 4444 pulses/s
    enc_period_us = 225;
    repeat (WINDOW_US + 100) @(posedge car_clk);
    phase_fast = 1;
    repeat (3 * WINDOW_US) @(posedge car_clk);
    phase_fast = 0;
    enc_period_us = 0;
    $display("20 km/h: %0d saturated readings; acceleration 0.0 seen %0d times, 9.5 seen %0d times",
             n_sat, n_zero, n_1g);
    checks++;
    if (n_sat < 2) begin failures++; $display("too few readings at top speed"); end
    checks++;
    if (n_zero == 0 || n_1g == 0) begin failures++; $display("an acceleration level was never shown"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #4s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
