// driversed_top: the complete telemetry system, RC car and base station side by side.
//
// The RC-car FPGA (1 MHz clock) collects acceleration, encoder, proximity and compass data
// and sends it as 58-bit packets on rf_tx. The RF transmitter, the air path and the RF
// receiver are analog parts outside the FPGAs, so the serial link is brought out: rf_tx
// leaves the car side and rf_rx enters the base side; connect them (with any delay or
// noise) outside. The base-station FPGA (25.175 MHz) decodes the packets, computes the
// telemetry and drives a VGA monitor. The keypad decoder, which the report moves to a
// second, smaller FPGA at the base station, scans the 4x4 keypad; its key goes to the VGA
// display and to a 7-segment decoder. The two sides have independent clocks and resets.
// Two output bits are constant by construction: vel_cms is twice an 8-bit count, so its
// bit 0 is always 0 and it never reaches bit 9 (at most 508).
module driversed_top
  import driversed_pkg::*;
(
  // RC car
  input  logic       car_clk,        // 1 MHz
  input  logic       car_rst_n,      // active-low synchronous reset of the car side
  input  logic       accel_x,        // accelerometer PWM outputs
  input  logic       accel_y,        // accelerometer y-axis PWM output
  input  logic       enc,            // optical encoder
  input  logic [3:0] prox_n,         // proximity {front, left, right, back}, low = near
  input  logic [3:0] compass_n,      // compass {N, E, S, W}, low = heading
  output logic       rf_tx,          // to the RF transmitter
  output logic       car_pkt_start,  // one car clock at the start of each packet
  output logic       car_dp_error,   // car data path in its error state
  output logic [7:0] led,            // LED bank, 1 = lit
  // base station
  input  logic       base_clk,       // 25.175 MHz
  input  logic       base_rst_n,     // active-low synchronous reset of the base station and keypad logic
  input  logic       rf_rx,          // from the RF receiver
  input  logic [3:0] kp_row_n,       // keypad rows
  output logic [3:0] kp_col_n,       // keypad columns
  output logic [3:0] key,            // last key pressed, 0..15
  output logic       key_valid,      // one clock after a new key is latched
  output logic [6:0] key_seg,        // 7-segment pattern of the key
  output logic [2:0] vga_rgb,        // {red, green, blue}
  output logic       vga_hsync_n,    // horizontal sync, active low
  output logic       vga_vsync_n,    // vertical sync, active low
  output logic       pkt_start,      // preamble found (base station)
  output logic       sec_corrupted,  // security byte mismatch, held until the next preamble
  output logic [7:0] accel_reg,      // last received acceleration byte {axis, count}
  output logic [7:0] dis_reg,        // last received encoder byte
  output logic [7:0] dirprox_reg,    // last received {proximity, compass} byte
  output logic       accel_we,       // one clock when accel_reg has been written
  output logic       dis_we,         // one clock when dis_reg has been written
  output logic       dirprox_we,     // one clock when dirprox_reg has been written
  output logic       acc_neg,        // acceleration is negative
  output logic [3:0] acc_ones,       // acceleration ones digit, m/s^2
  output logic [3:0] acc_tenths,     // acceleration tenths digit
  output logic       acc_updated,    // one clock when the acceleration digits change
  output logic [9:0] vel_cms,        // velocity in cm/s
  output logic [3:0] vel_ones,       // velocity ones digit, m/s
  output logic [3:0] vel_tenths,     // velocity tenths digit
  output logic       vel_updated,    // one clock when the velocity is recomputed
  output logic [15:0] dist_pulses,   // encoder pulses summed since reset
  output bcd3_t      dist_cm,        // distance digits (hundreds, tens, ones of cm)
  output logic       dist_updated,   // one clock when the distance is recomputed
  output heading_e   heading,        // compass heading
  output logic [3:0] prox_warn,      // proximity warnings {front, left, right, back}, 1 = near
  output logic       dir_updated,    // one clock when heading and warnings are refreshed
  output logic       vga_frame       // one clock per VGA frame
);
  rc_car_top u_car (
    .clk(car_clk), .rst_n(car_rst_n), .accel_x, .accel_y, .enc, .prox_n, .compass_n,
    .rf_tx, .pkt_start(car_pkt_start), .dp_error(car_dp_error), .led
  );

  base_station_top u_base (
    .clk(base_clk), .rst_n(base_rst_n), .rf_rx, .key,
    .vga_rgb, .vga_hsync_n, .vga_vsync_n, .pkt_start, .sec_corrupted,
    .accel_reg, .dis_reg, .dirprox_reg, .accel_we, .dis_we, .dirprox_we,
    .acc_neg, .acc_ones, .acc_tenths, .acc_updated,
    .vel_cms, .vel_ones, .vel_tenths, .vel_updated,
    .dist_pulses, .dist_cm, .dist_updated, .heading, .prox_warn, .dir_updated, .vga_frame
  );

  keypad_decoder u_kp (
    .clk(base_clk), .rst_n(base_rst_n), .row_n(kp_row_n), .col_n(kp_col_n),
    .key, .key_valid
  );

  seg7_decoder u_seg (.value(key), .seg(key_seg));
endmodule
