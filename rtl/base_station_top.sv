// base_station_top: base-station FPGA of the telemetry system.
//
// RF decode: the receive bit clock (re-aligned on each preamble) samples the receiver
// output; the preamble detector finds each packet, the security check accepts or rejects
// it, the data decoder shifts in the three data bytes and demux_top copies them into the
// acceleration, distance and direction/proximity registers. Data analysis: accel_calc,
// distance_calc (which feeds velocity_calc) and direction_calc turn the raw bytes into
// display digits. VGA: counters, sync generator and the text display show the values and
// the key last pressed on the keypad, which is decoded on a separate FPGA (see
// driversed_top). Everything runs on the 25.175 MHz clock; the report clocks the receive
// logic from a divided clock, which here is a clock enable.
module base_station_top
  import driversed_pkg::*;
#(
  parameter int unsigned RX_DIV = 1611
) (
  input  logic       clk,            // 25.175 MHz clock
  input  logic       rst_n,          // active-low reset
  input  logic       rf_rx,          // data from the RF receiver
  input  logic [3:0] key,            // last key from the keypad FPGA
  output logic [2:0] vga_rgb,        // {red, green, blue}
  output logic       vga_hsync_n,    // horizontal sync, active low
  output logic       vga_vsync_n,    // vertical sync, active low
  output logic       pkt_start,      // preamble found
  output logic       sec_corrupted,  // Security_Corrupted flag
  output logic [7:0] accel_reg,      // raw received bytes
  output logic [7:0] dis_reg,        // last received encoder byte
  output logic [7:0] dirprox_reg,    // last received {proximity, compass} byte
  output logic       accel_we,       // raw byte strobes
  output logic       dis_we,         // one clock when dis_reg has been written
  output logic       dirprox_we,     // one clock when dirprox_reg has been written
  output logic       acc_neg,        // acceleration, m/s^2
  output logic [3:0] acc_ones,       // acceleration ones digit, m/s^2
  output logic [3:0] acc_tenths,     // acceleration tenths digit
  output logic       acc_updated,    // one clock when the acceleration digits change
  output logic [9:0] vel_cms,        // velocity
  output logic [3:0] vel_ones,       // velocity ones digit, m/s
  output logic [3:0] vel_tenths,     // velocity tenths digit
  output logic       vel_updated,    // one clock when the velocity is recomputed
  output logic [15:0] dist_pulses,   // distance
  output bcd3_t      dist_cm,        // distance digits (hundreds, tens, ones of cm)
  output logic       dist_updated,   // one clock when the distance is recomputed
  output heading_e   heading,        // direction and proximity
  output logic [3:0] prox_warn,      // proximity warnings {front, left, right, back}, 1 = near
  output logic       dir_updated,    // one clock when heading and warnings are refreshed
  output logic       vga_frame       // one clock per VGA frame
);
  logic       bit_en, rx_bit, hunting, sec_ok, sec_fail, done;
  logic [7:0] dec_data;
  logic       shifting;
  logic       dist_sample_valid;
  logic [7:0] dist_sample;
  logic [9:0] x, y;
  logic       hs, vs, video_on;

  rx_bit_clock #(.DIV(RX_DIV)) u_rxclk (
    .clk, .rst_n, .rx(rf_rx), .resync(hunting), .bit_en, .rx_bit
  );
  preamble_fsm u_pre (
    .clk, .rst_n, .bit_en, .rx_bit, .sec_fail, .done, .pkt_start, .hunting
  );
  security_check u_sec (
    .clk, .rst_n, .bit_en, .rx_bit, .pkt_start, .sec_ok, .sec_fail, .corrupted(sec_corrupted)
  );
  data_decoder u_dec (
    .clk, .rst_n, .bit_en, .rx_bit, .start(sec_ok), .data(dec_data), .shifting, .done
  );
  demux_top u_demux (
    .clk, .rst_n, .pkt_start, .data(dec_data), .shifting,
    .accel_reg, .dis_reg, .dirprox_reg, .accel_we, .dis_we, .dirprox_we
  );

  accel_calc u_acc (
    .clk, .rst_n, .we(accel_we), .data(accel_reg),
    .negative(acc_neg), .ones(acc_ones), .tenths(acc_tenths), .updated(acc_updated)
  );
  distance_calc u_dist (
    .clk, .rst_n, .we(dis_we), .data(dis_reg), .total_pulses(dist_pulses), .digits(dist_cm),
    .sample_valid(dist_sample_valid), .sample(dist_sample), .updated(dist_updated)
  );
  velocity_calc u_vel (
    .clk, .rst_n, .sample_valid(dist_sample_valid), .sample(dist_sample),
    .vel_cms, .ones(vel_ones), .tenths(vel_tenths), .updated(vel_updated)
  );
  direction_calc u_dir (
    .clk, .rst_n, .we(dirprox_we), .data(dirprox_reg), .heading, .prox_warn,
    .updated(dir_updated)
  );

  vga_count_xy u_xy (.clk, .rst_n, .x, .y, .frame(vga_frame));
  vga_syncgen u_sync (.x, .y, .hsync_n(hs), .vsync_n(vs), .video_on);
  vga_display u_disp (
    .clk, .rst_n, .x, .y, .video_on, .hsync_n_in(hs), .vsync_n_in(vs),
    .acc_neg, .acc_ones, .acc_tenths, .vel_ones, .vel_tenths, .dist_bcd(dist_cm),
    .heading, .prox_warn, .key, .rgb(vga_rgb), .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n)
  );
endmodule
