// rc_car_top: the RC-car FPGA of the telemetry system.
//
// Sensor interfaces (accelerometer PWM counter, optical-encoder counter, proximity and
// compass registers) feed the data path controller, which hands one byte at a time to the
// packet encoder on request. The encoder sends an endless stream of 58-bit packets, one
// bit per 64 us, to the RF transmitter (outside the FPGA, on rf_tx). An LED controller
// flashes the LED bank. Everything runs on the 1 MHz board clock with enables from
// car_clock_div; the report divides the clock itself, which gives the same rates.
module rc_car_top (
  input  logic       clk,        // 1 MHz crystal clock
  input  logic       rst_n,      // active-low reset
  input  logic       accel_x,    // ADXL202 X PWM output
  input  logic       accel_y,    // ADXL202 Y PWM output
  input  logic       enc,        // optical encoder pulse output
  input  logic [3:0] prox_n,     // proximity sensors {front, left, right, back}, low = near
  input  logic [3:0] compass_n,  // compass {N, E, S, W}, low = heading
  output logic       rf_tx,      // serial data to the RF transmitter
  output logic       pkt_start,  // first bit of a packet is on rf_tx
  output logic       dp_error,   // data path controller is in its error state
  output logic [7:0] led         // LED bank
);
  logic       bit_en, cnt_en;
  logic [7:0] accel_byte, enc_count, proxcmp, dp_data;
  logic       accel_writing, enc_rd;
  logic       req_accel, req_enc, req_prox;

  car_clock_div u_clk (.clk, .rst_n, .bit_en, .cnt_en);

  accel_pwm_counter u_accel (
    .clk, .rst_n, .cnt_en, .pwm_x(accel_x), .pwm_y(accel_y),
    .accel_byte, .writing(accel_writing)
  );

  encoder_counter u_enc (.clk, .rst_n, .enc, .rd(enc_rd), .count(enc_count));

  sensor_regs u_sens (.clk, .rst_n, .prox_n, .compass_n, .proxcmp);

  datapath_ctrl u_dp (
    .clk, .rst_n, .req_accel, .req_enc, .req_prox,
    .accel_byte, .accel_writing, .enc_count, .proxcmp,
    .data(dp_data), .enc_rd, .error(dp_error)
  );

  packet_encoder u_penc (
    .clk, .rst_n, .bit_en, .data(dp_data),
    .req_accel, .req_enc, .req_prox, .tx(rf_tx), .pkt_start
  );

  led_flasher u_led (.clk, .rst_n, .bit_en, .led);
endmodule
