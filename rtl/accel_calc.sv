// accel_calc: acceleration from the accelerometer pulse-width count.
//
// Each received acceleration byte carries an axis bit (MSB, 1 = y) and T1/32, the high
// time of the accelerometer PWM in 500 kHz ticks divided by 32. Only x is used. With a
// 10 ms PWM period (5000 ticks) and 12.5 % duty change per g,
//     a = (32*T1/5000 - 0.5) / 0.125 * 9.81 m/s^2  ~  5*T1 - 390  (in 0.1 m/s^2),
// and the report moves the zero to T1 = 74 to cancel the sensor's mounting offset, so this
// block computes a = SCALE * (T1 - ZERO_COUNT) tenths of m/s^2. A byte whose low 7 bits
// are all ones is the car's error code and is ignored. To keep the display readable the
// result is only recomputed on every UPDATE_SAMPLES-th x sample (15 x samples, about 30
// packets); the shown value is held in between.
//   Outputs: sign, ones and tenths digits of |a| (saturated at 9.9 m/s^2, since the
//   display has two digits), and `updated` for one clock when they change.
module accel_calc #(
  parameter int unsigned UPDATE_SAMPLES = 15,
  parameter int unsigned ZERO_COUNT     = 74,
  parameter int unsigned SCALE          = 5
) (
  input  logic       clk,       // base station clock
  input  logic       rst_n,     // active-low synchronous reset
  input  logic       we,        // acceleration register written
  input  logic [7:0] data,      // {axis, T1/32}
  output logic       negative,  // acceleration is negative
  output logic [3:0] ones,      // m/s^2 digit
  output logic [3:0] tenths,    // 0.1 m/s^2 digit
  output logic       updated    // one clock: new value
);
  logic [3:0]        nsamples;
  logic signed [9:0] diff;
  logic [9:0]        mag;
  logic [9:0]        tenths_total;

  assign diff         = $signed({3'b000, data[6:0]}) - 10'(ZERO_COUNT);
  assign mag          = diff[9] ? 10'(-diff) : 10'(diff);
  assign tenths_total = (mag * 10'(SCALE) > 10'd99) ? 10'd99 : 10'(mag * 10'(SCALE));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nsamples <= '0;
      negative <= 1'b0;
      ones     <= '0;
      tenths   <= '0;
      updated  <= 1'b0;
    end else begin
      updated <= 1'b0;
      if (we && !data[7] && data[6:0] != 7'h7F) begin
        if (nsamples == 4'(UPDATE_SAMPLES - 1)) begin
          nsamples <= '0;
          negative <= diff[9] && (mag != 0);
          ones     <= 4'(tenths_total / 10);
          tenths   <= 4'(tenths_total % 10);
          updated  <= 1'b1;
        end else begin
          nsamples <= nsamples + 1'b1;
        end
      end
    end
  end
endmodule
