// accel_pwm_counter: pulse-width measurement of the two accelerometer PWM outputs.
//
// The accelerometer gives x and y acceleration as duty cycles of a ~10 ms PWM signal.
// As in the report, one counter is shared by both axes: a small FSM picks x or y through
// a 2-to-1 mux, waits for the start of a high pulse, and counts its width at 500 kHz
// (cnt_en). The count is first divided by 32 in a 5-bit prescaler whose wrap steps a
// 7-bit counter, so the result is floor(width_in_500kHz_ticks / 32). At the end of the
// pulse the 7-bit result and an axis bit (1 = y, 0 = x) are written into the output
// register as one byte and the FSM switches to the other axis.
//   accel_byte : {axis, count[6:0]}, held between writes
//   writing    : high during the one-clock register write, so the data path controller
//                can tell that the register is changing
// Own choices: the PWM inputs are synchronised with two flops; the 7-bit count saturates
// at 126 so that a reading can never look like the all-ones error code; the first axis
// after reset is x.
module accel_pwm_counter (
  input  logic       clk,         // 1 MHz car clock
  input  logic       rst_n,       // active-low synchronous reset
  input  logic       cnt_en,      // 500 kHz count enable
  input  logic       pwm_x,       // accelerometer X output (asynchronous)
  input  logic       pwm_y,       // accelerometer Y output (asynchronous)
  output logic [7:0] accel_byte,  // {axis (1=y), pulse width / 32}
  output logic       writing      // register being written this cycle
);
  typedef enum logic [1:0] {WAIT_LOW, WAIT_HIGH, COUNT, WRITE} state_e;
  state_e     state;
  logic [1:0] sync_x, sync_y;
  logic       axis;          // 0 = x, 1 = y
  logic       pwm;           // selected, synchronised input
  logic [4:0] prescale;
  logic [6:0] count;

  always_ff @(posedge clk) begin
    sync_x <= {sync_x[0], pwm_x};
    sync_y <= {sync_y[0], pwm_y};
  end

  assign pwm = axis ? sync_y[1] : sync_x[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= WAIT_LOW;
      axis       <= 1'b0;
      prescale   <= '0;
      count      <= '0;
      accel_byte <= '0;
    end else begin
      unique case (state)
        WAIT_LOW:  if (!pwm) state <= WAIT_HIGH;
        WAIT_HIGH: begin
          prescale <= '0;
          count    <= '0;
          if (pwm) state <= COUNT;
        end
        COUNT: begin
          if (!pwm) begin
            state <= WRITE;
          end else if (cnt_en) begin
            prescale <= prescale + 1'b1;
            if (prescale == 5'd31 && count != 7'd126) count <= count + 1'b1;
          end
        end
        WRITE: begin
          accel_byte <= {axis, count};
          axis       <= ~axis;
          state      <= WAIT_LOW;
        end
      endcase
    end
  end

  assign writing = (state == WRITE);
endmodule
