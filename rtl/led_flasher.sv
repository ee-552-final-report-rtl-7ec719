// led_flasher: decorative LED bank at the front of the RC car.
//
// The report only says that a simple controller flashes a bank of LEDs. This is the
// simplest such controller (own design): the two halves of the bank light in turn and
// swap every 2**HALF_BITS bit periods (2**12 x 64 us ~ 0.26 s by default).
module led_flasher #(
  parameter int unsigned N_LEDS    = 8,
  parameter int unsigned HALF_BITS = 12
) (
  input  logic              clk,     // 1 MHz car clock
  input  logic              rst_n,   // active-low synchronous reset
  input  logic              bit_en,  // 15.625 kHz enable
  output logic [N_LEDS-1:0] led      // LED drive, 1 = on
);
  logic [HALF_BITS-1:0] cnt;
  logic                 phase;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt   <= '0;
      phase <= 1'b0;
    end else if (bit_en) begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) phase <= ~phase;
    end
  end

  always_comb begin
    for (int i = 0; i < N_LEDS; i++) led[i] = phase ^ (i < N_LEDS / 2);
  end
endmodule
