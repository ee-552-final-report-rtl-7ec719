// car_clock_div: clock enables for the RC-car logic.
//
// The car runs from a 1 MHz crystal. The report derives its 15.625 kHz system/bit clock
// as the MSB of a 6-bit counter (1 MHz / 64) and counts the accelerometer pulse width at
// 500 kHz. Here the same rates are produced as one-cycle clock enables from a single
// 6-bit counter, so all car logic stays in the 1 MHz domain (a design choice: the report
// clocks its state machines from the divided clocks directly).
//   bit_en  : one pulse every 2**DIV_BITS clocks (64 us at 1 MHz), the RF bit period
//   cnt_en  : one pulse every 2 clocks (500 kHz), the accelerometer count rate
module car_clock_div #(
  parameter int unsigned DIV_BITS = 6
) (
  input  logic clk,     // 1 MHz car clock
  input  logic rst_n,   // active-low synchronous reset
  output logic bit_en,  // 15.625 kHz bit-rate enable
  output logic cnt_en   // 500 kHz accelerometer count enable
);
  logic [DIV_BITS-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign bit_en = (cnt == '1);
  assign cnt_en = cnt[0];
endmodule
