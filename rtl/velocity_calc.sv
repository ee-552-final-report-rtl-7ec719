// velocity_calc: instantaneous velocity from the 16th-packet encoder count.
//
// The count covers 16 packet periods of 3.72 ms, about 1/16 s. The distance in that time
// is count / 128 * 16 cm, so velocity = count / 128 * 16 * 16 = 2 * count cm/s (computed
// in that order to keep the fraction the report's divide-first order would drop). The
// display shows it as ones and tenths of m/s: the value in cm/s is divided by 10 and the
// two decimal digits taken, saturated at 9.9 m/s.
//   Timing: digits update one clock after sample_valid.
module velocity_calc (
  input  logic       clk,          // base station clock
  input  logic       rst_n,        // active-low synchronous reset
  input  logic       sample_valid, // new 16th-packet count
  input  logic [7:0] sample,       // pulses in 16 packet periods
  output logic [9:0] vel_cms,      // velocity in cm/s
  output logic [3:0] ones,         // m/s digit
  output logic [3:0] tenths,       // 0.1 m/s digit
  output logic       updated       // one clock: new value
);
  logic [9:0] v_nx;
  logic [9:0] dm;   // 0.1 m/s units

  assign v_nx = {1'b0, sample, 1'b0};
  assign dm   = (v_nx / 10'd10 > 10'd99) ? 10'd99 : v_nx / 10'd10;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vel_cms <= '0;
      ones    <= '0;
      tenths  <= '0;
      updated <= 1'b0;
    end else begin
      updated <= sample_valid;
      if (sample_valid) begin
        vel_cms <= v_nx;
        ones    <= 4'(dm / 10'd10);
        tenths  <= 4'(dm % 10'd10);
      end
    end
  end
endmodule
