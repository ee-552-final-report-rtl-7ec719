// distance_calc: total distance travelled, from the optical-encoder counts.
//
// The car clears its encoder counter after every 16th packet, so only every 16th encoder
// byte holds a complete count (pulses in 16 packet periods). A 4-bit packet counter holds
// this block in its counting state until it reaches 15; that byte is then added to the
// running pulse total, and distance = total / 128 pulses per rev * 16 cm per rev
// = total / 8 cm. The all-ones byte is the car's error code: it is still counted as a
// packet (so the 16-packet rhythm stays aligned) but not added. The chosen sample is also
// handed to velocity_calc. Digits: hundreds, tens, ones of the distance in cm (that is,
// metres with two decimals), saturated at 999.
// The pulse total width (TOTAL_BITS) is an own choice; the report does not give it.
module distance_calc
  import driversed_pkg::*;
#(
  parameter int unsigned TOTAL_BITS = 16
) (
  input  logic                  clk,          // base station clock
  input  logic                  rst_n,        // active-low synchronous reset
  input  logic                  we,           // distance register written
  input  logic [7:0]            data,         // encoder count from the car
  output logic [TOTAL_BITS-1:0] total_pulses, // pulses since reset
  output bcd3_t                 digits,       // distance in cm, three digits
  output logic                  sample_valid, // one clock: 16th-packet count available
  output logic [7:0]            sample,       // the 16th-packet count
  output logic                  updated       // one clock: new distance
);
  logic [3:0]            npkt;
  logic [TOTAL_BITS-1:0] total_nx;
  logic [TOTAL_BITS-1:0] dist_cm;

  assign total_nx = total_pulses + TOTAL_BITS'(data);
  assign dist_cm  = total_pulses >> 3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      npkt         <= '0;
      total_pulses <= '0;
      sample_valid <= 1'b0;
      sample       <= '0;
      updated      <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      updated      <= 1'b0;
      if (we) begin
        npkt <= npkt + 1'b1;
        if (npkt == 4'hF && data != ERROR_BYTE) begin
          total_pulses <= total_nx;
          sample       <= data;
          sample_valid <= 1'b1;
          updated      <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    if (dist_cm > TOTAL_BITS'(999)) digits = to_bcd3(10'd999);
    else                            digits = to_bcd3(10'(dist_cm));
  end
endmodule
