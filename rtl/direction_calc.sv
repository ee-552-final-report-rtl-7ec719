// direction_calc: compass heading and proximity warnings.
//
// Every received direction/proximity byte is {front, left, right, back, N, E, S, W}, all
// active low. The four compass bits are turned into a 3-bit heading: one low line gives a
// cardinal direction, two neighbouring low lines the intermediate one (000 = N, 001 = NE,
// 010 = E ... 111 = NW). The proximity bits are inverted into warnings (1 = object closer
// than ~5 cm). An all-ones byte is the car's error code (the compass always pulls at least
// one line low) and is ignored, as is a compass pattern that names no direction (own
// choice); in both cases the previous heading is kept.
module direction_calc
  import driversed_pkg::*;
(
  input  logic       clk,       // base station clock
  input  logic       rst_n,     // active-low synchronous reset
  input  logic       we,        // direction/proximity register written
  input  logic [7:0] data,      // {prox_n[3:0], compass_n[3:0]}
  output heading_e   heading,   // current heading
  output logic [3:0] prox_warn, // {front, left, right, back}, 1 = object near
  output logic       updated    // one clock: new byte accepted
);
  logic [3:0] c;      // active-high {N, E, S, W}
  logic       known;
  heading_e   h;

  assign c = ~data[3:0];

  always_comb begin
    known = 1'b1;
    h     = HDG_N;
    unique case (c)
      4'b1000: h = HDG_N;
      4'b1100: h = HDG_NE;
      4'b0100: h = HDG_E;
      4'b0110: h = HDG_SE;
      4'b0010: h = HDG_S;
      4'b0011: h = HDG_SW;
      4'b0001: h = HDG_W;
      4'b1001: h = HDG_NW;
      default: known = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      heading   <= HDG_N;
      prox_warn <= '0;
      updated   <= 1'b0;
    end else begin
      updated <= 1'b0;
      if (we && data != ERROR_BYTE) begin
        prox_warn <= ~data[7:4];
        if (known) heading <= h;
        updated <= 1'b1;
      end
    end
  end
endmodule
