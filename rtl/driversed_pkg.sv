// driversed_pkg: constants and helpers shared by the RC-car and base-station logic.
//
// The RF packet is 58 bits, sent MSB first at one bit per 64 us:
//   preamble (16) | pad (2) | security (8) | pad (2) | accel (8) | pad (2) |
//   encoder (8) | pad (2) | prox/compass (8) | pad (2)
// The preamble "1010...10", the security code "10001000", the 58-bit length and the
// padding bits of '1' follow the report; where the fifth padding pair sits (after the
// preamble) is this design's reading of the packet table. The all-ones byte is the
// error code the car sends when a sensor value could not be read safely.
package driversed_pkg;

  localparam int unsigned PREAMBLE_BITS = 16;
  localparam int unsigned PREAMBLE_CHECK_BITS = 14;
  localparam logic [15:0] PREAMBLE = 16'b1010_1010_1010_1010;
  localparam logic [7:0]  SECURITY_CODE = 8'b1000_1000;
  localparam int unsigned PAD_BITS = 2;
  localparam logic        PAD_VALUE = 1'b1;
  localparam int unsigned PACKET_BITS = 58;
  localparam logic [7:0]  ERROR_BYTE = 8'hFF;

  // Which byte the packet encoder asks the data path for.
  typedef enum logic [1:0] {
    SEL_ACCEL   = 2'd0,
    SEL_ENCODER = 2'd1,
    SEL_PROXCMP = 2'd2,
    SEL_ERROR   = 2'd3
  } dp_sel_e;

  // Compass heading code sent to the display.
  typedef enum logic [2:0] {
    HDG_N  = 3'd0, HDG_NE = 3'd1, HDG_E  = 3'd2, HDG_SE = 3'd3,
    HDG_S  = 3'd4, HDG_SW = 3'd5, HDG_W  = 3'd6, HDG_NW = 3'd7
  } heading_e;

  // Decimal digits of a value below 1000.
  typedef struct packed {
    logic [3:0] hundreds;
    logic [3:0] tens;
    logic [3:0] ones;
  } bcd3_t;

  function automatic bcd3_t to_bcd3(input logic [9:0] v);
    bcd3_t d;
    logic [9:0] r;
    d.hundreds = 4'(v / 10'd100);
    r          = v % 10'd100;
    d.tens     = 4'(r / 10'd10);
    d.ones     = 4'(r % 10'd10);
    return d;
  endfunction

endpackage
