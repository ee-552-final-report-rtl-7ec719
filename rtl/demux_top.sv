// demux_top: copies each decoded byte into its own register.
//
// The data decoder reuses one shift register for all three bytes, so each byte must be
// copied out between the end of its shifting and the start of the next. This FSM follows
// the report's state sequence: START, SECURITY (wait until shifting starts), then for each
// of acceleration, distance and direction/proximity a state that waits for `shifting` to
// drop, a one-clock READ state that copies the byte (its write strobe follows one clock
// later, together with the new register contents), and a
// TEMP state that waits out the padding bits until the next byte starts shifting. A new
// preamble (pkt_start) always returns it to SECURITY so a broken packet cannot misplace
// the next one (own addition).
module demux_top (
  input  logic       clk,         // base station clock
  input  logic       rst_n,       // active-low synchronous reset
  input  logic       pkt_start,   // new packet found
  input  logic [7:0] data,        // data decoder shift register
  input  logic       shifting,    // data decoder is shifting
  output logic [7:0] accel_reg,   // acceleration register
  output logic [7:0] dis_reg,     // distance (encoder) register
  output logic [7:0] dirprox_reg, // direction/proximity register
  output logic       accel_we,    // one clock: accel_reg written
  output logic       dis_we,      // one clock: dis_reg written
  output logic       dirprox_we   // one clock: dirprox_reg written
);
  typedef enum logic [3:0] {
    START, SECURITY, ACCEL, READ_ACCEL, TEMP1, DIS, READ_DIS, TEMP2,
    DIRPROX, READ_DIRPROX, TEMP3
  } state_e;
  state_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= START;
      accel_reg   <= '0;
      dis_reg     <= '0;
      dirprox_reg <= '1;
    end else if (pkt_start) begin
      state <= SECURITY;
    end else begin
      unique case (state)
        START:        state <= SECURITY;
        SECURITY:     if (shifting) state <= ACCEL;
        ACCEL:        if (!shifting) state <= READ_ACCEL;
        READ_ACCEL:   begin accel_reg <= data; state <= TEMP1; end
        TEMP1:        if (shifting) state <= DIS;
        DIS:          if (!shifting) state <= READ_DIS;
        READ_DIS:     begin dis_reg <= data; state <= TEMP2; end
        TEMP2:        if (shifting) state <= DIRPROX;
        DIRPROX:      if (!shifting) state <= READ_DIRPROX;
        READ_DIRPROX: begin dirprox_reg <= data; state <= TEMP3; end
        TEMP3:        ;
        default:      state <= START;
      endcase
    end
  end

  // Write strobes follow the copy by one clock, so they come with the new contents.
  always_ff @(posedge clk) begin
    if (!rst_n) {accel_we, dis_we, dirprox_we} <= '0;
    else begin
      accel_we   <= (state == READ_ACCEL);
      dis_we     <= (state == READ_DIS);
      dirprox_we <= (state == READ_DIRPROX);
    end
  end
endmodule
