// preamble_fsm: packet start detector of the base station.
//
// A 14-bit window of received bits is compared, at every received bit, with the first
// fourteen preamble bits "1010_1010_1010_10". On a match the FSM leaves HUNT, pulses
// pkt_start and stays LOCKED while the rest of the packet is decoded; it returns to HUNT
// when the security check rejects the packet (sec_fail) or the data decoder has taken the
// last bit (done). `hunting` tells the receive clock that it may re-align on data edges.
// The 14-bit check is the report's; returning on sec_fail/done is this design's choice.
module preamble_fsm
  import driversed_pkg::*;
(
  input  logic clk,        // base station clock
  input  logic rst_n,      // active-low synchronous reset
  input  logic bit_en,     // received-bit strobe
  input  logic rx_bit,     // received bit
  input  logic sec_fail,      // security byte was wrong
  input  logic done,       // last bit of the packet taken
  output logic pkt_start,  // one clock: preamble found, next bit is preamble bit 14
  output logic hunting     // searching for a preamble
);
  typedef enum logic {HUNT, LOCKED} state_e;
  state_e                         state;
  logic [PREAMBLE_CHECK_BITS-1:0] window;
  logic [PREAMBLE_CHECK_BITS-1:0] window_nx;

  assign window_nx = {window[PREAMBLE_CHECK_BITS-2:0], rx_bit};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= HUNT;
      window    <= '0;
      pkt_start <= 1'b0;
    end else begin
      pkt_start <= 1'b0;
      if (bit_en) window <= window_nx;
      unique case (state)
        HUNT: if (bit_en && window_nx == PREAMBLE[15 -: PREAMBLE_CHECK_BITS]) begin
          state     <= LOCKED;
          pkt_start <= 1'b1;
        end
        LOCKED: if (sec_fail || done) begin
          state  <= HUNT;
          window <= '0;
        end
      endcase
    end
  end

  assign hunting = (state == HUNT);
endmodule
