// security_check: security-byte check of the base station.
//
// After a preamble has been found the rest of the packet follows at fixed positions: the
// two remaining preamble bits and two padding bits are skipped, then the 8-bit security
// byte is shifted in and compared with the car's code "10001000". On a match sec_ok pulses
// and starts the data decoder. On a mismatch `corrupted` (the report's Security_Corrupted
// flag) goes high and stays high until the next valid preamble, and `sec_fail` sends the
// preamble detector back to hunting, so the packet's data is never stored.
module security_check
  import driversed_pkg::*;
(
  input  logic clk,        // base station clock
  input  logic rst_n,      // active-low synchronous reset
  input  logic bit_en,     // received-bit strobe
  input  logic rx_bit,     // received bit
  input  logic pkt_start,  // preamble found
  output logic sec_ok,     // one clock: security byte matched
  output logic sec_fail,      // one clock: security byte did not match
  output logic corrupted   // Security_Corrupted flag
);
  localparam int unsigned SKIP = (PREAMBLE_BITS - PREAMBLE_CHECK_BITS) + PAD_BITS;
  typedef enum logic [1:0] {IDLE, SKIPPING, SHIFTING} state_e;
  state_e     state;
  logic [3:0] cnt;
  logic [7:0] shreg;
  logic [7:0] shreg_nx;

  assign shreg_nx = {shreg[6:0], rx_bit};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      cnt       <= '0;
      shreg     <= '0;
      sec_ok    <= 1'b0;
      sec_fail     <= 1'b0;
      corrupted <= 1'b0;
    end else begin
      sec_ok <= 1'b0;
      sec_fail  <= 1'b0;
      if (pkt_start) begin
        state     <= SKIPPING;
        cnt       <= '0;
        corrupted <= 1'b0;
      end else if (bit_en) begin
        unique case (state)
          IDLE: ;
          SKIPPING: begin
            cnt <= cnt + 1'b1;
            if (cnt == 4'(SKIP - 1)) begin
              state <= SHIFTING;
              cnt   <= '0;
            end
          end
          SHIFTING: begin
            shreg <= shreg_nx;
            cnt   <= cnt + 1'b1;
            if (cnt == 4'd7) begin
              state <= IDLE;
              if (shreg_nx == SECURITY_CODE) sec_ok <= 1'b1;
              else begin
                sec_fail     <= 1'b1;
                corrupted <= 1'b1;
              end
            end
          end
          default: state <= IDLE;
        endcase
      end
    end
  end
endmodule
