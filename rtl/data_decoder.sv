// data_decoder: serial-to-parallel conversion of the three telemetry bytes.
//
// Started by the security check, it walks through the data part of the packet: two
// padding bits are skipped, eight bits are shifted MSB first into the shift register
// (acceleration), two skipped, eight shifted (distance/encoder), two skipped, eight shifted
// (direction/proximity) and the last two padding bits skipped, after which `done` ends the
// packet. `shifting` is high while a byte is being shifted in and drops in the clock
// in which its eighth bit arrives; the byte then stays in `data` until the next byte
// starts, which gives the register demultiplexer time to copy it. The two-bit wait and the
// eight-bit shift follow the original report; the exact timing of `shifting` and `done`
// is this design's choice.
module data_decoder
  import driversed_pkg::*;
(
  input  logic       clk,       // base station clock
  input  logic       rst_n,     // active-low synchronous reset
  input  logic       bit_en,    // received-bit strobe
  input  logic       rx_bit,    // received bit
  input  logic       start,     // security byte accepted
  output logic [7:0] data,      // shift register contents
  output logic       shifting,  // a byte is being shifted in
  output logic       done       // one clock: last bit of the packet taken
);
  typedef enum logic [1:0] {IDLE, PAD, SHIFT} state_e;
  state_e     state;
  logic [2:0] cnt;
  logic [1:0] field;   // 0..2 data bytes, 3 = trailing padding

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= IDLE;
      cnt      <= '0;
      field    <= '0;
      data     <= '0;
      shifting <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        state <= PAD;
        cnt   <= '0;
        field <= '0;
      end else if (bit_en) begin
        unique case (state)
          IDLE: ;
          PAD: begin
            cnt <= cnt + 1'b1;
            if (cnt == 3'(PAD_BITS - 1)) begin
              cnt <= '0;
              if (field == 2'd3) begin
                state <= IDLE;
                done  <= 1'b1;
              end else begin
                state    <= SHIFT;
                shifting <= 1'b1;
              end
            end
          end
          SHIFT: begin
            data <= {data[6:0], rx_bit};
            cnt  <= cnt + 1'b1;
            if (cnt == 3'd7) begin
              shifting <= 1'b0;
              state    <= PAD;
              cnt      <= '0;
              field    <= field + 1'b1;
            end
          end
          default: state <= IDLE;
        endcase
      end
    end
  end
endmodule
