// keypad_decoder: 4x4 keypad scanner with debounce (strict Moore machine).
//
// The rows are pulled high on the board; the FPGA drives the columns. In IDLE all columns
// are driven low and the FSM waits for any row to go low (a key is down). It then waits
// DEBOUNCE_TICKS scan ticks for contact bounce to die out, and drives a single low column
// at a time (1110, 1101, 1011, 0111); the column whose low level shows up on a row,
// together with that row, identifies the key. The key code is latched into `key` and held
// until the next key press, and `key_valid` is high for exactly one clock. The FSM then
// drives all columns low again and waits, with the same debounce time, for all rows to
// return high before scanning anew. If the key has gone by the time the columns are
// scanned, nothing is reported.
//   Key code: col*4 + row, which with the wiring of the report's keypad (column 0 holds
//   keys 0-3, row 0 holds keys 0, 4, 8 and C) gives the printed hexadecimal legend.
//   The scan rate (SCAN_DIV) and debounce time are own choices: at 25.175 MHz a tick is
//   1 ms and the debounce time 10 ms.
module keypad_decoder #(
  parameter int unsigned SCAN_DIV       = 25175,
  parameter int unsigned DEBOUNCE_TICKS = 10
) (
  input  logic       clk,        // keypad FPGA clock
  input  logic       rst_n,      // active-low synchronous reset
  input  logic [3:0] row_n,      // keypad rows, pulled high, low = key in driven column
  output logic [3:0] col_n,      // keypad column drive, low = scanned
  output logic [3:0] key,        // last key pressed (hex value)
  output logic       key_valid   // one clock after each new key press
);
  typedef enum logic [2:0] {IDLE, DEBOUNCE, SCAN, FOUND, RELEASE} state_e;
  state_e                         state;
  logic [$clog2(SCAN_DIV)-1:0]    div;
  logic                           tick;
  logic [$clog2(DEBOUNCE_TICKS+1)-1:0] wait_cnt;
  logic [1:0]                     col;
  logic [1:0]                     row_found;
  logic [3:0]                     rows_s, rows_m;
  logic                           any_low;

  always_ff @(posedge clk) {rows_s, rows_m} <= {rows_m, row_n};
  assign any_low = (rows_s != 4'hF);

  always_ff @(posedge clk) begin
    if (!rst_n || tick) div <= '0;
    else                div <= div + 1'b1;
  end
  assign tick = (div == $bits(div)'(SCAN_DIV - 1));

  always_comb begin
    row_found = 2'd0;
    for (int r = 3; r >= 0; r--) if (!rows_s[r]) row_found = 2'(r);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= IDLE;
      wait_cnt <= '0;
      col      <= '0;
      key      <= '0;
    end else begin
      unique case (state)
        IDLE: if (tick && any_low) begin
          state    <= DEBOUNCE;
          wait_cnt <= '0;
        end
        DEBOUNCE: if (tick) begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == $bits(wait_cnt)'(DEBOUNCE_TICKS - 1)) begin
            state <= any_low ? SCAN : IDLE;
            col   <= '0;
          end
        end
        SCAN: if (tick) begin
          if (any_low) begin
            key   <= {col, row_found};
            state <= FOUND;
          end else if (col == 2'd3) begin
            state <= IDLE;
          end else begin
            col <= col + 1'b1;
          end
        end
        FOUND: begin
          state    <= RELEASE;
          wait_cnt <= '0;
        end
        RELEASE: if (tick) begin
          if (any_low) wait_cnt <= '0;
          else begin
            wait_cnt <= wait_cnt + 1'b1;
            if (wait_cnt == $bits(wait_cnt)'(DEBOUNCE_TICKS - 1)) state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Moore outputs: functions of the state register only.
  always_comb begin
    col_n = 4'h0;
    if (state == SCAN) col_n = ~(4'b0001 << col);
  end
  assign key_valid = (state == FOUND);
endmodule
