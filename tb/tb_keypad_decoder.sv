// tb_keypad_decoder: models the 4x4 matrix (a pressed key connects its column to its
// row, rows pulled high) with contact bounce, presses every key in turn and checks the
// key code (column*4 + row), one key_valid pulse per press, that holding a key gives no
// repeat, and that a bounce shorter than the debounce time gives nothing.
//
// The scan, debounce and release sequence follow the original report; the key numbering
// and the shortened tick (SCAN_DIV = 8, DEBOUNCE_TICKS = 4) are chosen here.
module tb_keypad_decoder;
  logic clk = 0, rst_n = 0;
  logic [3:0] row_n, col_n, key;
  logic key_valid;
  int checks = 0, failures = 0, nvalid = 0;
  int pressed = -1;   // key held, -1 = none

  keypad_decoder #(.SCAN_DIV(8), .DEBOUNCE_TICKS(4)) dut (.clk, .rst_n, .row_n, .col_n, .key,
                                                          .key_valid);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && key_valid) nvalid++;

  always_comb begin
    row_n = 4'hF;
    if (pressed >= 0 && !col_n[pressed / 4]) row_n[pressed % 4] = 1'b0;
  end

  task automatic press(int k);
    // bounce
    repeat (3) begin
      pressed = k; repeat ($urandom_range(1, 6)) @(posedge clk);
      pressed = -1; repeat ($urandom_range(1, 6)) @(posedge clk);
    end
    pressed = k;
    repeat (8 * 20) @(posedge clk);
    repeat (2) begin
      pressed = -1; repeat (3) @(posedge clk);
      pressed = k;  repeat (3) @(posedge clk);
    end
    pressed = -1;
    repeat (8 * 12) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    for (int k = 0; k < 16; k++) begin
      int n0;
      n0 = nvalid;
      press(k);
      checks++;
      if (nvalid != n0 + 1 || key != 4'(k)) begin
        failures++; $display("key %0d: %0d pulses, key %0d", k, nvalid - n0, key);
      end
    end
    // a short glitch is no key press
    begin
      int n0;
      n0 = nvalid;
      pressed = 5; repeat (8 * 2) @(posedge clk); pressed = -1;
      repeat (8 * 20) @(posedge clk);
      checks++;
      if (nvalid != n0 || key != 4'hF) begin failures++; $display("glitch reported as key"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
