// tb_direction_calc: every compass pattern with one or two neighbouring lines low must
// give its heading code; other patterns and the 0xFF error byte keep the old heading;
// proximity bits come out inverted (0xFF keeps them too).
//
// The heading codes and the active-low bit order follow the original report; holding
// the heading on an invalid pattern is this design's choice.
module tb_direction_calc;
  import driversed_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [7:0] data = 0;
  heading_e heading;
  logic [3:0] prox_warn;
  logic updated;
  int checks = 0, failures = 0;

  direction_calc dut (.clk, .rst_n, .we, .data, .heading, .prox_warn, .updated);

  always #5 clk = ~clk;

  task automatic write(logic [7:0] b);
    @(negedge clk); data = b; we = 1;
    @(negedge clk); we = 0;
    @(negedge clk);
  endtask

  // active-low compass pattern {N,E,S,W} for heading code h
  function automatic logic [3:0] pattern(int h);
    case (h)
      0: return 4'b0111; 1: return 4'b0011; 2: return 4'b1011; 3: return 4'b1001;
      4: return 4'b1101; 5: return 4'b1100; 6: return 4'b1110; default: return 4'b0110;
    endcase
  endfunction

  initial begin
    int cur_h;
    logic [3:0] cur_p;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cur_h = 0; cur_p = 0;
    for (int i = 0; i < 200; i++) begin
      logic [3:0] pr, c;
      int kind;
      pr = 4'($urandom);
      kind = $urandom_range(0, 3);
      if (kind == 0) begin
        write(8'hFF);
      end else if (kind == 1) begin
        // a pattern that is no direction: all high but not the error byte, or opposite pair
        c = ($urandom_range(0, 1) != 0) ? 4'b0101 : 4'b1111;
        if ({pr, c} == 8'hFF) pr = 4'hE;
        write({pr, c});
        cur_p = ~pr;
      end else begin
        cur_h = $urandom_range(0, 7);
        write({pr, pattern(cur_h)});
        cur_p = ~pr;
      end
      checks++;
      if (int'(heading) != cur_h || prox_warn != cur_p) begin
        failures++;
        $display("step %0d: heading %0d warn %b, expected %0d %b", i, heading, prox_warn, cur_h, cur_p);
      end
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
