// tb_demux_top: imitates the data decoder (shifting high while a byte comes in, the byte
// in `data` once it drops, random gaps) and checks that the three registers receive the
// three bytes in order, with one write strobe each that comes with the new contents, and that a new pkt_start in the
// middle of a packet restarts the sequence.
//
// The register order follows the original report's state sequence; the strobe timing is
// this design's choice.
module tb_demux_top;
  logic clk = 0, rst_n = 0, pkt_start = 0, shifting = 0;
  logic [7:0] data = 0;
  logic [7:0] accel_reg, dis_reg, dirprox_reg;
  logic accel_we, dis_we, dirprox_we;
  int checks = 0, failures = 0;
  int nwe [3];

  demux_top dut (.clk, .rst_n, .pkt_start, .data, .shifting, .accel_reg, .dis_reg,
                 .dirprox_reg, .accel_we, .dis_we, .dirprox_we);

  always #5 clk = ~clk;
  logic [7:0] at_we [3];
  always @(posedge clk) if (rst_n) begin
    if (accel_we) at_we[0] = accel_reg;
    if (dis_we) at_we[1] = dis_reg;
    if (dirprox_we) at_we[2] = dirprox_reg;
    if (accel_we) nwe[0]++;
    if (dis_we) nwe[1]++;
    if (dirprox_we) nwe[2]++;
  end

  task automatic send_byte(logic [7:0] b);
    @(negedge clk); shifting = 1;
    repeat ($urandom_range(3, 12)) @(negedge clk);
    data = 8'($urandom);            // partial contents while shifting
    repeat ($urandom_range(2, 8)) @(negedge clk);
    data = b; shifting = 0;
    repeat ($urandom_range(4, 12)) @(negedge clk);
    data = 8'($urandom);            // next byte starts shifting in
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 30; p++) begin
      logic [7:0] b [3];
      int n0 [3];
      n0 = nwe;
      @(negedge clk); pkt_start = 1; @(negedge clk); pkt_start = 0;
      repeat (5) @(negedge clk);
      if (p % 5 == 4) begin
        // broken packet: only one byte, then a new preamble
        send_byte(8'h55);
        @(negedge clk); pkt_start = 1; @(negedge clk); pkt_start = 0;
        repeat (5) @(negedge clk);
        n0 = nwe;
      end
      for (int f = 0; f < 3; f++) begin
        b[f] = 8'($urandom);
        send_byte(b[f]);
      end
      checks++;
      if (accel_reg != b[0] || dis_reg != b[1] || dirprox_reg != b[2]) begin
        failures++;
        $display("packet %0d: regs %h %h %h, expected %h %h %h", p, accel_reg, dis_reg,
                 dirprox_reg, b[0], b[1], b[2]);
      end
      checks++;
      if (at_we[0] != b[0] || at_we[1] != b[1] || at_we[2] != b[2]) begin
        failures++; $display("packet %0d: strobe came before the new contents", p);
      end
      checks++;
      if (nwe[0] != n0[0] + 1 || nwe[1] != n0[1] + 1 || nwe[2] != n0[2] + 1) begin
        failures++; $display("packet %0d: strobe counts wrong", p);
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
