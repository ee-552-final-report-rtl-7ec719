// tb_base_station_top: sends serial packets into the base station (RX_DIV = 256 clocks per
// bit, the transmitter 0.4 % slower and with random idle gaps) and checks what is
// decoded: the three data registers for every packet with the right security code, the
// Security_Corrupted flag and unchanged registers for packets with a wrong one, and the
// computed acceleration, distance, velocity, heading and proximity values against a
// model of the packets sent. Also checks that horizontal sync runs.
//
// The packet layout and security code follow the original report; the shortened bit
// period is chosen here only to keep the run short.
module tb_base_station_top;
  import driversed_pkg::*;
  localparam int DIV = 256;
  localparam int TXP = 257;
  logic clk = 0, rst_n = 0, rf_rx = 1;
  logic [3:0] key = 4'h3;
  logic [2:0] vga_rgb;
  logic vga_hsync_n, vga_vsync_n, pkt_start, sec_corrupted;
  logic [7:0] accel_reg, dis_reg, dirprox_reg;
  logic accel_we, dis_we, dirprox_we, acc_neg, acc_updated, vel_updated, dist_updated;
  logic dir_updated, vga_frame;
  logic [3:0] acc_ones, acc_tenths, vel_ones, vel_tenths, prox_warn;
  logic [9:0] vel_cms;
  logic [15:0] dist_pulses;
  bcd3_t dist_cm;
  heading_e heading;
  int checks = 0, failures = 0, nhs = 0;

  base_station_top #(.RX_DIV(DIV)) dut (.*);

  always #5 clk = ~clk;
  logic hs_d = 1;
  always @(posedge clk) begin hs_d <= vga_hsync_n; if (hs_d && !vga_hsync_n) nhs++; end

  task automatic send_packet(logic [7:0] sec, logic [7:0] a, logic [7:0] e, logic [7:0] p);
    logic [57:0] bits;
    bits = {16'hAAAA, 2'b11, sec, 2'b11, a, 2'b11, e, 2'b11, p, 2'b11};
    for (int i = 57; i >= 0; i--) begin
      rf_rx = bits[i];
      repeat (TXP) @(posedge clk);
    end
  endtask

  initial begin
    int ngood, nx, total, last_t1;
    logic [7:0] last_dirprox;
    ngood = 0; nx = 0; total = 0; last_t1 = 0; last_dirprox = 8'hFF;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (500) @(posedge clk);
    for (int p = 0; p < 70; p++) begin
      logic [7:0] a, e, d, sec;
      logic [7:0] a0, e0, d0;
      bit good;
      good = (p % 6 != 5);
      sec = good ? 8'h88 : 8'h88 ^ (8'h1 << $urandom_range(0, 7));
      a = {1'(p % 2), 7'($urandom_range(30, 120))};
      e = 8'($urandom_range(0, 200));
      d = {4'($urandom), 4'b0111 >> (p % 3)};   // N, NE-ish or E patterns
      d[3:0] = (p % 3 == 0) ? 4'b0111 : (p % 3 == 1) ? 4'b0011 : 4'b1011;
      a0 = accel_reg; e0 = dis_reg; d0 = dirprox_reg;
      if ($urandom_range(0, 3) == 0) begin
        rf_rx = 1;
        repeat ($urandom_range(1, 5) * TXP + $urandom_range(0, 30)) @(posedge clk);
      end
      send_packet(sec, a, e, d);
      repeat (2 * DIV) @(posedge clk);
      checks++;
      if (good) begin
        if (accel_reg != a || dis_reg != e || dirprox_reg != d || sec_corrupted) begin
          failures++;
          $display("packet %0d: regs %h %h %h flag %0b, sent %h %h %h", p, accel_reg, dis_reg,
                   dirprox_reg, sec_corrupted, a, e, d);
        end
        ngood++;
        if (!a[7]) begin nx++; last_t1 = a[6:0]; end
        if (ngood % 16 == 0) total += e;
        last_dirprox = d;
      end else begin
        if (accel_reg != a0 || dis_reg != e0 || dirprox_reg != d0 || !sec_corrupted) begin
          failures++; $display("packet %0d with bad code %h was accepted", p, sec);
        end
      end
    end
    // calculated values
    begin
      int dcm;
      dcm = total / 8;
      checks++;
      if (dist_pulses != 16'(total) || dist_cm.hundreds != 4'(dcm / 100) ||
          dist_cm.tens != 4'((dcm / 10) % 10) || dist_cm.ones != 4'(dcm % 10)) begin
        failures++; $display("distance %0d pulses, expected %0d", dist_pulses, total);
      end
      checks++;
      if (int'(heading) != ((last_dirprox[3:0] == 4'b0111) ? 0 : (last_dirprox[3:0] == 4'b0011) ? 1 : 2)
          || prox_warn != ~last_dirprox[7:4]) begin
        failures++; $display("heading %0d warn %b from %h", heading, prox_warn, last_dirprox);
      end
      checks++;
      if (nhs < 10) begin failures++; $display("no hsync"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // acceleration: check each update against the x sample that caused it
  int xs = 0;
  logic [6:0] xlast;
  always @(posedge clk) if (rst_n) begin
    if (accel_we && !accel_reg[7] && accel_reg[6:0] != 7'h7F) begin xs++; xlast = accel_reg[6:0]; end
    if (acc_updated) begin
      int a, mag;
      a = 5 * (int'(xlast) - 74);
      mag = a < 0 ? -a : a;
      if (mag > 99) mag = 99;
      checks++;
      if (xs % 15 != 0 || acc_neg != (a < 0) || acc_ones != 4'(mag / 10) || acc_tenths != 4'(mag % 10)) begin
        failures++; $display("acceleration update after %0d x samples: %0d.%0d", xs, acc_ones, acc_tenths);
      end
    end
    if (vel_updated) begin
      checks++;
      if (vel_cms != 10'(2 * dis_reg)) begin failures++; $display("velocity %0d from %0d", vel_cms, dis_reg); end
    end
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
