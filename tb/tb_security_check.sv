// tb_security_check: after pkt_start, four bits are skipped and the next eight compared
// with 10001000. Correct codes must give sec_ok only; wrong codes sec_fail and the
// corrupted flag, which must stay high until the next pkt_start.
//
// The code 10001000 and the flag behaviour follow the original report.
module tb_security_check;
  logic clk = 0, rst_n = 0, bit_en = 0, rx_bit = 0, pkt_start = 0;
  logic sec_ok, sec_fail, corrupted;
  int checks = 0, failures = 0, nok = 0, nfail = 0;

  security_check dut (.clk, .rst_n, .bit_en, .rx_bit, .pkt_start, .sec_ok, .sec_fail, .corrupted);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (sec_ok) nok++;
    if (sec_fail) nfail++;
  end

  task automatic send_bit(logic b);
    @(negedge clk); rx_bit = b; bit_en = 1;
    @(negedge clk); bit_en = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 40; p++) begin
      logic [7:0] code;
      int ok0, fail0;
      code = (p % 3 == 0) ? 8'($urandom) : 8'h88;
      if (p % 3 == 0 && code == 8'h88) code = 8'h89;
      ok0 = nok; fail0 = nfail;
      @(negedge clk); pkt_start = 1; @(negedge clk); pkt_start = 0;
      checks++;
      if (corrupted) begin failures++; $display("flag not cleared by preamble"); end
      send_bit(1); send_bit(0); send_bit(1); send_bit(1);
      for (int i = 7; i >= 0; i--) send_bit(code[i]);
      @(negedge clk);
      checks++;
      if (code == 8'h88) begin
        if (nok != ok0 + 1 || nfail != fail0 || corrupted) begin
          failures++; $display("good code rejected");
        end
      end else begin
        if (nok != ok0 || nfail != fail0 + 1 || !corrupted) begin
          failures++; $display("bad code %h accepted", code);
        end
      end
      // data bits afterwards do not change anything
      repeat (20) send_bit(1'($urandom));
      checks++;
      if (corrupted != (code != 8'h88) || nok + nfail != p + 1) begin
        failures++; $display("flag changed during packet data");
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
