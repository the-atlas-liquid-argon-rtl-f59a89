// tb_infpga_programmer: writes configuration bytes and samples data0 on each
// rising dclk edge; checks the bits (LSB first), the 5 MHz dclk period (8
// system clocks) and that a byte written while busy is ignored.
`timescale 1ns/1ps
module tb_infpga_programmer;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  logic load = 0, busy, dclk, data0;
  logic [7:0] byte_in = 0;

  infpga_programmer dut (.clk, .rst_n, .load, .byte_in, .busy, .dclk, .data0);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] bits[$];
  int cyc = 0, last_rise = -1, periods_bad = 0, rises = 0;
  logic dclk_q = 0;
  logic [7:0] cur; int nb = 0;
  always @(posedge clk) begin
    cyc++;
    if (dclk && !dclk_q) begin
      if (last_rise >= 0 && nb != 0 && cyc - last_rise != 8) periods_bad++;
      last_rise = cyc;
      cur[nb] = data0; nb++;
      rises++;
      if (nb == 8) begin bits.push_back(cur); nb = 0; end
    end
    dclk_q <= dclk;
  end

  task automatic send(logic [7:0] b);
    @(negedge clk) load = 1; byte_in = b;
    @(negedge clk) load = 0;
    @(negedge clk iff !busy);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    send(8'hA5); send(8'h3C); send(8'h01);
    // write during busy is dropped
    @(negedge clk) load = 1; byte_in = 8'h77;
    @(negedge clk) load = 0;
    repeat (5) @(negedge clk);
    @(negedge clk) load = 1; byte_in = 8'hEE;   // busy: ignored
    @(negedge clk) load = 0;
    @(negedge clk iff !busy);
    repeat (20) @(negedge clk);
    check(bits.size() == 4, $sformatf("%0d bytes shifted", bits.size()));
    if (bits.size() == 4) begin
      check(bits[0] == 8'hA5, "byte 0");
      check(bits[1] == 8'h3C, "byte 1");
      check(bits[2] == 8'h01, "byte 2");
      check(bits[3] == 8'h77, "byte 3, the busy write dropped");
    end
    check(periods_bad == 0, "dclk period is 8 clocks (5 MHz)");
    check(rises == 32, "one dclk edge per bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
