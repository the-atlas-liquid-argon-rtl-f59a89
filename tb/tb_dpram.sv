// tb_dpram: writes lanes of the dual-clock RAM on one clock, reads them back on
// another and checks the merged words and the one-clock read latency.
`timescale 1ns/1ps
module tb_dpram;
  logic wclk = 0, rclk = 0;
  always #6.25 wclk = ~wclk;     // 80 MHz
  always #4.1667 rclk = ~rclk;   // 120 MHz
  logic [8:0] waddr = '0, raddr = '0;
  logic [3:0] wlane = '0;
  logic [63:0] wdata = '0, rdata;
  logic re = 0;
  logic [63:0] model [512];
  int checks = 0, failures = 0;

  dpram dut (.wclk, .waddr, .wlane, .wdata, .rclk, .re, .raddr, .rdata);

  initial begin
    for (int i = 0; i < 512; i++) begin
      @(negedge wclk);
      waddr = 9'(i); wlane = 4'hF; wdata = {16'(i), 16'(i * 3), 16'(i * 5), 16'(i * 7)};
      model[i] = wdata;
    end
    // partial lane writes
    for (int i = 0; i < 512; i += 3) begin
      @(negedge wclk);
      waddr = 9'(i); wlane = 4'(1 << (i % 4)); wdata = {4{16'(16'hA000 + i)}};
      for (int l = 0; l < 4; l++) if (wlane[l]) model[i][l*16 +: 16] = wdata[l*16 +: 16];
    end
    @(negedge wclk) wlane = '0;
    for (int i = 0; i < 512; i++) begin
      @(negedge rclk); re = 1; raddr = 9'(i);
      @(posedge rclk); #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++; $display("FAIL addr %0d got %h exp %h", i, rdata, model[i]);
      end
    end
    // with re low the output holds
    @(negedge rclk) re = 0; raddr = 9'd5;
    @(posedge rclk); #1;
    checks++; if (rdata !== model[511]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
