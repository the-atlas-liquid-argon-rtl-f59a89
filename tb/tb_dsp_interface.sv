// tb_dsp_interface: plays the writer (FEB clock) and the DSP (EMIFA clock).
// Checks the interrupt per filled bank, the sequential FIFO-like read order
// across both banks, the 2-clock read data latency and the bank release.
`timescale 1ns/1ps
module tb_dsp_interface;
  logic wclk = 0, clk = 0, rst_n = 0;
  always #6.25 wclk = ~wclk;
  always #4.1667 clk = ~clk;

  logic [1:0]  wr_done_tgl = 0, rd_free_tgl;
  logic [8:0]  bank_rows [2];
  logic        re, ce_n = 1, are_n = 1, ed_valid, dsp_int;
  logic [8:0]  raddr;
  logic [63:0] rdata, ed;
  logic [63:0] mem [512];

  dsp_interface dut (.clk, .rst_n, .wr_done_tgl, .bank_rows, .rd_free_tgl, .re,
                     .raddr, .rdata, .ce_n, .are_n, .ed, .ed_valid, .dsp_int);

  always_ff @(posedge clk) if (re) rdata <= mem[raddr];

  int checks = 0, failures = 0, ints = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (rst_n && dsp_int) ints++;

  // DSP reads n rows; checks values and that data comes 2 clocks after strobe
  task automatic dsp_read(int bank, int n);
    int strobe_cycle [$];
    int cyc = 0, got = 0;
    fork
      begin
        for (int i = 0; i < n; i++) begin
          @(negedge clk) ce_n = 0; are_n = 0;
        end
        @(negedge clk) ce_n = 1; are_n = 1;
      end
      begin
        while (got < n) begin
          @(posedge clk); #0.1;
          cyc++;
          if (ed_valid) begin
            check(ed == mem[bank*256 + got], $sformatf("bank %0d row %0d: %h", bank, got, ed));
            check(cyc == got + 3, $sformatf("row %0d arrived at %0d", got, cyc));
            got++;
          end
          if (cyc > n + 20) break;
        end
      end
    join
    check(got == n, $sformatf("read %0d of %0d rows", got, n));
  endtask

  initial begin
    for (int i = 0; i < 512; i++) mem[i] = {32'(i), 32'(~i)};
    bank_rows[0] = 9'd193; bank_rows[1] = 9'd40;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // reading with no bank ready fetches nothing
    @(negedge clk) ce_n = 0; are_n = 0;
    @(negedge clk) check(!re, "no read before a bank is ready"); ce_n = 1; are_n = 1;
    // bank 0 and then bank 1 filled
    @(negedge wclk) wr_done_tgl[0] = 1;
    @(negedge wclk) wr_done_tgl[1] = 1;
    repeat (6) @(negedge clk);
    check(ints == 1, "one interrupt for bank 0");
    dsp_read(0, 193);
    repeat (4) @(negedge clk);
    check(rd_free_tgl[0] == 1'b1, "bank 0 released");
    check(ints == 2, "interrupt for bank 1");
    dsp_read(1, 40);
    repeat (4) @(negedge clk);
    check(rd_free_tgl == 2'b11, "bank 1 released");
    // bank 0 again
    @(negedge wclk) wr_done_tgl[0] = 0;
    repeat (6) @(negedge clk);
    check(ints == 3, "interrupt for the refilled bank 0");
    dsp_read(0, 193);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
