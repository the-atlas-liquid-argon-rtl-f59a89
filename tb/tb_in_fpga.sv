// tb_in_fpga: two FEBs sending events at the same time, with a small offset,
// into the input FPGA (format 0); the testbench plays the DSP: it waits for
// each FEB's interrupt, reads the bank through that FEB's chip enable and
// compares every 64-bit row with the reference layout (including the status
// row with the FEB identifier bit). Then it rewrites the configuration
// register to 3 samples and checks the next event's length and contents.
`timescale 1ns/1ps
module tb_in_fpga;
  import rod_pkg::*;
  import feb_tb_pkg::*;

  logic feb_clk = 0, emif_clk = 0, rst_n = 0;
  always #6.25 feb_clk = ~feb_clk;
  always #4.1667 emif_clk = ~emif_clk;

  logic [16:0] feb_data [2];
  logic [1:0]  link_locked = 2'b11, ce_n = 2'b11, dsp_int, overflow;
  logic [15:0] cfg_wdata = 0;
  logic        cfg_wr_tgl = 0, are_n = 1, ed_valid, tinp1, led1, led2, tp_evt1, tp_rd1, tp_busy;
  logic        tp_5mhz, pu_irq, pu_busy;
  logic [31:0] status_reg, evt_status [2];
  logic [63:0] ed;

  in_fpga dut (.feb_clk, .emif_clk, .rst_n, .feb_data, .link_locked, .cfg_wdata,
               .cfg_wr_tgl, .status_reg, .ce_n, .are_n, .ed, .ed_valid, .dsp_int,
               .tinp1, .evt_status, .overflow, .gp0(1'b1), .gp3(1'b0), .gp9(1'b1), .gp10(1'b0),
               .pu_irq, .pu_busy, .led1, .led2, .tp_evt1, .tp_rd1, .tp_busy, .tp_5mhz);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ints [2] = '{0, 0};
  always @(posedge emif_clk) for (int f = 0; f < 2; f++) if (rst_n && dsp_int[f]) ints[f]++;

  task automatic drive_feb(int f, int ns, int ng, int evt, int bcid, int delay);
    int nw = words_per_adc(ns, ng);
    logic [15:0] slot [16];
    repeat (delay) @(negedge feb_clk) feb_data[f] = {~feb_data[f][16], 16'h0};
    for (int n = 0; n < nw; n++) begin
      for (int a = 0; a < 16; a++) slot[a] = gen_word(a, n, ns, ng, evt, bcid);
      for (int k = 0; k < 16; k++) @(negedge feb_clk) feb_data[f] = bus_value(slot, k);
    end
    for (int k = 0; k < 32; k++) @(negedge feb_clk) feb_data[f] = {1'(k % 2 == 0), 16'h0};
  endtask

  task automatic dsp_read(int f, int ns, int ng, int evt, int bcid, logic [31:0] st);
    logic [63:0] exp_rows[$];
    int got = 0, n;
    expected_rows(0, ns, ng, evt, bcid, st, exp_rows);
    n = exp_rows.size();
    fork
      begin
        for (int i = 0; i < n; i++) begin
          @(negedge emif_clk) ce_n[f] = 0; are_n = 0;
        end
        @(negedge emif_clk) ce_n[f] = 1; are_n = 1;
      end
      begin
        int guard = 0;
        while (got < n && guard < n + 50) begin
          @(posedge emif_clk); #0.1;
          guard++;
          if (ed_valid) begin
            check(ed == exp_rows[got], $sformatf("FEB%0d row %0d: %h expected %h", f + 1, got, ed, exp_rows[got]));
            got++;
          end
        end
      end
    join
    check(got == n, $sformatf("FEB%0d: %0d of %0d rows", f + 1, got, n));
  endtask

  initial begin
    feb_data[0] = '0; feb_data[1] = '0;
    repeat (4) @(negedge feb_clk);
    rst_n = 1;
    repeat (4) @(negedge feb_clk);
    check(status_reg == 32'h0355_FF45, "configuration register resets to FF45");
    check(tinp1, "link locked AND");
    fork
      drive_feb(0, 5, 1, 11, 'h123, 2);
      drive_feb(1, 5, 1, 11, 'h123, 7);
    join
    repeat (40) @(negedge emif_clk);
    check(ints[0] == 1 && ints[1] == 1, "one interrupt per FEB");
    dsp_read(0, 5, 1, 11, 'h123, 32'h0000_0000);
    dsp_read(1, 5, 1, 11, 'h123, 32'h0000_8000);
    // three samples
    cfg_wdata = 16'hFF43; cfg_wr_tgl = 1;
    repeat (10) @(negedge feb_clk);
    check(status_reg[15:0] == 16'hFF43, "configuration register written");
    drive_feb(0, 3, 1, 12, 'h45, 3);
    repeat (40) @(negedge emif_clk);
    check(ints[0] == 2, "interrupt for the 3-sample event");
    dsp_read(0, 3, 1, 12, 'h45, 32'h0000_0000);
    check(overflow == 2'b00 && !tp_busy, "no overflow");
    check(pu_irq && !pu_busy, "PU IRQ and BUSY lines passed on");
    begin
      realtime t0, t1;
      @(posedge tp_5mhz) t0 = $realtime;
      @(posedge tp_5mhz) t1 = $realtime;
      check(t1 - t0 > 199.0 && t1 - t0 < 201.0, $sformatf("watchdog clock period %0.1f ns", t1 - t0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge feb_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
