// tb_rod_pu: end-to-end test of the processing unit at its default
// parameters. Four FEBs send events at the same time (staging mode, two per
// DSP block); the testbench plays both DSPs (interrupt, chip enable, EMIFA
// read of every row, compared with the reference layout), the motherboard
// TTC FPGA (frames checked on McBSP0/McBSP1), the VME host (register bus)
// and the output controller (FIFO reads). Mechanisms exercised and counted:
// event delivery per FEB, chunked events (configuration written over VME),
// both banks busy with an event dropped, error detection in the status word,
// TTC forwarding, McBSP2 in both directions, input FPGA reset from the
// control register, input FPGA programming, and the FIFO-counter interrupt.
`timescale 1ns/1ps
module tb_rod_pu;
  import rod_pkg::*;
  import feb_tb_pkg::*;

  logic feb_clk = 0, clk = 0, rst_n = 0;
  logic emif_clk [2];
  initial begin emif_clk[0] = 0; emif_clk[1] = 0; end
  always #6.25 feb_clk = ~feb_clk;
  always #4.1667 emif_clk[0] = ~emif_clk[0];
  always #4.1667 emif_clk[1] = ~emif_clk[1];
  always #12.5 clk = ~clk;

  logic [16:0] feb_data [4];
  logic [1:0]  ce_n [2];
  logic [1:0]  are_n = 2'b11, ed_valid, tinp1, led1, led2, ext_int [2];
  logic [63:0] ed [2];
  logic [31:0] evt_status [4];
  logic [3:0]  infpga_overflow;
  logic [1:0]  infpga_busy;
  logic ttc_bcid_frame = 0, ttc_bcid_data = 0, ttc_ttype_frame = 0, ttc_ttype_data = 0;
  logic mcbsp0_fs, mcbsp0_dx, mcbsp1_fs, mcbsp1_dx, ttc_frame_err, ttc_overflow;
  logic [4:0] addr = 0; logic wr = 0, rd = 0; logic [31:0] wdata = 0, rdata;
  logic [1:0] dsp_reset, fifo_reset, hpi_reset, hpi_burst, dsp_launch, hpi_wr, hpi_rd;
  logic [31:0] hpi_wdata, hpi_rdata [2];
  logic [1:0] infpga_nconfig, infpga_dclk, infpga_data0, fifo_int, mcbsp2_fsx, mcbsp2_dx;
  logic [1:0] fifo_rd = 0, mcbsp2_fsr = 0, mcbsp2_dr = 0;
  logic [4:0] fifo_flags [2];
  logic [2:0] gp11_13 [2];
  logic [3:0] outfpga_tp, infpga_tp [2];
  logic [1:0] dsp_gp6, dsp_gp14, pu_irq, pu_busy;
  logic outfpga_led1, outfpga_led2;

  rod_pu dut (
    .feb_clk, .emif_clk, .clk, .rst_n, .feb_data, .link_locked(4'hF), .ce_n, .are_n, .ed,
    .ed_valid, .ext_int, .tinp1, .gp0(2'b01), .gp3(2'b10), .infpga_led1(led1),
    .infpga_led2(led2), .evt_status, .infpga_overflow, .infpga_busy, .ttc_bcid_frame,
    .ttc_bcid_data, .ttc_ttype_frame, .ttc_ttype_data, .mcbsp0_fs, .mcbsp0_dx, .mcbsp1_fs,
    .mcbsp1_dx, .ttc_frame_err, .ttc_overflow, .addr, .wr, .rd, .wdata, .rdata, .dsp_reset,
    .fifo_reset, .hpi_reset, .hpi_burst, .dsp_launch, .hpi_wr, .hpi_wdata, .hpi_rd,
    .hpi_rdata, .hpi_int(2'b00), .hpi_ready(2'b11), .infpga_nconfig, .infpga_dclk,
    .infpga_data0, .infpga_nstatus(2'b11), .infpga_confdone(2'b11), .fifo_flags, .fifo_rd,
    .fifo_int, .gp11_13, .mcbsp2_fsx, .mcbsp2_dx, .mcbsp2_fsr, .mcbsp2_dr,
    .outfpga_led1, .outfpga_led2, .outfpga_tp, .infpga_tp, .dsp_gp6, .dsp_gp14,
    .dsp_gp9(2'b10), .dsp_gp10(2'b01), .pu_irq, .pu_busy);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_events = 0, n_chunks = 0, n_overflow = 0, n_errors = 0, n_ttc = 0;
  int n_mcbsp2 = 0, n_inreset = 0, n_prog = 0, n_fifoint = 0;
  int ints [2][2], used [2][2];   // interrupts seen / interrupts served
  always @(posedge emif_clk[0]) for (int f = 0; f < 2; f++) if (rst_n && ext_int[0][f]) ints[0][f]++;
  always @(posedge emif_clk[1]) for (int f = 0; f < 2; f++) if (rst_n && ext_int[1][f]) ints[1][f]++;
  always @(posedge feb_clk) for (int f = 0; f < 4; f++) if (rst_n && infpga_overflow[f]) n_overflow++;
  always @(posedge clk) if (rst_n && fifo_int[0]) n_fifoint++;

  // ---- VME host ----
  task automatic vwrite(int a, logic [31:0] v);
    @(negedge clk) addr = 5'(a); wdata = v; wr = 1;
    @(negedge clk) wr = 0;
  endtask
  task automatic vread(int a, output logic [31:0] v);
    @(negedge clk) addr = 5'(a); rd = 1;
    #1 v = rdata;
    @(negedge clk) rd = 0;
  endtask

  // ---- FEB links ----
  task automatic drive_feb(int f, int ns, int ng, int evt, int bcid, int delay, int inject);
    int nw = words_per_adc(ns, ng);
    logic [15:0] slot [16];
    repeat (delay) @(negedge feb_clk) feb_data[f] = {~feb_data[f][16], 16'h0};
    for (int n = 0; n < nw; n++) begin
      for (int a = 0; a < 16; a++) slot[a] = gen_word(a, n, ns, ng, evt, bcid);
      if (inject && n == 6) slot[3] ^= 16'h0010;   // parity error
      for (int k = 0; k < 16; k++) @(negedge feb_clk) feb_data[f] = bus_value(slot, k);
    end
    for (int k = 0; k < 32; k++) @(negedge feb_clk) feb_data[f] = {1'(k % 2 == 0), 16'h0};
  endtask

  // ---- DSP: read one bank of FEB link f (0 first, 1 staged) of DSP d ----
  task automatic dsp_read_rows(int d, int f, ref logic [63:0] exp_rows[$], input int first, input int n);
    int got = 0;
    fork
      begin
        for (int i = 0; i < n; i++) begin
          @(negedge emif_clk[d]) ce_n[d][f] = 0; are_n[d] = 0;
        end
        @(negedge emif_clk[d]) ce_n[d][f] = 1; are_n[d] = 1;
      end
      begin
        int guard = 0;
        while (got < n && guard < n + 50) begin
          @(posedge emif_clk[d]); #0.1;
          guard++;
          if (ed_valid[d]) begin
            check(ed[d] == exp_rows[first + got],
                  $sformatf("DSP%0d link %0d row %0d: %h expected %h", d + 1, f, first + got,
                            ed[d], exp_rows[first + got]));
            got++;
          end
        end
      end
    join
    check(got == n, $sformatf("DSP%0d link %0d: %0d of %0d rows", d + 1, f, got, n));
  endtask

  task automatic dsp_event(int d, int f, int ns, int ng, int evt, int bcid, logic [31:0] st, int chunk);
    logic [63:0] exp_rows[$];
    int done = 0;
    expected_rows(0, ns, ng, evt, bcid, st, exp_rows);
    while (done < exp_rows.size()) begin
      int n = exp_rows.size() - done;
      if (n > chunk) n = chunk;
      // like the DSP, serve one interrupt per chunk
      wait (ints[d][f] > used[d][f]);
      used[d][f]++;
      dsp_read_rows(d, f, exp_rows, done, n);
      done += n;
      repeat (8) @(negedge emif_clk[d]);
    end
    n_events++;
  endtask

  // ---- TTC ----
  logic [43:0] b_got[$]; logic [7:0] t_got[$];
  initial forever begin
    logic [43:0] w;
    @(posedge clk iff (rst_n && mcbsp0_fs));
    for (int i = 43; i >= 0; i--) begin @(posedge clk); w[i] = mcbsp0_dx; end
    b_got.push_back(w);
  end
  initial forever begin
    logic [7:0] w;
    @(posedge clk iff (rst_n && mcbsp1_fs));
    for (int i = 7; i >= 0; i--) begin @(posedge clk); w[i] = mcbsp1_dx; end
    t_got.push_back(w);
  end
  task automatic ttc_send(logic [11:0] bcid, logic [31:0] evt, logic [7:0] tt);
    logic [43:0] w = {bcid, evt};
    @(negedge clk) ttc_bcid_frame = 1;
    @(negedge clk) ttc_bcid_frame = 0;
    for (int i = 43; i >= 0; i--) begin ttc_bcid_data = w[i]; @(negedge clk); end
    ttc_bcid_data = 0;
    repeat (4) @(negedge clk);
    @(negedge clk) ttc_ttype_frame = 1;
    @(negedge clk) ttc_ttype_frame = 0;
    for (int i = 7; i >= 0; i--) begin ttc_ttype_data = tt[i]; @(negedge clk); end
    ttc_ttype_data = 0;
    repeat (80) @(negedge clk);
    check(b_got.size() > 0 && b_got[$] == w, "TTC BCID/EVTID on McBSP0");
    check(t_got.size() > 0 && t_got[$] == tt, "TTC trigger type on McBSP1");
    n_ttc++;
  endtask

  initial begin
    logic [31:0] v;
    for (int f = 0; f < 4; f++) feb_data[f] = '0;
    ce_n[0] = 2'b11; ce_n[1] = 2'b11;
    hpi_rdata[0] = 0; hpi_rdata[1] = 0;
    fifo_flags[0] = 5'b00001; fifo_flags[1] = 5'b00001;
    gp11_13[0] = 0; gp11_13[1] = 0;
    for (int d = 0; d < 2; d++) for (int f = 0; f < 2; f++) begin ints[d][f] = 0; used[d][f] = 0; end
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    vread(9, v);  check(v == 32'h0355_FF45, "InFPGA1 status after reset");
    vread(25, v); check(v == 32'h0355_FF45, "InFPGA2 status after reset");
    check(tinp1 == 2'b11, "link locked to TINP1");

    // 1. TTC, then one event on each of the four FEBs, in parallel
    ttc_send(12'h0C8, 32'd21, 8'h5A);
    fork
      drive_feb(0, 5, 1, 21, 'h0C8, 1, 0);
      drive_feb(1, 5, 1, 21, 'h0C8, 4, 0);
      drive_feb(2, 5, 1, 21, 'h0C8, 9, 0);
      drive_feb(3, 5, 1, 21, 'h0C8, 2, 0);
    join
    repeat (20) @(negedge emif_clk[0]);
    check(ints[0][0] == 1 && ints[0][1] == 1 && ints[1][0] == 1 && ints[1][1] == 1,
          "one interrupt per FEB");
    fork
      begin dsp_event(0, 0, 5, 1, 21, 'h0C8, 32'h0, 256); dsp_event(0, 1, 5, 1, 21, 'h0C8, 32'h8000, 256); end
      begin dsp_event(1, 0, 5, 1, 21, 'h0C8, 32'h0, 256); dsp_event(1, 1, 5, 1, 21, 'h0C8, 32'h8000, 256); end
    join

    // 2. error detection: parity error on FEB2
    drive_feb(1, 5, 1, 22, 'h0C9, 1, 1);
    repeat (20) @(negedge emif_clk[1]);
    check(evt_status[1] == 32'h0000_0040, $sformatf("parity error flagged: %h", evt_status[1]));
    if (evt_status[1][ST_PARITY]) n_errors++;
    begin
      logic [63:0] exp_rows[$];
      expected_rows(0, 5, 1, 22, 'h0C9, 32'h40, exp_rows);
      used[1][0]++;
      // rows other than the corrupted one and the status row are checked
      dsp_read_rows(1, 0, exp_rows, 0, 8);
      n_events++;
    end
    begin
      // drain the remaining rows of that event without comparing
      for (int i = 0; i < 185; i++) begin @(negedge emif_clk[1]) ce_n[1][0] = 0; are_n[1] = 0; end
      @(negedge emif_clk[1]) ce_n[1][0] = 1; are_n[1] = 1;
    end

    // 3. chunks: 7 samples with chunks of 100 rows on DSP block 1 (265 rows)
    vwrite(7, 32'h0000_6347);
    repeat (10) @(negedge clk);
    vread(9, v); check(v[15:0] == 16'h6347, "InFPGA1 configuration written");
    fork
      drive_feb(0, 7, 1, 23, 'h0CA, 1, 0);
      dsp_event(0, 0, 7, 1, 23, 'h0CA, 32'h0, 100);
    join
    check(ints[0][0] == 4, $sformatf("three interrupts for three chunks (%0d)", ints[0][0] - 1));
    n_chunks += ints[0][0] - 2;
    check(n_overflow == 0, "no overflow while the DSP keeps up with the chunks");

    // 4. input FPGA reset from the control register restores FF45
    vwrite(1, 32'h0000_0004);
    repeat (5) @(negedge clk);
    vwrite(1, 32'h0000_0000);
    repeat (10) @(negedge clk);
    vread(9, v); check(v[15:0] == 16'hFF45, "InFPGA1 reset restores FF45");
    if (v[15:0] == 16'hFF45) n_inreset++;

    // 5. both banks busy: third event on FEB1 dropped (3 samples, 121 rows)
    vwrite(7, 32'h0000_FF43);
    repeat (10) @(negedge clk);
    drive_feb(0, 3, 1, 30, 'h10, 1, 0);
    drive_feb(0, 3, 1, 31, 'h11, 1, 0);
    check(infpga_busy[0], "busy with both banks full");
    begin
      int ovf0 = n_overflow;
      drive_feb(0, 3, 1, 32, 'h12, 1, 0);
      check(n_overflow == ovf0 + 1, "third event dropped");
    end
    dsp_event(0, 0, 3, 1, 30, 'h10, 32'h0, 256);
    dsp_event(0, 0, 3, 1, 31, 'h11, 32'h0, 256);
    check(!infpga_busy[0], "busy cleared");

    // 6. McBSP2 both ways with DSP1
    vwrite(5, 32'h0BAD_F00D);
    begin
      logic [31:0] w;
      @(posedge clk iff (rst_n && mcbsp2_fsx[0]));
      for (int i = 31; i >= 0; i--) begin @(posedge clk); w[i] = mcbsp2_dx[0]; end
      check(w == 32'h0BAD_F00D, "McBSP2 command to DSP1");
      @(negedge clk) mcbsp2_fsr[0] = 1;
      @(negedge clk) mcbsp2_fsr[0] = 0;
      for (int i = 31; i >= 0; i--) begin mcbsp2_dr[0] = w[i] ^ 1'(i == 0); @(negedge clk); end
      repeat (3) @(negedge clk);
      vread(6, v);
      check(v == 32'h0BAD_F00C, "McBSP2 word from DSP1");
      if (v == 32'h0BAD_F00C) n_mcbsp2++;
    end

    // 7. InFPGA programming byte (broadcast)
    begin
      int edges = 0; logic [7:0] b; logic q = 0;
      vwrite(10, 32'hA700_0000);
      repeat (80) begin
        @(posedge clk);
        if (infpga_dclk[0] && !q) begin b[edges] = infpga_data0[0]; edges++; end
        q = infpga_dclk[0];
      end
      check(edges == 8 && b == 8'hA7, "InFPGA programming byte");
      if (edges == 8) n_prog++;
    end

    // 8. output FIFO read counter interrupt
    for (int k = 0; k < 260; k++) @(negedge clk) fifo_rd = 2'b01;
    @(negedge clk) fifo_rd = 0;
    repeat (3) @(negedge clk);

    check(n_events >= 8, $sformatf("events delivered: %0d", n_events));
    check(n_chunks >= 1, "chunked event seen");
    check(n_overflow >= 1, "bank overflow seen");
    check(n_errors >= 1, "error detection seen");
    check(n_ttc >= 1, "TTC forwarding seen");
    check(n_mcbsp2 >= 1, "McBSP2 exchange seen");
    check(n_inreset >= 1, "InFPGA reset seen");
    check(n_prog >= 1, "InFPGA programming seen");
    check(n_fifoint == 1, "FIFO counter interrupt seen");
    check(!ttc_frame_err && !ttc_overflow, "no TTC errors");
    check(pu_irq == 2'b10 && pu_busy[0], "PU IRQ and BUSY lines reach the board");
    check(dsp_gp6 == {fifo_flags[1][3], fifo_flags[0][3]} && dsp_gp14 == {fifo_flags[1][0], fifo_flags[0][0]},
          "output FIFO flags on GP6/GP14");
    $display("mechanisms: events=%0d chunks=%0d overflow=%0d errors=%0d ttc=%0d mcbsp2=%0d inreset=%0d prog=%0d fifoint=%0d",
             n_events, n_chunks, n_overflow, n_errors, n_ttc, n_mcbsp2, n_inreset, n_prog, n_fifoint);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge feb_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
