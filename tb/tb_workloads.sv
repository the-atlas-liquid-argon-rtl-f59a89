// tb_workloads: the event sizes and the trigger rate the input FPGA must
// handle, run on three input FPGAs built for formats 0, 2 and 1.
//
// Sizes: every (samples, gains) pair of the format 0 and format 2 size
// tables (3, 5, 7, 16, 32 samples with 1 or 3 gains) is configured over the
// configuration port and sent as one FEB event to the format 0 and the
// format 2 FPGA at the same time. The row count of the reference layout is
// compared with the table value, each FPGA must deliver the event in
// ceil(rows / 256) chunks, one interrupt each, and every row is compared.
// The format 1 FPGA gets one 5-sample, 1-gain event of 195 rows.
//
// Rate: twenty 5-sample events are sent back to back (800 FEB clocks each,
// i.e. 10 us at 80 MHz = 100 kHz) to the format 0 FPGA while the DSP model
// reads each bank as soon as it is announced; no event may be dropped and
// the interrupts must come exactly 10 us apart. Staging mode: ten events
// back to back on both links of the format 0 FPGA at once, with the DSP model
// serving both channels over the shared data bus; again nothing may be
// dropped and each channel must raise ten interrupts.
`timescale 1ns/1ps
module tb_workloads;
  import rod_pkg::*;
  import feb_tb_pkg::*;

  localparam int NI = 3;
  localparam logic [1:0] FMT [NI] = '{2'd0, 2'd2, 2'd1};

  logic feb_clk = 0, emif_clk = 0, rst_n = 0;
  always #6.25 feb_clk = ~feb_clk;
  always #4.1667 emif_clk = ~emif_clk;

  logic [16:0] feb [NI][2];
  logic [1:0]  ce_n [NI], dsp_int [NI], overflow [NI];
  logic        are_n [NI], ed_valid [NI];
  logic [63:0] ed [NI];
  logic [31:0] status_reg [NI], evt_status [NI][2];
  logic [15:0] cfg_wdata = 16'hFF45;
  logic        cfg_wr_tgl = 0;

  for (genvar i = 0; i < NI; i++) begin : g_dut
    logic tinp1, led1, led2, tp_evt1, tp_rd1, tp_busy, tp_5mhz, pu_irq, pu_busy;
    in_fpga #(.FORMAT(FMT[i])) dut (
      .feb_clk, .emif_clk, .rst_n, .feb_data(feb[i]), .link_locked(2'b11), .cfg_wdata,
      .cfg_wr_tgl, .status_reg(status_reg[i]), .ce_n(ce_n[i]), .are_n(are_n[i]), .ed(ed[i]),
      .ed_valid(ed_valid[i]), .dsp_int(dsp_int[i]), .tinp1, .evt_status(evt_status[i]),
      .overflow(overflow[i]), .gp0(1'b0), .gp3(1'b0), .gp9(1'b0), .gp10(1'b0), .pu_irq, .pu_busy,
      .led1, .led2, .tp_evt1, .tp_rd1, .tp_busy, .tp_5mhz);
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ints [NI][2], used [NI][2], drops = 0;
  realtime int_time [$];
  always @(posedge emif_clk)
    for (int i = 0; i < NI; i++)
      for (int f = 0; f < 2; f++) if (rst_n && dsp_int[i][f]) begin
        ints[i][f]++;
        if (i == 0 && f == 0) int_time.push_back($realtime);
      end
  always @(posedge feb_clk)
    for (int i = 0; i < NI; i++) if (rst_n && overflow[i] != 2'b00) drops++;
  // one reader at a time on an FPGA's data bus
  semaphore bus [NI];

  // FEB link f of FPGA i; tail = idle clocks after the event
  task automatic drive_feb(int i, int ns, int ng, int evt, int bcid, int tail, int f = 0);
    int nw = words_per_adc(ns, ng);
    logic [15:0] slot [16];
    for (int n = 0; n < nw; n++) begin
      for (int a = 0; a < 16; a++) slot[a] = gen_word(a, n, ns, ng, evt, bcid);
      for (int k = 0; k < 16; k++) @(negedge feb_clk) feb[i][f] = bus_value(slot, k);
    end
    for (int k = 0; k < tail; k++) @(negedge feb_clk) feb[i][f] = {~feb[i][f][16], 16'h0};
  endtask

  // DSP of FPGA i, channel f: one interrupt per chunk of at most 256 rows;
  // the staged channel (f = 1) carries status bit 15
  task automatic dsp_event(int i, int ns, int ng, int evt, int bcid, output int nchunks, input int f = 0);
    logic [63:0] exp_rows[$];
    int done = 0;
    expected_rows(int'(FMT[i]), ns, ng, evt, bcid, f ? 32'h0000_8000 : 32'h0, exp_rows);
    nchunks = 0;
    while (done < exp_rows.size()) begin
      int n = exp_rows.size() - done, got = 0, guard = 0;
      if (n > 256) n = 256;
      wait (ints[i][f] > used[i][f]);
      used[i][f]++;
      nchunks++;
      bus[i].get(1);
      fork
        begin
          for (int r = 0; r < n; r++) @(negedge emif_clk) begin ce_n[i] = f ? 2'b01 : 2'b10; are_n[i] = 0; end
          @(negedge emif_clk) begin ce_n[i] = 2'b11; are_n[i] = 1; end
        end
        while (got < n && guard < n + 50) begin
          @(posedge emif_clk); #0.1;
          guard++;
          if (ed_valid[i]) begin
            if (ed[i] != exp_rows[done + got])
              check(0, $sformatf("format %0d %0dx%0d row %0d: %h expected %h", FMT[i], ns, ng,
                                 done + got, ed[i], exp_rows[done + got]));
            got++;
          end
        end
      join
      bus[i].put(1);
      check(got == n, $sformatf("format %0d %0dx%0d chunk %0d: %0d of %0d rows", FMT[i], ns, ng,
                                nchunks, got, n));
      done += n;
    end
  endtask

  task automatic configure(int ns, int ng);
    @(negedge feb_clk) begin cfg_wdata = {8'hFF, 2'(ng), 6'(ns)}; cfg_wr_tgl = ~cfg_wr_tgl; end
    repeat (8) @(negedge feb_clk);
  endtask

  // sizes printed in the format 0 and format 2 size tables
  int sizes_ns [5] = '{3, 5, 7, 16, 32};
  int f0_g1 [5] = '{121, 193, 265, 589, 1165};
  int f0_g3 [5] = '{313, 513, 713, 1613, 3213};
  int f2_g1 [5] = '{111, 183, 255, 579, 1155};
  int f2_g3 [5] = '{303, 503, 703, 1603, 3203};

  initial begin
    int evt = 1;
    for (int i = 0; i < NI; i++) begin
      feb[i][0] = '0; feb[i][1] = '0; ce_n[i] = 2'b11; are_n[i] = 1;
      ints[i][0] = 0; ints[i][1] = 0; used[i][0] = 0; used[i][1] = 0;
      bus[i] = new(1);
    end
    repeat (4) @(negedge feb_clk);
    rst_n = 1;
    repeat (4) @(negedge feb_clk);

    // ---- sizes, formats 0 and 2 ----
    for (int g = 0; g < 2; g++)
      for (int k = 0; k < 5; k++) begin
        int ns, ng, c0, c2;
        logic [63:0] r0[$], r2[$];
        ns = sizes_ns[k];
        ng = g ? 3 : 1;
        r0.delete();
        r2.delete();
        expected_rows(0, ns, ng, evt, evt + 7, 32'h0, r0);
        expected_rows(2, ns, ng, evt, evt + 7, 32'h0, r2);
        check(r0.size() == (g ? f0_g3[k] : f0_g1[k]), $sformatf("format 0 %0dx%0d: %0d rows", ns, ng, r0.size()));
        check(r2.size() == (g ? f2_g3[k] : f2_g1[k]), $sformatf("format 2 %0dx%0d: %0d rows", ns, ng, r2.size()));
        configure(ns, ng);
        check(status_reg[0][15:0] == {8'hFF, 2'(ng), 6'(ns)}, "configuration taken");
        fork
          drive_feb(0, ns, ng, evt, evt + 7, 40);
          drive_feb(1, ns, ng, evt, evt + 7, 40);
          dsp_event(0, ns, ng, evt, evt + 7, c0);
          dsp_event(1, ns, ng, evt, evt + 7, c2);
        join
        check(c0 == (r0.size() + 255) / 256, $sformatf("format 0 %0dx%0d in %0d chunks", ns, ng, c0));
        check(c2 == (r2.size() + 255) / 256, $sformatf("format 2 %0dx%0d in %0d chunks", ns, ng, c2));
        check(evt_status[0][0] == 32'h0 && evt_status[1][0] == 32'h0, "clean status");
        evt++;
      end

    // ---- format 1, 5 samples x 1 gain ----
    configure(5, 1);
    begin
      int c1;
      fork
        drive_feb(2, 5, 1, evt, 'h55, 40);
        dsp_event(2, 5, 1, evt, 'h55, c1);
      join
      check(c1 == 1, "format 1 event in one bank");
      evt++;
    end

    // ---- 100 kHz: back-to-back 5x1 events on the format 0 FPGA ----
    int_time.delete();
    begin
      int c;
      fork
        begin
          for (int e = 0; e < 20; e++) drive_feb(0, 5, 1, evt + e, 'h100 + e, e == 19 ? 40 : 0);
        end
        for (int e = 0; e < 20; e++) dsp_event(0, 5, 1, evt + e, 'h100 + e, c);
      join
    end
    check(drops == 0, $sformatf("no event dropped (%0d)", drops));
    check(int_time.size() >= 20, $sformatf("%0d interrupts at 100 kHz", int_time.size()));
    for (int e = 1; e < 20 && e < int_time.size(); e++)
      check(int_time[e] - int_time[e - 1] > 9990.0 && int_time[e] - int_time[e - 1] < 10010.0,
            $sformatf("event %0d follows after %0.1f ns", e, int_time[e] - int_time[e - 1]));
    evt += 20;

    // ---- staging mode: both links of the format 0 FPGA at 100 kHz ----
    begin
      int c, i0, i1;
      i0 = ints[0][0];
      i1 = ints[0][1];
      fork
        for (int e = 0; e < 10; e++) drive_feb(0, 5, 1, evt + e, 'h200 + e, e == 9 ? 40 : 0, 0);
        for (int e = 0; e < 10; e++) drive_feb(0, 5, 1, evt + e, 'h200 + e, e == 9 ? 40 : 0, 1);
        for (int e = 0; e < 10; e++) dsp_event(0, 5, 1, evt + e, 'h200 + e, c, 0);
        for (int e = 0; e < 10; e++) dsp_event(0, 5, 1, evt + e, 'h200 + e, c, 1);
      join
      check(drops == 0, $sformatf("staging: no event dropped (%0d)", drops));
      check(ints[0][0] - i0 == 10 && ints[0][1] - i1 == 10,
            $sformatf("staging: %0d and %0d interrupts", ints[0][0] - i0, ints[0][1] - i1));
    end
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
