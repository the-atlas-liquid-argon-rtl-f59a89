// tb_out_fpga: output FPGA as a whole: TTC frames to McBSP0/1, control
// register bits to the DSP/InFPGA lines, InFPGA configuration and programming
// (data0/dclk), the output-FIFO read counter with its interrupt every 256
// words, its GP13 clear and the status register view of it, and the LEDs.
`timescale 1ns/1ps
module tb_out_fpga;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic ttc_bcid_frame = 0, ttc_bcid_data = 0, ttc_ttype_frame = 0, ttc_ttype_data = 0;
  logic mcbsp0_fs, mcbsp0_dx, mcbsp1_fs, mcbsp1_dx;
  logic [4:0] addr = 0; logic wr = 0, rd = 0; logic [31:0] wdata = 0, rdata;
  logic [1:0] dsp_reset, fifo_reset, infpga_reset, hpi_reset, hpi_burst, dsp_launch;
  logic [1:0] hpi_wr, hpi_rd, cfg_wr_tgl, infpga_nconfig, infpga_dclk, infpga_data0, fifo_int;
  logic [1:0] fifo_rd = 0, mcbsp2_fsx, mcbsp2_dx;
  logic [31:0] hpi_wdata, hpi_rdata [2], infpga_status [2];
  logic [15:0] cfg_wdata [2];
  logic [4:0]  fifo_flags [2];
  logic [2:0]  gp11_13 [2];
  logic [3:0]  tp;
  logic [1:0]  gp6, gp14;
  logic ttc_frame_err, ttc_overflow, led1, led2;

  out_fpga dut (.clk, .rst_n, .ttc_bcid_frame, .ttc_bcid_data, .ttc_ttype_frame, .ttc_ttype_data,
    .mcbsp0_fs, .mcbsp0_dx, .mcbsp1_fs, .mcbsp1_dx, .addr, .wr, .rd, .wdata, .rdata,
    .dsp_reset, .fifo_reset, .infpga_reset, .hpi_reset, .hpi_burst, .dsp_launch, .hpi_wr,
    .hpi_wdata, .hpi_rd, .hpi_rdata, .hpi_int(2'b00), .hpi_ready(2'b11), .cfg_wdata, .cfg_wr_tgl,
    .infpga_status, .infpga_nconfig, .infpga_dclk, .infpga_data0, .infpga_nstatus(2'b11),
    .infpga_confdone(2'b00), .fifo_flags, .fifo_rd, .fifo_int, .gp11_13, .mcbsp2_fsx,
    .mcbsp2_dx, .mcbsp2_fsr(2'b00), .mcbsp2_dr(2'b00), .ttc_frame_err, .ttc_overflow,
    .led1, .led2, .tp, .gp6, .gp14);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic vwrite(int a, logic [31:0] v);
    @(negedge clk) addr = 5'(a); wdata = v; wr = 1;
    @(negedge clk) wr = 0;
  endtask
  task automatic vread(int a, output logic [31:0] v);
    @(negedge clk) addr = 5'(a); rd = 1;
    #1 v = rdata;
    @(negedge clk) rd = 0;
  endtask

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
  // data0 sampled on dclk rising edges of InFPGA 2
  logic [7:0] prog_bits; int nprog = 0; logic dclk_q = 0;
  always @(posedge clk) begin
    if (rst_n && infpga_dclk[1] && !dclk_q) begin prog_bits[nprog % 8] = infpga_data0[1]; nprog++; end
    dclk_q <= infpga_dclk[1];
  end
  int ints = 0;
  always @(posedge clk) if (rst_n && fifo_int[0]) ints++;

  initial begin
    logic [31:0] v;
    logic [43:0] bw = {12'hABC, 32'h0001_2345};
    hpi_rdata[0] = 0; hpi_rdata[1] = 0;
    infpga_status[0] = 32'h0355_FF45; infpga_status[1] = 32'h0355_FF45;
    fifo_flags[0] = 5'b01001; fifo_flags[1] = 5'b00001;
    gp11_13[0] = 3'b000; gp11_13[1] = 3'b000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // TTC
    fork
      begin
        @(negedge clk) ttc_bcid_frame = 1;
        @(negedge clk) ttc_bcid_frame = 0;
        for (int i = 43; i >= 0; i--) begin ttc_bcid_data = bw[i]; @(negedge clk); end
        ttc_bcid_data = 0;
      end
      begin
        repeat (10) @(negedge clk);
        @(negedge clk) ttc_ttype_frame = 1;
        @(negedge clk) ttc_ttype_frame = 0;
        for (int i = 7; i >= 0; i--) begin ttc_ttype_data = 8'h96 >> i; @(negedge clk); end
        ttc_ttype_data = 0;
      end
    join
    repeat (60) @(negedge clk);
    check(b_got.size() == 1 && b_got[0] == bw, "BCID/EVTID frame on McBSP0");
    check(t_got.size() == 1 && t_got[0] == 8'h96, "trigger type on McBSP1");
    // control register bits
    vwrite(1, 32'h0000_0045);
    vwrite(17, 32'h0000_003A);
    check(dsp_reset == 2'b01 && fifo_reset == 2'b10 && infpga_reset == 2'b01 &&
          hpi_reset == 2'b10 && hpi_burst == 2'b10 && dsp_launch == 2'b10 &&
          infpga_nconfig == 2'b01, "control bits to the lines");
    vwrite(23, 32'h0000_FF47);
    check(cfg_wdata[1] == 16'hFF47 && cfg_wr_tgl == 2'b10, "InFPGA2 configuration");
    vwrite(24, 32'h6900_0000);
    repeat (80) @(negedge clk);
    check(nprog == 8 && prog_bits == 8'h69, $sformatf("InFPGA2 programmed byte %h (%0d bits)", prog_bits, nprog));
    // output FIFO read counter
    for (int k = 0; k < 255; k++) begin @(negedge clk) fifo_rd = 2'b01; end
    @(negedge clk) fifo_rd = 0;
    repeat (2) @(negedge clk);
    check(ints == 0, "no FIFO counter interrupt before 256 words");
    for (int k = 0; k < 45; k++) begin @(negedge clk) fifo_rd = 2'b01; end
    @(negedge clk) fifo_rd = 0;
    repeat (2) @(negedge clk);
    check(ints == 1, "FIFO counter interrupt after 256 words");
    vread(3, v);
    check({v[14:13], v[7:0]} == 10'd300, $sformatf("FIFO counter in status: %0d", {v[14:13], v[7:0]}));
    check(v[8] && v[11] && v[27], "FIFO flags in status");
    @(negedge clk) gp11_13[0] = 3'b100;
    @(negedge clk) gp11_13[0] = 3'b000;
    vread(3, v);
    check({v[14:13], v[7:0]} == 10'd0, "GP13 clears the FIFO counter");
    check(led1 && led2, "LEDs show FIFO 1 empty and almost full");
    check(gp6 == 2'b01 && gp14 == 2'b11, "almost full on GP6, empty on GP14");
    fork
      vwrite(1, 32'h0000_0045);
      begin @(negedge clk); #1 check(tp[3], "register access on the test point"); end
    join
    @(negedge clk) check(!tp[3], "test point quiet without access");
    check(!ttc_frame_err && !ttc_overflow, "no TTC errors");
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
