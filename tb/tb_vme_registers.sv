// tb_vme_registers: register map of the output FPGA for both DSP blocks:
// test/control read-back, status bit positions, HPI and programming strobes
// (single and broadcast), configuration toggle, McBSP2 transmit framing and
// the 32-word McBSP2 receive FIFO with its count, almost-full and full flags.
`timescale 1ns/1ps
module tb_vme_registers;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic [4:0]  addr = 0;
  logic        wr = 0, rd = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] control [2], hpi_rdata [2], infpga_status [2];
  logic [1:0]  hpi_wr, hpi_rd, cfg_wr_tgl, prog_load, mcbsp2_fsx, mcbsp2_dx;
  logic [1:0]  mcbsp2_fsr = 0, mcbsp2_dr = 0;
  logic [31:0] hpi_wdata;
  logic [15:0] cfg_wdata [2];
  logic [7:0]  prog_byte;
  logic [4:0]  fifo_flags [2];
  logic [9:0]  fifo_count [2];
  logic [2:0]  gp11_13 [2];

  vme_registers #(.VERSION(32'h0000_0042)) dut (
    .clk, .rst_n, .addr, .wr, .rd, .wdata, .rdata, .control, .hpi_wr, .hpi_wdata,
    .hpi_rd, .hpi_rdata, .hpi_int(2'b01), .hpi_ready(2'b10), .cfg_wdata, .cfg_wr_tgl,
    .prog_load, .prog_byte, .infpga_status, .infpga_nstatus(2'b11), .infpga_confdone(2'b01),
    .fifo_flags, .fifo_count, .gp11_13, .mcbsp2_fsx, .mcbsp2_dx, .mcbsp2_fsr, .mcbsp2_dr);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int hpi_wr_n [2] = '{0, 0}, prog_n [2] = '{0, 0};
  always @(posedge clk) for (int i = 0; i < 2; i++) begin
    if (hpi_wr[i]) hpi_wr_n[i]++;
    if (prog_load[i]) prog_n[i]++;
  end

  task automatic vwrite(int a, logic [31:0] v);
    @(negedge clk) addr = 5'(a); wdata = v; wr = 1;
    @(negedge clk) wr = 0;
  endtask
  task automatic vread(int a, output logic [31:0] v);
    @(negedge clk) addr = 5'(a); rd = 1;
    #1 v = rdata;
    @(negedge clk) rd = 0;
  endtask

  task automatic dsp_send(int i, logic [31:0] w);
    @(negedge clk) mcbsp2_fsr[i] = 1;
    @(negedge clk) mcbsp2_fsr[i] = 0;
    for (int b = 31; b >= 0; b--) begin mcbsp2_dr[i] = w[b]; @(negedge clk); end
  endtask

  logic [31:0] dsp_got [2][$];
  for (genvar i = 0; i < 2; i++) begin : g_mon
    initial forever begin
      logic [31:0] w;
      @(posedge clk iff (rst_n && mcbsp2_fsx[i]));
      for (int b = 31; b >= 0; b--) begin @(posedge clk); w[b] = mcbsp2_dx[i]; end
      dsp_got[i].push_back(w);
    end
  end

  initial begin
    logic [31:0] v;
    hpi_rdata[0] = 32'h1111_0000; hpi_rdata[1] = 32'h2222_0000;
    infpga_status[0] = 32'h0355_FF45; infpga_status[1] = 32'h0355_FF43;
    fifo_flags[0] = 5'b00001; fifo_flags[1] = 5'b11000;
    fifo_count[0] = 10'h2A5; fifo_count[1] = 10'h1FF;
    gp11_13[0] = 3'b101; gp11_13[1] = 3'b010;
    repeat (3) @(negedge clk);
    rst_n = 1;
    vwrite(0, 32'hDEAD_BEEF); vwrite(16, 32'h1234_5678);
    vread(0, v);  check(v == 32'hDEAD_BEEF, "test register 1");
    vread(16, v); check(v == 32'h1234_5678, "test register 2");
    vwrite(1, 32'h0000_0045); vwrite(17, 32'h0000_0002);
    check(control[0] == 32'h45 && control[1] == 32'h2, "control registers");
    vread(17, v); check(v == 32'h2, "control 2 read back");
    vread(11, v); check(v == 32'h42, "version");
    vread(27, v); check(v == 32'h42, "version, second block");
    vread(9, v);  check(v == 32'h0355_FF45, "InFPGA1 status");
    vread(25, v); check(v == 32'h0355_FF43, "InFPGA2 status");
    vread(3, v);
    check(v == 32'hDD20_41A5, $sformatf("status 1 = %h", v));
    vread(19, v);
    check(v == 32'h6220_38FF, $sformatf("status 2 = %h", v));
    vwrite(2, 32'h0000_ABCD);
    vwrite(4, 32'h0000_0001);
    check(hpi_wr_n[0] == 2 && hpi_wr_n[1] == 1, "HPI write strobes and broadcast");
    vread(18, v); check(v == 32'h2222_0000, "HPI read, DSP2");
    vwrite(7, 32'h0000_FF43);
    check(cfg_wdata[0] == 16'hFF43 && cfg_wr_tgl == 2'b01, "InFPGA1 configuration");
    vwrite(24, 32'h5A00_0000);
    check(prog_n[0] == 0 && prog_n[1] == 1 && prog_byte == 8'h5A, "InFPGA2 programming byte");
    vwrite(10, 32'hC300_0000);
    check(prog_n[0] == 1 && prog_n[1] == 2, "broadcast programming");
    // McBSP2 to the DSPs
    vwrite(5, 32'hCAFE_0001);
    vwrite(21, 32'hCAFE_0002);
    repeat (40) @(negedge clk);
    check(dsp_got[0].size() == 1 && dsp_got[0][0] == 32'hCAFE_0001, "McBSP2 frame to DSP1");
    check(dsp_got[1].size() == 1 && dsp_got[1][0] == 32'hCAFE_0002, "McBSP2 frame to DSP2");
    // McBSP2 from DSP1: 25 words -> almost full, 32 -> full, 33rd dropped
    for (int k = 0; k < 25; k++) dsp_send(0, 32'h100 + k);
    repeat (3) @(negedge clk);
    vread(3, v); check(v[20:16] == 5'd25 && v[22] && !v[23] && !v[21], $sformatf("25 words: %h", v));
    for (int k = 25; k < 33; k++) dsp_send(0, 32'h100 + k);
    repeat (3) @(negedge clk);
    vread(3, v); check(v[23] && v[22], "McBSP2 FIFO full at 32 words");
    for (int k = 0; k < 32; k++) begin
      vread(6, v); check(v == 32'h100 + k, $sformatf("McBSP2 word %0d = %h", k, v));
    end
    vread(3, v); check(v[21] && v[20:16] == 0, "McBSP2 FIFO empty after reading");
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
