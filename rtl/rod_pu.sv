// rod_pu: the ROD processing-unit mezzanine (two DSP blocks, one output FPGA).
//
// Each DSP block is an input FPGA (in_fpga) that takes two FEB links in
// staging mode (block 0: FEB1 and FEB3, block 1: FEB2 and FEB4; in normal
// mode only the first link of a block carries data), checks and formats the
// events and presents them to its DSP on the 64-bit EMIFA bus with one
// interrupt and one chip enable per FEB. The output FPGA (out_fpga) receives
// the TTC frames and forwards them to both DSPs over McBSP0/McBSP1, and
// holds the VME registers: control (DSP/InFPGA resets, nconfig, HPI lines),
// status, McBSP2 links, InFPGA configuration and programming.
//
// The DSPs, the output FIFOs and the HPI protocol engine are outside this
// RTL: their signals are ports. The control register's "Input FPGA reset"
// bit holds the matching input FPGA in reset, and the input FPGA
// configuration registers are written from VME through the output FPGA.
// Each DSP's GP9/GP10 (PU IRQ, BUSY) leave through its input FPGA, and its
// output FIFO's almost-full and empty flags reach it on GP6 and GP14.
//
// Clocks: feb_clk 80 MHz (FEB links), emif_clk[d] 120 MHz (EMIFA of DSP d),
// clk 40 MHz (TTC and VME side). rst_n is the ROD general reset.
module rod_pu
  import rod_pkg::*;
#(
  parameter logic [1:0]  FORMAT          = 2'd0,
  parameter logic [15:0] INFPGA_VERSION  = 16'h0355,
  parameter logic [31:0] OUTFPGA_VERSION = 32'h0000_0001
) (
  input  logic        feb_clk,
  input  logic        emif_clk [2],
  input  logic        clk,
  input  logic        rst_n,
  // FEB links (index 0..3 = FEB1..FEB4) and link-locked flags
  input  logic [16:0] feb_data [4],
  input  logic [3:0]  link_locked,
  // EMIFA of each DSP
  input  logic [1:0]  ce_n [2],        // [d][0] = CE3 (first FEB), [d][1] = CE1 (staged FEB)
  input  logic [1:0]  are_n,
  output logic [63:0] ed [2],
  output logic [1:0]  ed_valid,
  output logic [1:0]  ext_int [2],     // [d][0] = EXT_INT4, [d][1] = EXT_INT5
  output logic [1:0]  tinp1,
  input  logic [1:0]  gp0,
  input  logic [1:0]  gp3,
  output logic [1:0]  infpga_led1,
  output logic [1:0]  infpga_led2,
  output logic [31:0] evt_status [4],  // last event status word per FEB (monitoring)
  output logic [3:0]  infpga_overflow,
  output logic [1:0]  infpga_busy,
  // TTC
  input  logic        ttc_bcid_frame,
  input  logic        ttc_bcid_data,
  input  logic        ttc_ttype_frame,
  input  logic        ttc_ttype_data,
  output logic        mcbsp0_fs,
  output logic        mcbsp0_dx,
  output logic        mcbsp1_fs,
  output logic        mcbsp1_dx,
  output logic        ttc_frame_err,
  output logic        ttc_overflow,
  // VME register bus
  input  logic [4:0]  addr,
  input  logic        wr,
  input  logic        rd,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  // DSP control and HPI traffic
  output logic [1:0]  dsp_reset,
  output logic [1:0]  fifo_reset,
  output logic [1:0]  hpi_reset,
  output logic [1:0]  hpi_burst,
  output logic [1:0]  dsp_launch,
  output logic [1:0]  hpi_wr,
  output logic [31:0] hpi_wdata,
  output logic [1:0]  hpi_rd,
  input  logic [31:0] hpi_rdata [2],
  input  logic [1:0]  hpi_int,
  input  logic [1:0]  hpi_ready,
  // input FPGA configuration pins
  output logic [1:0]  infpga_nconfig,
  output logic [1:0]  infpga_dclk,
  output logic [1:0]  infpga_data0,
  input  logic [1:0]  infpga_nstatus,
  input  logic [1:0]  infpga_confdone,
  // output FIFOs and DSP general-purpose pins
  input  logic [4:0]  fifo_flags [2],
  input  logic [1:0]  fifo_rd,
  output logic [1:0]  fifo_int,
  input  logic [2:0]  gp11_13 [2],
  output logic [1:0]  mcbsp2_fsx,
  output logic [1:0]  mcbsp2_dx,
  input  logic [1:0]  mcbsp2_fsr,
  input  logic [1:0]  mcbsp2_dr,
  output logic        outfpga_led1,
  output logic        outfpga_led2,
  output logic [3:0]  outfpga_tp,
  output logic [3:0]  infpga_tp [2],   // {5 MHz, busy, DSP reads FEB, FEB event arriving}
  output logic [1:0]  dsp_gp6,         // output FIFO almost full, per DSP
  output logic [1:0]  dsp_gp14,        // output FIFO empty, per DSP
  input  logic [1:0]  dsp_gp9,         // DSP PU IRQ lines
  input  logic [1:0]  dsp_gp10,        // DSP BUSY lines
  output logic [1:0]  pu_irq,          // to the motherboard
  output logic [1:0]  pu_busy
);
  logic [15:0] cfg_wdata [2];
  logic [1:0]  cfg_wr_tgl, infpga_reset;
  logic [31:0] infpga_status [2];

  out_fpga #(.VERSION(OUTFPGA_VERSION)) u_out (
    .clk, .rst_n, .ttc_bcid_frame, .ttc_bcid_data, .ttc_ttype_frame, .ttc_ttype_data,
    .mcbsp0_fs, .mcbsp0_dx, .mcbsp1_fs, .mcbsp1_dx, .addr, .wr, .rd, .wdata, .rdata,
    .dsp_reset, .fifo_reset, .infpga_reset, .hpi_reset, .hpi_burst, .dsp_launch,
    .hpi_wr, .hpi_wdata, .hpi_rd, .hpi_rdata, .hpi_int, .hpi_ready, .cfg_wdata,
    .cfg_wr_tgl, .infpga_status, .infpga_nconfig, .infpga_dclk, .infpga_data0,
    .infpga_nstatus, .infpga_confdone, .fifo_flags, .fifo_rd, .fifo_int, .gp11_13,
    .mcbsp2_fsx, .mcbsp2_dx, .mcbsp2_fsr, .mcbsp2_dr, .ttc_frame_err, .ttc_overflow,
    .led1(outfpga_led1), .led2(outfpga_led2), .tp(outfpga_tp), .gp6(dsp_gp6),
    .gp14(dsp_gp14));

  for (genvar d = 0; d < 2; d++) begin : g_dsp_block
    logic [16:0] links [2];
    logic [31:0] st [2];
    logic [1:0]  ovf;
    logic        in_rst_n, tp_evt, tp_rd, tp_busy, tp_5mhz;
    assign links[0] = feb_data[d];       // FEB1 / FEB2
    assign links[1] = feb_data[d + 2];   // FEB3 / FEB4 (staging)
    assign in_rst_n = rst_n && !infpga_reset[d];

    in_fpga #(.NUM_FEB(2), .FORMAT(FORMAT), .VERSION(INFPGA_VERSION)) u_in (
      .feb_clk, .emif_clk(emif_clk[d]), .rst_n(in_rst_n), .feb_data(links),
      .link_locked({link_locked[d + 2], link_locked[d]}), .cfg_wdata(cfg_wdata[d]),
      .cfg_wr_tgl(cfg_wr_tgl[d]), .status_reg(infpga_status[d]), .ce_n(ce_n[d]),
      .are_n(are_n[d]), .ed(ed[d]), .ed_valid(ed_valid[d]), .dsp_int(ext_int[d]),
      .tinp1(tinp1[d]), .evt_status(st), .overflow(ovf), .gp0(gp0[d]), .gp3(gp3[d]),
      .gp9(dsp_gp9[d]), .gp10(dsp_gp10[d]), .pu_irq(pu_irq[d]), .pu_busy(pu_busy[d]),
      .led1(infpga_led1[d]), .led2(infpga_led2[d]), .tp_evt1(tp_evt), .tp_rd1(tp_rd),
      .tp_busy(tp_busy), .tp_5mhz(tp_5mhz));

    assign evt_status[d]      = st[0];
    assign evt_status[d + 2]  = st[1];
    assign infpga_overflow[d]     = ovf[0];
    assign infpga_overflow[d + 2] = ovf[1];
    assign infpga_busy[d]     = tp_busy;
    assign infpga_tp[d]       = {tp_5mhz, tp_busy, tp_rd, tp_evt};
  end
endmodule
