// out_fpga: the output FPGA of the processing unit (TTC and VME interfaces).
//
// Contains the TTC interface (TTC frames in, McBSP0/McBSP1 frames out to both
// DSPs), the VME register file with the McBSP2 links to both DSPs, one
// serial programmer per input FPGA, and per DSP block an output-FIFO read
// counter: it counts words the output controller reads from that block's
// output FIFO, shows the 10-bit count in the status register, pulses the
// DSP's EXT_INT7 every 256 words read, and is cleared by the DSP through GP13.
// Control register bits drive the DSP reset (bit 0), the partial output FIFO
// reset (bit 1), the input FPGA reset (bit 2), the HPI reset, burst and DSP
// launch lines (bits 3-5) and the input FPGA nconfig pin (bit 6).
// LED1/LED2 show FIFO 1 empty and almost full; test points show GP11, the
// TTC BCID frame, GP12 and a register access (PU control address strobe).
// Each DSP gets its output FIFO's almost-full flag on GP6 and its empty flag
// on GP14.
//
// From the document: the split into TTC and VME interfaces, the register and
// bit assignments, the McBSP allocation, the FIFO counter interrupt every
// 256 read words and its reset by GP13, the LEDs and test points. This
// design's own: one 40 MHz clock for the TTC and PU sides, active-high
// reset bits, the register bus standing for the motherboard link; the HPI
// protocol engine is not included: the HPI register traffic is brought out.
module out_fpga #(
  parameter logic [31:0] VERSION = 32'h0000_0001
) (
  input  logic        clk,          // 40 MHz
  input  logic        rst_n,
  // TTC from the motherboard
  input  logic        ttc_bcid_frame,
  input  logic        ttc_bcid_data,
  input  logic        ttc_ttype_frame,
  input  logic        ttc_ttype_data,
  // McBSP0/1 to both DSPs
  output logic        mcbsp0_fs,
  output logic        mcbsp0_dx,
  output logic        mcbsp1_fs,
  output logic        mcbsp1_dx,
  // register bus
  input  logic [4:0]  addr,
  input  logic        wr,
  input  logic        rd,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  // per DSP block
  output logic [1:0]  dsp_reset,
  output logic [1:0]  fifo_reset,
  output logic [1:0]  infpga_reset,
  output logic [1:0]  hpi_reset,
  output logic [1:0]  hpi_burst,
  output logic [1:0]  dsp_launch,
  output logic [1:0]  hpi_wr,
  output logic [31:0] hpi_wdata,
  output logic [1:0]  hpi_rd,
  input  logic [31:0] hpi_rdata [2],
  input  logic [1:0]  hpi_int,
  input  logic [1:0]  hpi_ready,
  output logic [15:0] cfg_wdata [2],
  output logic [1:0]  cfg_wr_tgl,
  input  logic [31:0] infpga_status [2],
  output logic [1:0]  infpga_nconfig,
  output logic [1:0]  infpga_dclk,
  output logic [1:0]  infpga_data0,
  input  logic [1:0]  infpga_nstatus,
  input  logic [1:0]  infpga_confdone,
  input  logic [4:0]  fifo_flags [2],   // {full, almost full, half full, almost empty, empty}
  input  logic [1:0]  fifo_rd,          // output controller reads a FIFO word
  output logic [1:0]  fifo_int,         // EXT_INT7 of each DSP
  input  logic [2:0]  gp11_13 [2],
  output logic [1:0]  mcbsp2_fsx,
  output logic [1:0]  mcbsp2_dx,
  input  logic [1:0]  mcbsp2_fsr,
  input  logic [1:0]  mcbsp2_dr,
  output logic        ttc_frame_err,
  output logic        ttc_overflow,
  output logic        led1,
  output logic        led2,
  output logic [3:0]  tp,
  output logic [1:0]  gp6,              // to DSP GP6: its output FIFO almost full
  output logic [1:0]  gp14              // to DSP GP14: its output FIFO empty
);
  logic [31:0] control [2];
  logic [1:0]  prog_load, prog_busy;
  logic [7:0]  prog_byte;
  logic [9:0]  fifo_count [2];
  logic        tp_bcid;

  ttc_interface u_ttc (
    .clk, .rst_n, .bcid_frame(ttc_bcid_frame), .bcid_data(ttc_bcid_data),
    .ttype_frame(ttc_ttype_frame), .ttype_data(ttc_ttype_data), .mcbsp0_fs, .mcbsp0_dx,
    .mcbsp1_fs, .mcbsp1_dx, .frame_err(ttc_frame_err), .overflow(ttc_overflow),
    .tp_bcid_frame(tp_bcid));

  vme_registers #(.VERSION(VERSION)) u_regs (
    .clk, .rst_n, .addr, .wr, .rd, .wdata, .rdata, .control, .hpi_wr, .hpi_wdata,
    .hpi_rd, .hpi_rdata, .hpi_int, .hpi_ready, .cfg_wdata, .cfg_wr_tgl, .prog_load,
    .prog_byte, .infpga_status, .infpga_nstatus, .infpga_confdone, .fifo_flags,
    .fifo_count, .gp11_13, .mcbsp2_fsx, .mcbsp2_dx, .mcbsp2_fsr, .mcbsp2_dr);

  for (genvar i = 0; i < 2; i++) begin : g_blk
    infpga_programmer u_prog (
      .clk, .rst_n, .load(prog_load[i]), .byte_in(prog_byte), .busy(prog_busy[i]),
      .dclk(infpga_dclk[i]), .data0(infpga_data0[i]));

    assign dsp_reset[i]      = control[i][0];
    assign fifo_reset[i]     = control[i][1];
    assign infpga_reset[i]   = control[i][2];
    assign hpi_reset[i]      = control[i][3];
    assign hpi_burst[i]      = control[i][4];
    assign dsp_launch[i]     = control[i][5];
    assign infpga_nconfig[i] = control[i][6];

    // output FIFO read counter, interrupt every 256 words, cleared by GP13
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin fifo_count[i] <= '0; fifo_int[i] <= 1'b0; end
      else begin
        fifo_int[i] <= fifo_rd[i] && (fifo_count[i][7:0] == 8'hFF);
        if (gp11_13[i][2]) fifo_count[i] <= '0;
        else if (fifo_rd[i]) fifo_count[i] <= fifo_count[i] + 10'd1;
      end
    end
  end

  assign led1 = fifo_flags[0][0];
  assign led2 = fifo_flags[0][3];
  assign tp   = {wr || rd, gp11_13[0][1], tp_bcid, gp11_13[0][0]};
  assign gp6  = {fifo_flags[1][3], fifo_flags[0][3]};
  assign gp14 = {fifo_flags[1][0], fifo_flags[0][0]};
endmodule
