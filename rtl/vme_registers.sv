// vme_registers: the output FPGA registers seen from VME, for both DSP blocks.
//
// A simple register bus (5-bit PU address, write and read strobes, 32-bit
// data) stands for the motherboard link. Address bit 4 selects the DSP block
// (0: DSP1/InFPGA1, 16: DSP2/InFPGA2); the low four bits select:
//    0 test register (R/W)          6 data from McBSP2 (R, pops the FIFO)
//    1 control register (R/W)       7 InFPGA configuration (W, 16 LSB)
//    2 HPI register (R/W)           8 InFPGA programming byte (W, 8 MSB)
//    3 status register (R)          9 InFPGA status (R)
//    4 broadcast HPI (W)           10 broadcast InFPGA programming (W)
//    5 data to McBSP2 (W)          11 output FPGA version (R)
// Control register bits: 0 DSP reset, 1 partial FIFO reset, 2 InFPGA reset,
// 3 HPI reset, 4 HPI burst, 5 DSP launch, 6 /InFPGA nconfig.
// Status register: [7:0] FIFO counter [7:0], 8 output FIFO empty, 9 almost
// empty, 10 half full, 11 almost full, 12 full, [14:13] FIFO counter [9:8],
// [20:16] words in the McBSP2 FIFO, 21 its empty flag, 22 its almost-full
// flag (more than 24 words), 23 its full flag (32 words), 24-26 GP11-GP13,
// 27 output FIFO empty, 28 HPI INT, 29 HPI ready, 30 InFPGA nstatus,
// 31 InFPGA conf_done.
//
// McBSP2 is the full-duplex serial link with each DSP: a write to register 5
// sends one 32-bit frame to the DSP; frames from the DSP are collected in a
// 32-word FIFO read through register 6.
//
// From the document: the register map, control and status bit positions,
// the 32 x 32-bit McBSP2 read FIFO and its flags, broadcast HPI and InFPGA
// programming. This design's own: the bus itself (the six-line motherboard
// protocol is not specified), reading the HPI register returning the HPI
// data of the DSP block, writes to register 5 while the link is sending are
// dropped, read data is combinational, and unmapped addresses read 0.
module vme_registers #(
  parameter logic [31:0] VERSION = 32'h0000_0001
) (
  input  logic        clk,           // 40 MHz PU clock
  input  logic        rst_n,
  // register bus
  input  logic [4:0]  addr,
  input  logic        wr,
  input  logic        rd,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  // per DSP block
  output logic [31:0] control    [2],
  output logic [1:0]  hpi_wr,
  output logic [31:0] hpi_wdata,
  output logic [1:0]  hpi_rd,
  input  logic [31:0] hpi_rdata  [2],
  input  logic [1:0]  hpi_int,
  input  logic [1:0]  hpi_ready,
  output logic [15:0] cfg_wdata  [2],
  output logic [1:0]  cfg_wr_tgl,
  output logic [1:0]  prog_load,
  output logic [7:0]  prog_byte,
  input  logic [31:0] infpga_status [2],
  input  logic [1:0]  infpga_nstatus,
  input  logic [1:0]  infpga_confdone,
  input  logic [4:0]  fifo_flags [2],   // {full, almost full, half full, almost empty, empty}
  input  logic [9:0]  fifo_count [2],
  input  logic [2:0]  gp11_13    [2],   // DSP GP11, GP12, GP13
  // McBSP2 with each DSP
  output logic [1:0]  mcbsp2_fsx,
  output logic [1:0]  mcbsp2_dx,
  input  logic [1:0]  mcbsp2_fsr,
  input  logic [1:0]  mcbsp2_dr
);
  logic       d;
  logic [3:0] reg_a;
  assign d     = addr[4];
  assign reg_a = addr[3:0];

  logic [31:0] test_r [2];
  logic [1:0]  tx_ready, rx_valid, rx_empty, rx_full;
  logic [31:0] rx_word [2], rx_head [2];
  logic [5:0]  rx_count [2];
  logic [31:0] status_r [2];

  for (genvar i = 0; i < 2; i++) begin : g_dsp
    logic rx_err;
    serial_tx #(.WIDTH(32)) u_tx (
      .clk, .rst_n, .load(wr && d == 1'(i) && reg_a == 4'd5), .word(wdata),
      .ready(tx_ready[i]), .fs(mcbsp2_fsx[i]), .dx(mcbsp2_dx[i]));
    serial_rx #(.WIDTH(32)) u_rx (
      .clk, .rst_n, .frame(mcbsp2_fsr[i]), .sdata(mcbsp2_dr[i]),
      .valid(rx_valid[i]), .word(rx_word[i]), .frame_err(rx_err));
    sync_fifo #(.WIDTH(32), .DEPTH(32)) u_rx_fifo (
      .clk, .rst_n, .wr(rx_valid[i]), .wdata(rx_word[i]),
      .rd(rd && d == 1'(i) && reg_a == 4'd6), .rdata(rx_head[i]),
      .count(rx_count[i]), .empty(rx_empty[i]), .full(rx_full[i]));

    always_comb begin
      status_r[i]        = '0;
      status_r[i][7:0]   = fifo_count[i][7:0];
      status_r[i][12:8]  = fifo_flags[i];
      status_r[i][14:13] = fifo_count[i][9:8];
      status_r[i][20:16] = rx_count[i][4:0];
      status_r[i][21]    = rx_empty[i];
      status_r[i][22]    = rx_count[i] > 6'd24;
      status_r[i][23]    = rx_full[i];
      status_r[i][26:24] = gp11_13[i];
      status_r[i][27]    = fifo_flags[i][0];
      status_r[i][28]    = hpi_int[i];
      status_r[i][29]    = hpi_ready[i];
      status_r[i][30]    = infpga_nstatus[i];
      status_r[i][31]    = infpga_confdone[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      test_r[0] <= '0; test_r[1] <= '0; control[0] <= '0; control[1] <= '0;
      cfg_wdata[0] <= 16'hFF45; cfg_wdata[1] <= 16'hFF45; cfg_wr_tgl <= '0;
    end else if (wr) begin
      unique case (reg_a)
        4'd0: test_r[d]  <= wdata;
        4'd1: control[d] <= wdata;
        4'd7: begin cfg_wdata[d] <= wdata[15:0]; cfg_wr_tgl[d] <= ~cfg_wr_tgl[d]; end
        default: ;
      endcase
    end
  end

  // strobes
  always_comb begin
    hpi_wr = '0; hpi_rd = '0; prog_load = '0;
    if (wr && reg_a == 4'd2)  hpi_wr[d] = 1'b1;
    if (wr && reg_a == 4'd4)  hpi_wr = 2'b11;
    if (rd && reg_a == 4'd2)  hpi_rd[d] = 1'b1;
    if (wr && reg_a == 4'd8)  prog_load[d] = 1'b1;
    if (wr && reg_a == 4'd10) prog_load = 2'b11;
  end
  assign hpi_wdata = wdata;
  assign prog_byte = wdata[31:24];

  always_comb begin
    unique case (reg_a)
      4'd0:    rdata = test_r[d];
      4'd1:    rdata = control[d];
      4'd2:    rdata = hpi_rdata[d];
      4'd3:    rdata = status_r[d];
      4'd6:    rdata = rx_head[d];
      4'd9:    rdata = infpga_status[d];
      4'd11:   rdata = VERSION;
      default: rdata = '0;
    endcase
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(wr && rd))
    else $error("vme_registers: read and write in the same clock");
endmodule
