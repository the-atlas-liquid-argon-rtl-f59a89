// in_fpga: the input FPGA of one DSP block, in staging mode (two FEBs).
//
// Each FEB channel is a feb_parallelizer (deserialize, check, MUX) feeding a
// data_organizer that fills one half of a dual-port RAM while the DSP reads
// the other half through a dsp_interface. FEB 1 answers chip enable CE3 and
// interrupts EXT_INT4; the staged FEB answers CE1 and interrupts EXT_INT5.
// Both share the 64-bit EMIFA data bus: the channel whose read data is valid
// drives it.
//
// The configuration register (Table "InFPGA configuration": chunk size - 1,
// number of gains, number of samples) resets to FF45h: chunks of 256 rows,
// one gain, five samples. It is written from the output FPGA: cfg_wdata is
// taken when cfg_wr_tgl toggles (synchronized to the FEB clock); the toggle
// level present when the input FPGA leaves reset is not taken as a write. The status
// register reads {version, configuration}. The output format is fixed per
// build by the FORMAT parameter, as each format is a separate FPGA build.
//
// Test points: tp_evt1 = FEB 1 event arriving, tp_rd1 = DSP reading FEB 1,
// tp_busy = a FEB channel has both RAM banks waiting for the DSP, tp_5mhz =
// the 5 MHz watchdog clock (FEB clock / 16). The two LEDs follow DSP pins GP0
// and GP3; tinp1 is the AND of both link-locked signals. The DSP's PU IRQ
// (GP9) and BUSY (GP10) lines pass to the board as pu_irq and pu_busy;
// pu_busy is also raised while a FEB channel has no free bank (own choice).
// The serial line carrying the configuration between the two FPGAs is not
// specified and is replaced here by the toggle-qualified parallel bus.
module in_fpga
  import rod_pkg::*;
#(
  parameter int unsigned NUM_FEB   = 2,        // staging mode: two FEBs
  parameter logic [1:0]  FORMAT    = 2'd0,     // transparent format
  parameter logic [15:0] VERSION   = 16'h0355,
  parameter int unsigned BANK_ROWS = 256       // 2 x 256 x 64 bit = 32 kbit per FEB
) (
  input  logic                feb_clk,     // 80 MHz
  input  logic                emif_clk,    // 120 MHz EMIFA clock
  input  logic                rst_n,
  input  logic [16:0]         feb_data [NUM_FEB],
  input  logic [NUM_FEB-1:0]  link_locked,
  // configuration from the output FPGA
  input  logic [15:0]         cfg_wdata,
  input  logic                cfg_wr_tgl,
  output logic [31:0]         status_reg,
  // EMIFA
  input  logic [NUM_FEB-1:0]  ce_n,        // [0] = CE3 (FEB 1), [1] = CE1 (staged FEB)
  input  logic                are_n,
  output logic [63:0]         ed,
  output logic                ed_valid,
  output logic [NUM_FEB-1:0]  dsp_int,     // [0] = EXT_INT4, [1] = EXT_INT5
  output logic                tinp1,
  // per-FEB event status of the last finished event, for monitoring
  output logic [31:0]         evt_status [NUM_FEB],
  output logic [NUM_FEB-1:0]  overflow,
  // LEDs and test points
  input  logic                gp0,
  input  logic                gp3,
  input  logic                gp9,         // DSP PU IRQ line
  input  logic                gp10,        // DSP BUSY line
  output logic                pu_irq,
  output logic                pu_busy,
  output logic                led1,
  output logic                led2,
  output logic                tp_evt1,
  output logic                tp_rd1,
  output logic                tp_busy,
  output logic                tp_5mhz
);
  localparam int unsigned AW = $clog2(2 * BANK_ROWS);

  // ---- configuration register ----
  infpga_cfg_t cfg;
  logic [2:0]  cfg_sync;
  logic [1:0]  warm;   // toggle edges are only taken once the synchronizer is filled
  always_ff @(posedge feb_clk or negedge rst_n) begin
    if (!rst_n) begin cfg <= INFPGA_CFG_RESET; cfg_sync <= '0; warm <= '0; end
    else begin
      cfg_sync <= {cfg_sync[1:0], cfg_wr_tgl};
      if (warm != 2'd3) warm <= warm + 2'd1;
      else if (cfg_sync[2] ^ cfg_sync[1]) cfg <= cfg_wdata;
    end
  end
  assign status_reg = {VERSION, cfg};

  logic [63:0]        ch_ed    [NUM_FEB];
  logic [NUM_FEB-1:0] ch_valid, ch_busy, ch_evt, ch_re;

  for (genvar f = 0; f < NUM_FEB; f++) begin : g_feb
    logic        word_valid, evt_start, evt_done, in_event;
    feb_word_t   word;
    logic [31:0] status;
    logic [AW-1:0] waddr, raddr;
    logic [3:0]  wlane;
    logic [63:0] wdata, rdata;
    logic [1:0]  wr_done_tgl, rd_free_tgl;
    logic [8:0]  bank_rows [2];
    logic        re;

    feb_parallelizer u_par (
      .clk(feb_clk), .rst_n, .feb_data(feb_data[f]), .nb_samples(cfg.nb_samples),
      .nb_gains(cfg.nb_gains), .feb_id(f != 0), .word_valid, .word, .evt_start,
      .evt_done, .status, .in_event);

    data_organizer #(.BANK_ROWS(BANK_ROWS)) u_org (
      .clk(feb_clk), .rst_n, .fmt(FORMAT), .cfg, .word_valid, .word, .evt_start,
      .evt_done, .status, .waddr, .wlane, .wdata, .wr_done_tgl, .bank_rows,
      .rd_free_tgl, .overflow(overflow[f]), .busy(ch_busy[f]));

    dpram #(.WIDTH(64), .DEPTH(2 * BANK_ROWS)) u_ram (
      .wclk(feb_clk), .waddr, .wlane, .wdata, .rclk(emif_clk), .re, .raddr, .rdata);

    dsp_interface #(.BANK_ROWS(BANK_ROWS)) u_dsp (
      .clk(emif_clk), .rst_n, .wr_done_tgl, .bank_rows, .rd_free_tgl, .re, .raddr,
      .rdata, .ce_n(ce_n[f]), .are_n, .ed(ch_ed[f]), .ed_valid(ch_valid[f]),
      .dsp_int(dsp_int[f]));

    always_ff @(posedge feb_clk or negedge rst_n)
      if (!rst_n) evt_status[f] <= '0;
      else if (evt_done) evt_status[f] <= status;

    assign ch_evt[f] = in_event;
    assign ch_re[f]  = re;
  end

  always_comb begin
    ed = '0; ed_valid = 1'b0;
    for (int f = 0; f < NUM_FEB; f++)
      if (ch_valid[f]) begin ed = ch_ed[f]; ed_valid = 1'b1; end
  end

  assign tinp1   = &link_locked;
  assign led1    = gp0;
  assign led2    = gp3;
  assign tp_evt1 = ch_evt[0];
  assign tp_rd1  = ch_re[0];
  assign tp_busy = |ch_busy;
  assign pu_irq  = gp9;
  assign pu_busy = gp10 || tp_busy;

  // 5 MHz square wave (FEB clock / 16) for the board watchdog
  logic [3:0] div16;
  always_ff @(posedge feb_clk or negedge rst_n)
    if (!rst_n) div16 <= '0;
    else        div16 <= div16 + 4'd1;
  assign tp_5mhz = div16[3];

  // the DSP selects one FEB RAM at a time
  assert property (@(posedge emif_clk) disable iff (!rst_n) $onehot0(~ce_n))
    else $error("in_fpga: both chip enables active");
endmodule
