// dpram: dual-clock dual-port RAM holding the formatted FEB events.
//
// 64-bit words, 32 kbit per FEB by default (512 words), split by the user
// into two banks of 256 words. The write port runs on the FEB clock and
// writes any of the four 16-bit lanes of a word (lane 3 = bits 63..48), so
// that a formatter can place 16-bit FEB words at arbitrary positions. The
// read port runs on the DSP EMIFA clock and has one clock of read latency
// (registered address-to-data), the usual block-RAM behaviour.
//
// The 64-bit width and the 32 kbit size per FEB are the document's; the lane
// write enables and the one-clock read latency are this design's choices.
module dpram #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                 wclk,
  input  logic [AW-1:0]        waddr,
  input  logic [WIDTH/16-1:0]  wlane,   // one enable per 16-bit lane
  input  logic [WIDTH-1:0]     wdata,
  input  logic                 rclk,
  input  logic                 re,
  input  logic [AW-1:0]        raddr,
  output logic [WIDTH-1:0]     rdata
);
  localparam int unsigned LANES = WIDTH / 16;

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk)
    for (int l = 0; l < LANES; l++)
      if (wlane[l]) mem[waddr][l*16 +: 16] <= wdata[l*16 +: 16];

  always_ff @(posedge rclk)
    if (re) rdata <= mem[raddr];
endmodule
