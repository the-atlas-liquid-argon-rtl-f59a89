// rod_pkg: shared types and constants of the processing-unit mezzanine.
//
// FEB word layout (16-bit ADC readout words), the event status word bit
// positions, the InFPGA configuration register fields and the word kinds that
// the parallelizer tags each ADC word with. Bit positions follow the FEB event
// format and the InFPGA status word definition; the enum encodings are this
// design's own.
package rod_pkg;

  // ---- FEB ADC readout words ---------------------------------------------
  localparam logic [15:0] FEB_START_TAG = 16'hFFFF;  // frame start tag (W1)
  localparam logic [15:0] FEB_END_TAG   = 16'h0000;  // frame end tag (WEVT)
  localparam logic [15:0] SCAC_OK_A     = 16'h4801;  // accepted trailer values
  localparam logic [15:0] SCAC_OK_B     = 16'h0805;

  localparam int unsigned NUM_ADC      = 16;  // ADCs per FEB
  localparam int unsigned ADC_PER_HFEB = 8;
  localparam int unsigned CH_PER_ADC   = 8;   // channels per ADC
  localparam int unsigned MAX_GAINS    = 3;
  localparam int unsigned MAX_SAMPLES  = 32;

  // Kind of an ADC word inside an event, after the start tag.
  typedef enum logic [2:0] {
    WK_CTRL1 = 3'd0,
    WK_CTRL2 = 3'd1,
    WK_RADD  = 3'd2,
    WK_DATA  = 3'd3,
    WK_CTRL3 = 3'd4,
    WK_END   = 3'd5
  } word_kind_e;

  // One ADC word as it leaves the parallelizer MUX, in the order
  // ADC0, ADC8, ADC1, ADC9, ... ADC7, ADC15.
  typedef struct packed {
    logic [15:0] data;
    logic [3:0]  adc;     // ADC number 0..15
    word_kind_e  kind;
    logic [4:0]  sample;  // sample index, 0-based
    logic [1:0]  gain;    // gain block index, 0-based
    logic [2:0]  chan;    // channel within the ADC
  } feb_word_t;

  // ---- Event status word (bits 17..0, 31..18 are zero) -------------------
  localparam int unsigned ST_ONES      = 0;
  localparam int unsigned ST_EVTID     = 1;
  localparam int unsigned ST_BCID      = 2;
  localparam int unsigned ST_RADD      = 3;
  localparam int unsigned ST_SCAC      = 4;
  localparam int unsigned ST_GAIN      = 5;
  localparam int unsigned ST_PARITY    = 6;
  localparam int unsigned ST_FEB_BCID  = 7;
  localparam int unsigned ST_FEB_RADD  = 8;
  localparam int unsigned ST_FEB_EVTID = 9;
  localparam int unsigned ST_END       = 10;
  localparam int unsigned ST_SCAC1     = 11;
  localparam int unsigned ST_SCAC2     = 12;
  localparam int unsigned ST_WORDS     = 13;
  localparam int unsigned ST_ADCID     = 14;
  localparam int unsigned ST_FEBID     = 15;
  localparam int unsigned ST_FLAGSTART = 16;
  localparam int unsigned ST_FLAGALT   = 17;

  // ---- InFPGA configuration register --------------------------------------
  typedef struct packed {
    logic [7:0] chunk_m1;    // size of chunks - 1, in 64-bit words
    logic [1:0] nb_gains;    // number of gains (1 or 3)
    logic [5:0] nb_samples;  // number of samples (3..32)
  } infpga_cfg_t;

  localparam logic [15:0] INFPGA_CFG_RESET = 16'hFF45;

  // Odd parity over all 16 bits of a word (bit 14 is the parity bit).
  function automatic logic parity_ok(input logic [15:0] w);
    return ^w;
  endfunction

endpackage
