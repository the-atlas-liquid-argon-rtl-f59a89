// feb_parallelizer: parallelization, error checking and MUX for one FEB.
//
// The FEB sends 16 ADC streams on a 17-bit bus at 80 MHz. feb_data[16] tells
// which half FEB is on the bus in this cycle (0: ADC0-7, channels 0-63;
// 1: ADC8-15, channels 64-127). feb_data[2i+1:2i] carries two bits of ADC i
// (or ADC i+8), most significant pair first, so one 16-bit word of every ADC
// completes every 16 clocks. One 16-bit shift register per ADC collects them.
//
// An event begins when ADC0's shift register holds the all-ones start tag
// after a half-FEB-1 cycle; the half-FEB-1 shift count then frames every
// further word. Half FEB 2 is sampled one clock after each half-FEB-1 word
// completes. The 16 words of one word index form a group; the group is
// checked (parity, all-0/all-1 words, ADC0 identifier, EVTID/BCID/RADD/SCAC
// agreement inside and between half FEBs, gain constancy across samples,
// SCAC trailer value, end tag) and then shifted out one word per clock in the
// order ADC0, ADC8, ADC1, ADC9, ... ADC7, ADC15, tagged with its kind
// (ctrl1, ctrl2, RADD, sample data, ctrl3, end tag), sample, gain and channel.
//
// The event length follows from the configured number of samples and gains:
// ctrl1, ctrl2, then per sample one RADD and 8*nb_gains data words, then
// ctrl3 and the end tag. The status word (bits per rod_pkg ST_*) is collected
// from each start of event on and is copied to the status output when the
// end-tag group enters the MUX; evt_done pulses with the last end-tag word.
// evt_start pulses one clock before the event's first word leaves the MUX.
// Events may follow each other with no idle word between them (the FEB's
// full rate): the next start tag is framed while the MUX still empties the
// previous end-tag group, and evt_done may coincide with the next evt_start.
//
// Following the FEB format and the InFPGA check list: every check of the
// status-word table. This design's own choices: the framing reference is half
// FEB 1 alone; a half FEB 2 start tag missing one clock after the half FEB 1
// start sets the "ones" bit; the end-tag check (bit 10) is implemented by
// position; a start tag seen first on half FEB 2 sets the flag-start bit.
module feb_parallelizer
  import rod_pkg::*;
(
  input  logic        clk,          // 80 MHz FEB clock
  input  logic        rst_n,
  input  logic [16:0] feb_data,
  input  logic [5:0]  nb_samples,   // 3..32
  input  logic [1:0]  nb_gains,     // 1 or 3
  input  logic        feb_id,       // 0: FEB 1, 1: staged FEB (status bit 15)
  output logic        word_valid,
  output feb_word_t   word,
  output logic        evt_start,    // pulse: the event's first word follows next clock
  output logic        evt_done,     // pulse with the last end-tag word
  output logic [31:0] status,       // status word of the last finished event
  output logic        in_event      // an event is arriving (test point)
);

  // ---------------------------------------------------------------- shifting
  logic [15:0] sr    [NUM_ADC];
  logic [15:0] sr_nx [NUM_ADC];
  logic        hf;
  assign hf = feb_data[16];

  always_comb begin
    for (int i = 0; i < NUM_ADC; i++) sr_nx[i] = sr[i];
    for (int i = 0; i < ADC_PER_HFEB; i++) begin
      if (!hf) sr_nx[i]   = {sr[i][13:0],   feb_data[2*i+1], feb_data[2*i]};
      else     sr_nx[i+8] = {sr[i+8][13:0], feb_data[2*i+1], feb_data[2*i]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < NUM_ADC; i++) sr[i] <= '0;
    else        for (int i = 0; i < NUM_ADC; i++) sr[i] <= sr_nx[i];
  end

  // ----------------------------------------------------------------- framing
  logic        evt;          // inside an event (half FEB 1 framing)
  logic [2:0]  shift_cnt;    // half FEB 1 pairs shifted into the current word
  logic        h2_check;     // next clock: check the half FEB 2 start tags
  logic        h2_early;     // half FEB 2 start tag seen while idle
  logic        h2_due;       // next clock: capture the group
  logic        hf_q;
  logic [15:0] h1w [ADC_PER_HFEB];

  logic start_now, h1_word_now;
  assign start_now   = !evt && !hf && (sr_nx[0] == FEB_START_TAG);
  assign h1_word_now = evt && !hf && (shift_cnt == 3'd7);

  // group of 16 words and its position in the event
  logic [15:0] grp [NUM_ADC];
  word_kind_e  grp_kind, seq_kind;
  logic [4:0]  grp_s, seq_s;
  logic [1:0]  grp_g, seq_g;
  logic [2:0]  grp_c, seq_c;
  logic        grp_new;      // group loaded in the previous clock

  // sequencer advance
  word_kind_e  nxt_kind;
  logic [4:0]  nxt_s;
  logic [1:0]  nxt_g;
  logic [2:0]  nxt_c;
  logic [1:0]  ng_m1;
  assign ng_m1 = (nb_gains > 2'd1) ? nb_gains - 2'd1 : 2'd0;

  always_comb begin
    nxt_kind = seq_kind;
    nxt_s = seq_s; nxt_g = seq_g; nxt_c = seq_c;
    unique case (seq_kind)
      WK_CTRL1: nxt_kind = WK_CTRL2;
      WK_CTRL2: begin nxt_kind = WK_RADD; nxt_s = '0; end
      WK_RADD:  begin nxt_kind = WK_DATA; nxt_g = '0; nxt_c = '0; end
      WK_DATA: begin
        if (seq_c != 3'd7) nxt_c = seq_c + 3'd1;
        else if (seq_g != ng_m1) begin nxt_c = '0; nxt_g = seq_g + 2'd1; end
        else if ({1'b0, seq_s} + 6'd1 < nb_samples) begin
          nxt_kind = WK_RADD; nxt_s = seq_s + 5'd1;
        end else nxt_kind = WK_CTRL3;
      end
      WK_CTRL3: nxt_kind = WK_END;
      default:  nxt_kind = WK_END;
    endcase
  end

  logic capture;
  assign capture = h2_due;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      evt <= 1'b0; hf_q <= 1'b0; h2_due <= 1'b0; grp_new <= 1'b0; shift_cnt <= '0; h2_check <= 1'b0; h2_early <= 1'b0;
      seq_kind <= WK_CTRL1; seq_s <= '0; seq_g <= '0; seq_c <= '0;
      grp_kind <= WK_CTRL1; grp_s <= '0; grp_g <= '0; grp_c <= '0;
      for (int i = 0; i < ADC_PER_HFEB; i++) h1w[i] <= '0;
      for (int i = 0; i < NUM_ADC; i++) grp[i] <= '0;
    end else begin
      hf_q     <= hf;
      h2_early <= !evt && hf && (sr_nx[8] == FEB_START_TAG);
      h2_check <= start_now;
      h2_due   <= h1_word_now;
      grp_new  <= capture;
      if (start_now) begin
        evt <= 1'b1; shift_cnt <= '0;
        seq_kind <= WK_CTRL1; seq_s <= '0; seq_g <= '0; seq_c <= '0;
      end else if (evt && !hf) begin
        shift_cnt <= shift_cnt + 3'd1;
      end
      if (h1_word_now)
        for (int i = 0; i < ADC_PER_HFEB; i++) h1w[i] <= sr_nx[i];
      if (capture) begin
        for (int i = 0; i < ADC_PER_HFEB; i++) begin
          grp[i]   <= h1w[i];
          grp[i+8] <= sr_nx[i+8];
        end
        grp_kind <= seq_kind; grp_s <= seq_s; grp_g <= seq_g; grp_c <= seq_c;
        seq_kind <= nxt_kind; seq_s <= nxt_s; seq_g <= nxt_g; seq_c <= nxt_c;
        if (seq_kind == WK_END) evt <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------------ checks
  logic [1:0] gain_ref [MAX_GAINS][CH_PER_ADC][NUM_ADC];
  logic [31:0] grp_err;

  function automatic logic mismatch8(input logic [15:0] a [NUM_ADC],
                                     input int base, input logic [15:0] mask);
    logic m = 1'b0;
    for (int k = 1; k < 8; k++)
      if (((a[base+k] ^ a[base]) & mask) != 16'h0) m = 1'b1;
    return m;
  endfunction

  always_comb begin
    grp_err = '0;
    unique case (grp_kind)
      WK_CTRL1: begin
        if (mismatch8(grp, 0, 16'h00FF) || mismatch8(grp, 8, 16'h00FF)) grp_err[ST_EVTID] = 1'b1;
        if (((grp[0] ^ grp[8]) & 16'h00FF) != 0) grp_err[ST_FEB_EVTID] = 1'b1;
        if (grp[0][11:8] != 4'd0) grp_err[ST_ADCID] = 1'b1;
      end
      WK_CTRL2: begin
        if (mismatch8(grp, 0, 16'h0FFF) || mismatch8(grp, 8, 16'h0FFF)) grp_err[ST_BCID] = 1'b1;
        if (((grp[0] ^ grp[8]) & 16'h0FFF) != 0) grp_err[ST_FEB_BCID] = 1'b1;
      end
      WK_RADD: begin
        if (mismatch8(grp, 0, 16'h0FFF) || mismatch8(grp, 8, 16'h0FFF)) grp_err[ST_RADD] = 1'b1;
        if (((grp[0] ^ grp[8]) & 16'h0FFF) != 0) grp_err[ST_FEB_RADD] = 1'b1;
      end
      WK_DATA: begin
        if (grp_s != 5'd0)
          for (int a = 0; a < NUM_ADC; a++)
            if (grp[a][13:12] != gain_ref[grp_g][grp_c][a]) grp_err[ST_GAIN] = 1'b1;
      end
      WK_CTRL3: begin
        if (mismatch8(grp, 0, 16'h3FFF) || mismatch8(grp, 8, 16'h3FFF)) grp_err[ST_SCAC] = 1'b1;
        for (int a = 0; a < NUM_ADC; a++)
          if (grp[a] != SCAC_OK_A && grp[a] != SCAC_OK_B) begin
            if (a < 8) grp_err[ST_SCAC1] = 1'b1;
            else       grp_err[ST_SCAC2] = 1'b1;
          end
      end
      default: begin
        for (int a = 0; a < NUM_ADC; a++)
          if (grp[a] != FEB_END_TAG) grp_err[ST_END] = 1'b1;
      end
    endcase
    if (grp_kind != WK_END)
      for (int a = 0; a < NUM_ADC; a++) begin
        if (!parity_ok(grp[a])) grp_err[ST_PARITY] = 1'b1;
        if (grp[a] == 16'h0000 || grp[a] == 16'hFFFF) grp_err[ST_WORDS] = 1'b1;
      end
  end

  always_ff @(posedge clk) begin
    if (grp_new && grp_kind == WK_DATA && grp_s == 5'd0)
      for (int a = 0; a < NUM_ADC; a++) gain_ref[grp_g][grp_c][a] <= grp[a][13:12];
  end

  logic [31:0] st, st_set;
  always_comb begin
    st_set = '0;
    if (evt && (hf == hf_q)) st_set[ST_FLAGALT] = 1'b1;
    if (h2_check)
      for (int i = 8; i < NUM_ADC; i++)
        if (!hf || sr_nx[i] != FEB_START_TAG) st_set[ST_ONES] = 1'b1;
    if (grp_new) st_set = st_set | grp_err;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= '0;
    else if (start_now) begin
      st <= '0;
      st[ST_FEBID]     <= feb_id;
      st[ST_FLAGSTART] <= h2_early;
      // the other half-FEB-1 ADCs must show the start tag in the same clock
      for (int i = 1; i < ADC_PER_HFEB; i++)
        if (sr_nx[i] != FEB_START_TAG) st[ST_ONES] <= 1'b1;
    end else st <= st | st_set;
  end

  // The status output holds the finished event's word from its end-tag group
  // on, so a next event may already be framing (and clearing st) while the
  // last words of this one still leave the MUX.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) status <= '0;
    else if (grp_new && grp_kind == WK_END) status <= st | st_set;

  // --------------------------------------------------------------------- MUX
  logic [3:0]  mux_pos;
  logic        mux_run;
  logic [3:0]  mux_adc;
  assign mux_adc = {mux_pos[0], mux_pos[3:1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mux_pos <= '0; mux_run <= 1'b0; word_valid <= 1'b0; word <= '0;
      evt_done <= 1'b0;
    end else begin
      evt_done   <= mux_run && (mux_pos == 4'd15) && (grp_kind == WK_END);
      if (grp_new || mux_run) begin
        word.data   <= grp[mux_adc];
        word.adc    <= mux_adc;
        word.kind   <= grp_kind;
        word.sample <= grp_s;
        word.gain   <= grp_g;
        word.chan   <= grp_c;
      end
      word_valid <= grp_new || mux_run;
      if (grp_new) begin
        mux_run <= 1'b1; mux_pos <= 4'd1;
      end else if (mux_run) begin
        mux_pos <= mux_pos + 4'd1;
        if (mux_pos == 4'd15) mux_run <= 1'b0;
      end
    end
  end

  // the first MUX word is output the clock after grp_new, at position 0;
  // evt_start comes with grp_new of the ctrl1 group, one clock ahead of it
  assign evt_start = grp_new && grp_kind == WK_CTRL1;
  assign in_event  = evt;

  // A new group normally arrives exactly when the MUX has emptied the last
  // one; with a corrupted flag bit it can come earlier and then restarts the
  // MUX (the event is flagged by the flag-alternation bit).

endmodule
