// data_organizer: writes one FEB's word stream into the dual-port RAM.
//
// The RAM is split into two banks; one is filled from the FEB while the DSP
// reads the other. Three layouts ("formats") of the 64-bit words are built,
// chosen by `fmt`:
//   format 0 (transparent): every ctrl1/ctrl2/RADD/sample/ctrl3 word kept as
//     it arrives, four per 64-bit row (ADC0 in bits 63..48, ADC8, ADC1, ADC9
//     ...), then a last row {status[31:0], nb_gains, nb_samples}.
//     Rows = 1 + 12 + 4*ns + 32*ns*ng.
//   format 2: row 0 {0, 0, EventID, BCID}, row 1 {ctrl1, ctrl2, nb_gains,
//     nb_samples}, then RADD and sample words in arrival order with the gain
//     bits cleared on all samples but the first, then {status, ctrl3, 0}.
//     Rows = 3 + 4*ns + 32*ns*ng.
//   format 1 (5 samples, 1 gain only): rows 0-2 hold status, EventID, BCID,
//     ctrl1-3 and RADD1-5; then three rows per channel pair (Ck, Ck+64):
//     gain, S1..S5 of Ck then gain, S1..S5 of Ck+64. Sample words carry the
//     12-bit value in bits 13..2 and the gain in bits 15..14. 195 rows.
// Control and RADD words are those of ADC 4. In format 1 their parity bit is
// cleared.
//
// A bank is closed, and handed to the DSP side by toggling wr_done_tgl[bank]
// (with its row count in bank_rows[bank]), at the end of an event or, in
// formats 0 and 2, when it holds chunk_m1+1 rows. The DSP side toggles
// rd_free_tgl[bank] back once it has read the bank; these toggles come from
// the EMIFA clock domain and are synchronized here. An event that finds no
// free bank is dropped and counted (`overflow` pulse); `busy` is high while
// both banks wait for the DSP. evt_start may come in the same clock as the
// previous event's evt_done (events back to back); the new event then goes
// to the other bank.
//
// From the document: the three layouts, the 64-bit width, two banks, the
// chunk size and the ADC-4 rule. This design's own: EventID = ctrl1[4:0]
// (event number) and BCID = ctrl2[11:0] zero-extended to 16 bits, gain words
// of format 1 = gain in bits 15..14, the drop-on-overflow policy, and format 1
// being applied whatever the configured sample and gain counts.
module data_organizer
  import rod_pkg::*;
#(
  parameter int unsigned BANK_ROWS = 256,
  parameter int unsigned AW        = $clog2(2 * BANK_ROWS)
) (
  input  logic          clk,         // FEB clock
  input  logic          rst_n,
  input  logic [1:0]    fmt,         // 0, 1 or 2
  input  infpga_cfg_t   cfg,
  // from the parallelizer
  input  logic          word_valid,
  input  feb_word_t     word,
  input  logic          evt_start,
  input  logic          evt_done,
  input  logic [31:0]   status,
  // RAM write port
  output logic [AW-1:0] waddr,
  output logic [3:0]    wlane,
  output logic [63:0]   wdata,
  // bank handshake with the DSP side
  output logic [1:0]    wr_done_tgl,
  output logic [8:0]    bank_rows [2],
  input  logic [1:0]    rd_free_tgl,
  output logic          overflow,
  output logic          busy
);
  localparam int unsigned RW = AW - 1;  // row address bits inside a bank

  // ---- bank free flags (rd_free_tgl synchronized) ----
  logic [1:0] free_s1, free_s2, bank_free;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin free_s1 <= '0; free_s2 <= '0; end
    else begin free_s1 <= rd_free_tgl; free_s2 <= free_s1; end
  assign bank_free = ~(wr_done_tgl ^ free_s2);
  assign busy = (bank_free == 2'b00);

  logic        cur;          // bank being filled
  logic        accept;       // current event is being written
  logic [8:0]  row;          // next sequential row inside the bank
  logic [1:0]  q;            // next lane position (0 = bits 63..48)
  logic [15:0] ctrl1_q, ctrl3_q, evtid_q, bcid_q;
  logic        pend_row0;    // format 2: row 0 write pending
  logic [8:0]  chunk;
  assign chunk = {1'b0, cfg.chunk_m1} + 9'd1;

  // ---- what to write for this word ----
  logic          we;
  logic [8:0]    w_row;
  logic [3:0]    w_lane;
  logic [63:0]   w_data;
  logic          seq_step;   // word consumes a sequential lane (formats 0, 2)
  logic [15:0]   seq_word;
  logic          is_adc4;
  logic [15:0]   fmt1_word;
  logic [5:0]    pair;
  logic [3:0]    slot0, slot1;
  logic [15:0]   noparity;
  logic          closing;    // evt_done: write the status row and close

  assign is_adc4  = (word.adc == 4'd4);
  assign noparity = word.data & 16'hBFFF;
  assign closing  = evt_done && accept;

  function automatic logic [63:0] lane_data(input logic [1:0] pos, input logic [15:0] d);
    return {4{d}} & (64'hFFFF << (16 * (3 - pos)));
  endfunction

  always_comb begin
    we = 1'b0; w_row = row; w_lane = '0; w_data = '0;
    seq_step = 1'b0; seq_word = word.data;
    fmt1_word = '0; pair = '0; slot0 = '0; slot1 = '0;
    if (closing) begin
      we = 1'b1; w_lane = 4'hF;
      unique case (fmt)
        2'd1: begin w_row = 9'd0; w_data = {status, evtid_q, bcid_q}; end
        2'd2: w_data = {status, ctrl3_q, 16'h0000};
        default: w_data = {status, 14'b0, cfg.nb_gains, 10'b0, cfg.nb_samples};
      endcase
    end else if (pend_row0) begin
      we = 1'b1; w_row = 9'd0; w_lane = 4'hF; w_data = {32'h0, evtid_q, bcid_q};
    end else if (word_valid && accept) begin
      unique case (fmt)
        2'd1: begin
          pair = {word.adc[2:0], word.chan};
          unique case (word.kind)
            WK_CTRL1: if (is_adc4) begin we = 1'b1; w_row = 9'd1; w_lane = 4'b1000; w_data = {4{noparity}}; end
            WK_CTRL2: if (is_adc4) begin we = 1'b1; w_row = 9'd1; w_lane = 4'b0100; w_data = {4{noparity}}; end
            WK_CTRL3: if (is_adc4) begin we = 1'b1; w_row = 9'd1; w_lane = 4'b0010; w_data = {4{noparity}}; end
            WK_RADD: if (is_adc4) begin
              we = 1'b1; w_data = {4{noparity}};
              if (word.sample == 5'd0) begin w_row = 9'd1; w_lane = 4'b0001; end
              else begin w_row = 9'd2; w_lane = 4'b1000 >> (word.sample - 5'd1); end
            end
            WK_DATA: begin
              // slot inside the 12-slot group of a channel pair
              slot1 = (word.adc[3] ? 4'd6 : 4'd0) + 4'd1 + 4'(word.sample);
              slot0 = (word.adc[3] ? 4'd6 : 4'd0);
              fmt1_word = {word.data[13:12], word.data[11:0], 2'b00};
              we = 1'b1;
              w_row = 9'd3 + 9'd3 * {3'b0, pair} + {7'b0, slot1[3:2]};
              w_lane = 4'b1000 >> slot1[1:0];
              w_data = {4{fmt1_word}};
              if (word.sample == 5'd0) begin
                // the gain slot shares the row with S1 (slots 0/1 and 6/7)
                w_lane = w_lane | (4'b1000 >> slot0[1:0]);
                w_data = lane_data(slot1[1:0], fmt1_word) |
                         lane_data(slot0[1:0], {word.data[13:12], 14'b0});
              end
            end
            default: ;
          endcase
        end
        2'd2: begin
          unique case (word.kind)
            WK_CTRL2: if (is_adc4) begin
              we = 1'b1; w_row = 9'd1; w_lane = 4'hF;
              w_data = {ctrl1_q, word.data, 14'b0, cfg.nb_gains, 10'b0, cfg.nb_samples};
            end
            WK_RADD: seq_step = 1'b1;
            WK_DATA: begin
              seq_step = 1'b1;
              if (word.sample != 5'd0) seq_word = word.data & 16'hCFFF;
            end
            default: ;
          endcase
        end
        default: seq_step = (word.kind != WK_END);
      endcase
      if (seq_step) begin
        we = 1'b1; w_row = row; w_lane = 4'b1000 >> q; w_data = {4{seq_word}};
      end
    end
  end

  assign waddr = {cur, w_row[RW-1:0]};
  assign wlane = we ? w_lane : 4'b0000;
  assign wdata = w_data;

  // ---- sequencing and bank hand-over ----
  logic row_full, chunk_full, start_bank;
  assign start_bank = closing ? ~cur : cur;
  assign row_full   = seq_step && (q == 2'd3);
  assign chunk_full = row_full && (row + 9'd1 == chunk) && (fmt != 2'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= 1'b0; accept <= 1'b0; row <= '0; q <= '0;
      ctrl1_q <= '0; ctrl3_q <= '0; evtid_q <= '0; bcid_q <= '0; pend_row0 <= 1'b0;
      wr_done_tgl <= '0; bank_rows[0] <= '0; bank_rows[1] <= '0; overflow <= 1'b0;
    end else begin
      overflow  <= 1'b0;
      pend_row0 <= 1'b0;
      if (word_valid && accept && is_adc4) begin
        if (word.kind == WK_CTRL1) begin ctrl1_q <= word.data; evtid_q <= {11'b0, word.data[4:0]}; end
        if (word.kind == WK_CTRL2) begin
          bcid_q <= {4'b0, word.data[11:0]};
          if (fmt == 2'd2) pend_row0 <= 1'b1;
        end
        if (word.kind == WK_CTRL3) ctrl3_q <= (fmt == 2'd1) ? noparity : word.data;
      end
      if (seq_step && !closing && !pend_row0) begin
        q <= q + 2'd1;
        if (row_full) row <= row + 9'd1;
        if (chunk_full) begin
          wr_done_tgl[cur] <= ~wr_done_tgl[cur];
          bank_rows[cur]   <= chunk;
          cur <= ~cur;
          row <= '0;
          if (!bank_free[~cur]) begin accept <= 1'b0; overflow <= 1'b1; end
        end
      end
      if (closing) begin
        wr_done_tgl[cur] <= ~wr_done_tgl[cur];
        bank_rows[cur]   <= (fmt == 2'd1) ? 9'd195 : row + 9'd1;
        cur    <= ~cur;
        accept <= 1'b0;
      end
      // a new event may start in the clock that closes the previous one
      if (evt_start) begin
        q   <= '0;
        row <= (fmt == 2'd2) ? 9'd2 : 9'd0;
        if (bank_free[start_bank]) accept <= 1'b1;
        else begin accept <= 1'b0; overflow <= 1'b1; end
      end
    end
  end

  // a data word never coincides with the status row or the format 2 row 0
  assert property (@(posedge clk) disable iff (!rst_n)
                   (closing || pend_row0) |-> !(word_valid && word.kind != WK_END &&
                                                !(word.kind == WK_CTRL2 && pend_row0)))
    else $error("data_organizer: write port collision");

endmodule
