// tb_feb_parallelizer: self-checking test of the FEB parallelizer.
//
// Serializes whole FEB events onto the 17-bit bus with the reference model of
// feb_tb_pkg, checks every word leaving the MUX (value, ADC, kind, sample,
// gain, channel, order) for clean events of 5x1 and 3x3 samples x gains, and
// checks the event status word for events with injected errors: parity,
// gain change, BCID/RADD/EVTID mismatches, bad SCAC trailers, missing end
// tag, non-zero ADC0 identifier, missing start tag, flag-bit start and flag
// alternation faults.
`timescale 1ns/1ps
module tb_feb_parallelizer;
  import rod_pkg::*;
  import feb_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #6.25 clk = ~clk;  // 80 MHz

  logic [16:0] feb_data = '0;
  logic [5:0]  nb_samples;
  logic [1:0]  nb_gains;
  logic        word_valid, evt_start, evt_done, in_event;
  feb_word_t   word;
  logic [31:0] status;

  feb_parallelizer dut (.clk, .rst_n, .feb_data, .nb_samples, .nb_gains,
                        .feb_id(1'b1), .word_valid, .word, .evt_start, .evt_done,
                        .status, .in_event);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected words of a clean event
  typedef struct { logic [15:0] data; int adc; word_kind_e kind; int s, g, c; } exp_t;
  exp_t exp_q[$];
  bit   compare_words;
  int   words_seen;

  logic [15:0] ev [16][];

  // inject: 0 none, 1 parity, 2 gain, 3 bcid within, 4 scac, 5 end, 6 adcid +
  // radd between, 7 missing start tag, 8 flag start, 9 flag alternation
  task automatic send_event(int ns, int ng, int evt, int bcid, int inject);
    int nw = words_per_adc(ns, ng);
    logic [15:0] slot [16];
    nb_samples = 6'(ns); nb_gains = 2'(ng);
    for (int a = 0; a < 16; a++) begin
      ev[a] = new[nw];
      for (int n = 0; n < nw; n++) ev[a][n] = gen_word(a, n, ns, ng, evt, bcid);
    end
    case (inject)
      1: ev[6][3 + 4] ^= 16'h0001;                       // parity
      2: ev[2][3 + (1 + 8*ng) + 1 + 4] ^= 16'h5000;      // gain of s=1, ch 4 (parity kept)
      3: ev[3][2] = with_parity(ev[3][2] ^ 16'h0001);    // BCID within HFEB1
      4: begin
           ev[9][nw-2]  = 16'h0805;                      // valid but different
           ev[10][nw-2] = with_parity(16'h0803);         // invalid value
         end
      5: ev[5][nw-1] = 16'h0100;                         // end tag missing
      6: begin
           ev[0][1] = with_parity(ev[0][1] | 16'h0200);  // ADC0 ID
           for (int a = 8; a < 16; a++) ev[a][3] = with_parity(ev[a][3] ^ 16'h0004);
         end
      7: ev[5][0] = 16'h7FFF;                            // start tag missing
      default: ;
    endcase
    if (inject == 0) begin
      for (int n = 1; n < nw; n++) begin
        pos_t p = decode(n, ns, ng);
        for (int q = 0; q < 16; q++) begin
          exp_t e;
          e.adc = (q % 2) * 8 + q / 2;
          e.data = ev[e.adc][n];
          e.kind = p.kind == K_CTRL1 ? WK_CTRL1 : p.kind == K_CTRL2 ? WK_CTRL2 :
                   p.kind == K_RADD ? WK_RADD : p.kind == K_DATA ? WK_DATA :
                   p.kind == K_CTRL3 ? WK_CTRL3 : WK_END;
          e.s = p.s; e.g = p.g; e.c = p.c;
          exp_q.push_back(e);
        end
      end
    end
    compare_words = (inject == 0);
    for (int n = 0; n < nw; n++) begin
      for (int a = 0; a < 16; a++) slot[a] = ev[a][n];
      for (int k = 0; k < 16; k++) begin
        int kk = (inject == 8) ? (k ^ 1) : k;
        logic [16:0] b = bus_value(slot, kk);
        if (inject == 9 && n == nw - 1 && k == 5) b[16] = ~b[16];
        @(negedge clk) feb_data = b;
      end
    end
    // idle gap
    for (int k = 0; k < 64; k++) @(negedge clk) feb_data = {1'((k+1) % 2), 16'h0};
  endtask

  always @(posedge clk) if (rst_n && word_valid) begin
    words_seen++;
    if (compare_words) begin
      if (exp_q.size() == 0) check(0, "unexpected word");
      else begin
        exp_t e;
        e = exp_q.pop_front();
        check(word.data == e.data && int'(word.adc) == e.adc && word.kind == e.kind &&
              (e.kind != WK_DATA || (int'(word.sample) == e.s && int'(word.gain) == e.g &&
                                     int'(word.chan) == e.c)),
              $sformatf("word adc %0d kind %0d: got %h/%0d/%0d exp %h", e.adc, e.kind,
                        word.data, word.adc, word.kind, e.data));
      end
    end
  end

  int dones = 0;
  logic [31:0] last_status;
  always @(posedge clk) if (rst_n && evt_done) begin dones++; last_status = status; end

  task automatic run_and_check(int ns, int ng, int inject, logic [31:0] mask, logic [31:0] expv);
    int d0 = dones;
    send_event(ns, ng, 7 + inject, 100 + inject, inject);
    check(dones == d0 + 1, $sformatf("event %0d done count %0d", inject, dones - d0));
    check((last_status & mask) == expv,
          $sformatf("inject %0d status %h (mask %h) expected %h", inject, last_status & mask, mask, expv));
  endtask

  localparam logic [31:0] ALL = 32'hFFFF_FFFF;

  initial begin
    nb_samples = 5; nb_gains = 1;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk) feb_data = {1'(($time / 12) % 2), 16'h0};
    run_and_check(5, 1, 0, ALL, 32'h0000_8000);
    check(exp_q.size() == 0, "all words of the 5x1 event seen");
    run_and_check(3, 3, 0, ALL, 32'h0000_8000);
    check(exp_q.size() == 0, "all words of the 3x3 event seen");
    run_and_check(5, 1, 1, ALL, 32'h0000_8040);
    run_and_check(5, 1, 2, ALL, 32'h0000_8020);
    run_and_check(5, 1, 3, ALL, 32'h0000_8004);
    run_and_check(5, 1, 4, ALL, 32'h0000_9010);
    run_and_check(5, 1, 5, ALL, 32'h0000_8400);
    run_and_check(5, 1, 6, ALL, 32'h0000_C100);
    run_and_check(5, 1, 7, 32'h0000_0001, 32'h0000_0001);
    run_and_check(5, 1, 8, 32'h0001_0001, 32'h0001_0001);
    run_and_check(5, 1, 9, 32'h0002_0000, 32'h0002_0000);
    // a clean event after the faults is clean again
    run_and_check(5, 1, 0, ALL, 32'h0000_8000);
    check(exp_q.size() == 0, "all words of the last event seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
