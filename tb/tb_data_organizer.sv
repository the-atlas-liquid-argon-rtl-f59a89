// tb_data_organizer: drives the organizer with tagged word streams of whole
// events, models the RAM and the DSP side, and compares every bank handed
// over with the expected layout of formats 0, 1 and 2, including chunked
// events and an event dropped because both banks are full.
`timescale 1ns/1ps
module tb_data_organizer;
  import rod_pkg::*;
  import feb_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #6.25 clk = ~clk;

  logic [1:0]  fmt = 0;
  infpga_cfg_t cfg;
  logic        word_valid = 0, evt_start = 0, evt_done = 0;
  feb_word_t   word;
  logic [31:0] status = 0;
  logic [8:0]  waddr;
  logic [3:0]  wlane;
  logic [63:0] wdata;
  logic [1:0]  wr_done_tgl, rd_free_tgl = 0;
  logic [8:0]  bank_rows [2];
  logic        overflow, busy;

  data_organizer dut (.clk, .rst_n, .fmt, .cfg, .word_valid, .word, .evt_start,
                      .evt_done, .status, .waddr, .wlane, .wdata, .wr_done_tgl,
                      .bank_rows, .rd_free_tgl, .overflow, .busy);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [63:0] mem [512];
  always @(posedge clk)
    for (int l = 0; l < 4; l++) if (wlane[l]) mem[waddr][l*16 +: 16] <= wdata[l*16 +: 16];

  // DSP model: collects handed-over banks, frees them unless held
  logic [63:0] got[$];
  bit hold = 0;
  int banks_seen = 0, overflows = 0;
  logic [1:0] seen_tgl = 0;
  always @(posedge clk) begin
    if (overflow) overflows++;
    for (int b = 0; b < 2; b++)
      if (wr_done_tgl[b] != seen_tgl[b] && !hold) begin
        seen_tgl[b] = wr_done_tgl[b];
        banks_seen++;
        for (int r = 0; r < int'(bank_rows[b]); r++) got.push_back(mem[b*256 + r]);
        rd_free_tgl[b] <= ~rd_free_tgl[b];
      end
  end

  task automatic send(int ns, int ng, int evt, int bcid, logic [31:0] st);
    int nw = words_per_adc(ns, ng);
    cfg.nb_samples = 6'(ns); cfg.nb_gains = 2'(ng);
    @(negedge clk) evt_start = 1;
    @(negedge clk) evt_start = 0;
    repeat (20) @(negedge clk);
    status = st;
    for (int n = 1; n < nw; n++) begin
      pos_t p = decode(n, ns, ng);
      for (int q = 0; q < 16; q++) begin
        int a = (q % 2) * 8 + q / 2;
        word.data = gen_word(a, n, ns, ng, evt, bcid);
        word.adc = 4'(a);
        word.kind = p.kind == K_CTRL1 ? WK_CTRL1 : p.kind == K_CTRL2 ? WK_CTRL2 :
                    p.kind == K_RADD ? WK_RADD : p.kind == K_DATA ? WK_DATA :
                    p.kind == K_CTRL3 ? WK_CTRL3 : WK_END;
        word.sample = 5'(p.s); word.gain = 2'(p.g); word.chan = 3'(p.c);
        word_valid = 1;
        evt_done = (n == nw - 1 && q == 15);
        @(negedge clk);
      end
    end
    word_valid = 0; evt_done = 0;
    repeat (10) @(negedge clk);
  endtask

  task automatic run(int f, int ns, int ng, int chunk, int expect_banks);
    logic [63:0] exp_rows[$];
    int b0 = banks_seen;
    fmt = 2'(f); cfg.chunk_m1 = 8'(chunk - 1);
    got.delete();
    expected_rows(f, ns, ng, 3 + f, 200 + ns, 32'h0000_8123, exp_rows);
    send(ns, ng, 3 + f, 200 + ns, 32'h0000_8123);
    repeat (5) @(negedge clk);
    check(banks_seen - b0 == expect_banks, $sformatf("fmt %0d %0dx%0d: %0d banks", f, ns, ng, banks_seen - b0));
    check(got.size() == exp_rows.size(), $sformatf("fmt %0d %0dx%0d: %0d rows, expected %0d",
                                                   f, ns, ng, got.size(), exp_rows.size()));
    for (int i = 0; i < exp_rows.size() && i < got.size(); i++)
      check(got[i] == exp_rows[i], $sformatf("fmt %0d row %0d: %h expected %h", f, i, got[i], exp_rows[i]));
  endtask

  initial begin
    cfg = INFPGA_CFG_RESET;
    word = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    run(0, 5, 1, 256, 1);     // 193 rows
    run(2, 5, 1, 256, 1);     // 183 rows
    run(1, 5, 1, 256, 1);     // 195 rows
    run(0, 7, 1, 100, 3);     // 265 rows in chunks of 100
    run(2, 3, 3, 256, 2);     // 303 rows
    run(0, 3, 1, 256, 1);     // 121 rows
    // both banks held by the DSP: the third event is dropped
    hold = 1;
    begin
      int o0 = overflows;
      logic [63:0] dummy[$];
      fmt = 0; cfg.chunk_m1 = 8'hFF;
      send(3, 1, 1, 1, 0);
      send(3, 1, 2, 2, 0);
      check(busy, "busy with both banks full");
      send(3, 1, 3, 3, 0);
      check(overflows == o0 + 1, "event dropped when no bank is free");
    end
    hold = 0;
    repeat (10) @(negedge clk);
    check(!busy, "busy clears once banks are read");
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
