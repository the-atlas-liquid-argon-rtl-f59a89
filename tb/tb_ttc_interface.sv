// tb_ttc_interface: sends bursts of TTC BCID/EVTID and trigger-type frames
// with the minimum 2-clock gap, decodes the McBSP0/McBSP1 outputs and checks
// that every frame arrives once, in order, with all bits right; also checks
// the frame-error flag for a frame cut short.
`timescale 1ns/1ps
module tb_ttc_interface;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic bcid_frame = 0, bcid_data = 0, ttype_frame = 0, ttype_data = 0;
  logic mcbsp0_fs, mcbsp0_dx, mcbsp1_fs, mcbsp1_dx, frame_err, overflow, tp_bcid_frame;

  ttc_interface dut (.clk, .rst_n, .bcid_frame, .bcid_data, .ttype_frame, .ttype_data,
                     .mcbsp0_fs, .mcbsp0_dx, .mcbsp1_fs, .mcbsp1_dx, .frame_err,
                     .overflow, .tp_bcid_frame);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [43:0] sent_b[$], got_b[$];
  logic [7:0]  sent_t[$], got_t[$];
  int errs = 0;

  task automatic send_bcid(logic [11:0] bcid, logic [31:0] evt, int len = 44);
    logic [43:0] w = {bcid, evt};
    @(negedge clk) bcid_frame = 1;
    @(negedge clk) bcid_frame = 0;
    for (int i = 43; i > 43 - len; i--) begin bcid_data = w[i]; @(negedge clk); end
    bcid_data = 0;
    if (len == 44) sent_b.push_back(w);
    repeat (1) @(negedge clk);
  endtask
  task automatic send_tt(logic [7:0] t);
    @(negedge clk) ttype_frame = 1;
    @(negedge clk) ttype_frame = 0;
    for (int i = 7; i >= 0; i--) begin ttype_data = t[i]; @(negedge clk); end
    ttype_data = 0;
    sent_t.push_back(t);
    repeat (1) @(negedge clk);
  endtask

  // McBSP receivers of the testbench: frame sync, then MSB first
  initial forever begin
    logic [43:0] w;
    @(posedge clk iff (rst_n && mcbsp0_fs));
    for (int i = 43; i >= 0; i--) begin @(posedge clk); w[i] = mcbsp0_dx; end
    got_b.push_back(w);
  end
  initial forever begin
    logic [7:0] w;
    @(posedge clk iff (rst_n && mcbsp1_fs));
    for (int i = 7; i >= 0; i--) begin @(posedge clk); w[i] = mcbsp1_dx; end
    got_t.push_back(w);
  end
  always @(posedge clk) if (rst_n && frame_err) errs++;

  int tp = 0;
  always @(posedge clk) if (rst_n && tp_bcid_frame) tp++;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      for (int k = 0; k < 6; k++) send_bcid(12'(100 * k + 7), 32'hA5000000 + k * 32'h01010101);
      for (int k = 0; k < 10; k++) send_tt(8'(k * 37 + 1));
    join
    repeat (500) @(negedge clk);
    check(got_b.size() == sent_b.size(), $sformatf("%0d BCID frames of %0d", got_b.size(), sent_b.size()));
    check(got_t.size() == sent_t.size(), $sformatf("%0d TType frames of %0d", got_t.size(), sent_t.size()));
    for (int i = 0; i < sent_b.size() && i < got_b.size(); i++)
      check(got_b[i] == sent_b[i], $sformatf("BCID frame %0d: %h expected %h", i, got_b[i], sent_b[i]));
    for (int i = 0; i < sent_t.size() && i < got_t.size(); i++)
      check(got_t[i] == sent_t[i], $sformatf("TType frame %0d: %h expected %h", i, got_t[i], sent_t[i]));
    check(errs == 0, "no frame error on clean frames");
    check(tp == 6, "test point shows each BCID frame");
    // a frame cut short by the next frame pulse
    send_bcid(12'h111, 32'h1, 20);
    send_bcid(12'h222, 32'h2);
    repeat (100) @(negedge clk);
    check(errs == 1, "frame error for the short frame");
    check(got_b.size() == 7 && got_b[6] == {12'h222, 32'h2}, "frame after the error received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
