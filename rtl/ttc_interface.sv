// ttc_interface: TTC reception and distribution to the DSPs (output FPGA).
//
// The motherboard TTC FPGA sends, on a 40 MHz clock, a BCID frame (frame
// pulse, then 12 BCID bits and 32 event-ID bits, most significant bit first)
// and a trigger-type frame (frame pulse, then 8 bits). Each frame is
// deserialized, buffered in a FIFO and re-sent to the DSPs as one McBSP frame:
// McBSP0 carries {BCID, EVTID} (44 bits), McBSP1 the trigger type. The same
// McBSP0/McBSP1 lines go to both DSPs of the board. The McBSP bit clock is
// the TTC clock itself.
//
// From the document: the field widths and order, the MSB-first order, one
// McBSP per stream, the buffering in the output FPGA and the test point on
// the BCID frame. This design's own: the FIFO depths, the 44-bit single
// McBSP frame for BCID+EVTID and the one-clock data delay after each frame
// pulse (as in serial_rx/serial_tx).
module ttc_interface #(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic clk,            // 40 MHz TTC clock
  input  logic rst_n,
  input  logic bcid_frame,
  input  logic bcid_data,
  input  logic ttype_frame,
  input  logic ttype_data,
  // McBSP0 (BCID + event ID) and McBSP1 (trigger type), to both DSPs
  output logic mcbsp0_fs,
  output logic mcbsp0_dx,
  output logic mcbsp1_fs,
  output logic mcbsp1_dx,
  output logic frame_err,      // a frame pulse cut a frame short
  output logic overflow,       // a frame arrived with its FIFO full
  output logic tp_bcid_frame   // test point
);
  localparam int unsigned AW = $clog2(FIFO_DEPTH);

  logic        b_valid, t_valid, b_err, t_err;
  logic [43:0] b_word, b_head;
  logic [7:0]  t_word, t_head;
  logic        b_empty, b_full, t_empty, t_full, b_ready, t_ready;
  logic [AW:0] b_count, t_count;

  serial_rx #(.WIDTH(44)) u_rx_bcid (.clk, .rst_n, .frame(bcid_frame), .sdata(bcid_data),
                                     .valid(b_valid), .word(b_word), .frame_err(b_err));
  serial_rx #(.WIDTH(8))  u_rx_tt   (.clk, .rst_n, .frame(ttype_frame), .sdata(ttype_data),
                                     .valid(t_valid), .word(t_word), .frame_err(t_err));

  sync_fifo #(.WIDTH(44), .DEPTH(FIFO_DEPTH)) u_fifo_bcid (
    .clk, .rst_n, .wr(b_valid), .wdata(b_word), .rd(b_ready && !b_empty),
    .rdata(b_head), .count(b_count), .empty(b_empty), .full(b_full));
  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo_tt (
    .clk, .rst_n, .wr(t_valid), .wdata(t_word), .rd(t_ready && !t_empty),
    .rdata(t_head), .count(t_count), .empty(t_empty), .full(t_full));

  serial_tx #(.WIDTH(44)) u_tx_bcid (.clk, .rst_n, .load(!b_empty), .word(b_head),
                                     .ready(b_ready), .fs(mcbsp0_fs), .dx(mcbsp0_dx));
  serial_tx #(.WIDTH(8))  u_tx_tt   (.clk, .rst_n, .load(!t_empty), .word(t_head),
                                     .ready(t_ready), .fs(mcbsp1_fs), .dx(mcbsp1_dx));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin frame_err <= 1'b0; overflow <= 1'b0; end
    else begin
      frame_err <= b_err || t_err;
      overflow  <= (b_valid && b_full) || (t_valid && t_full);
    end

  assign tp_bcid_frame = bcid_frame;
endmodule
