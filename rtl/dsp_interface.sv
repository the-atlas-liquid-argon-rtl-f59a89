// dsp_interface: EMIFA read side of one FEB's dual-port RAM.
//
// Runs on the DSP EMIFA clock (120 MHz). Bank hand-over toggles from the FEB
// clock domain are synchronized with two flip-flops; when the bank the DSP is
// due to read becomes full, a one-clock interrupt pulse is sent (EXT_INT4 or
// EXT_INT5 of the DSP). The DSP then reads the bank as a FIFO: every clock in
// which its chip enable and read strobe are both low fetches the next row, so
// no address is needed. Read data appears two clocks after the strobe (one
// RAM clock, one output register). When the last row of the bank has been
// fetched, the bank is released to the writer by toggling rd_free_tgl and the
// other bank becomes the one to read.
//
// From the document: one interrupt and one chip enable per FEB, FIFO-like
// sequential reading, the 120 MHz EMIFA clock and the 2-cycle data latency.
// This design's own: the toggle handshake, the interrupt being a pulse and
// reads past the end of a bank returning the last row fetched.
module dsp_interface #(
  parameter int unsigned BANK_ROWS = 256,
  parameter int unsigned AW        = $clog2(2 * BANK_ROWS)
) (
  input  logic          clk,          // EMIFA clock
  input  logic          rst_n,
  // bank handshake (from the FEB clock domain)
  input  logic [1:0]    wr_done_tgl,
  input  logic [8:0]    bank_rows [2],
  output logic [1:0]    rd_free_tgl,
  // RAM read port
  output logic          re,
  output logic [AW-1:0] raddr,
  input  logic [63:0]   rdata,
  // EMIFA
  input  logic          ce_n,
  input  logic          are_n,
  output logic [63:0]   ed,
  output logic          ed_valid,     // ed holds a row fetched two clocks ago
  output logic          dsp_int
);
  localparam int unsigned RW = AW - 1;

  logic [1:0] done_s1, done_s2;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin done_s1 <= '0; done_s2 <= '0; end
    else begin done_s1 <= wr_done_tgl; done_s2 <= done_s1; end

  logic       rbank, announced;
  logic [8:0] rcount, rows;
  logic       ready;
  assign ready = done_s2[rbank] ^ rd_free_tgl[rbank];
  assign rows  = bank_rows[rbank];

  logic rd;
  assign rd    = ready && !ce_n && !are_n;
  assign re    = rd;
  assign raddr = {rbank, rcount[RW-1:0]};

  logic rd_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbank <= 1'b0; announced <= 1'b0; rcount <= '0; rd_free_tgl <= '0;
      dsp_int <= 1'b0; rd_q <= 1'b0; ed_valid <= 1'b0; ed <= '0;
    end else begin
      dsp_int  <= ready && !announced;
      if (ready && !announced) announced <= 1'b1;
      rd_q     <= rd;
      ed_valid <= rd_q;
      if (rd_q) ed <= rdata;
      if (rd) begin
        if (rcount + 9'd1 >= rows) begin
          rcount <= '0;
          rd_free_tgl[rbank] <= ~rd_free_tgl[rbank];
          rbank <= ~rbank;
          announced <= 1'b0;
        end else rcount <= rcount + 9'd1;
      end
    end
  end
endmodule
