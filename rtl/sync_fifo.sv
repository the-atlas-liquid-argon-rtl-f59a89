// sync_fifo: single-clock first-in first-out buffer.
//
// DEPTH words of WIDTH bits; `count` is the number of words held. A write
// when full and a read when empty are ignored. Read data is the head word,
// available combinationally while not empty (show-ahead). Used for the TTC
// buffers and the McBSP2 FIFOs of the output FPGA.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic [AW:0]      count,
  output logic             empty,
  output logic             full
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rdata = mem[rp];

  always_ff @(posedge clk) if (do_wr) mem[wp] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin wp <= '0; rp <= '0; count <= '0; end
    else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule
