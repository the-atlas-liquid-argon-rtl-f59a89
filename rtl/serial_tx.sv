// serial_tx: framed serial transmitter, most significant bit first.
//
// Takes a word when `load` is high and `ready` is high, sends a one-clock
// frame sync pulse, then the WIDTH bits one per clock from the next clock on
// (the McBSP receive format with a one-bit data delay). `ready` is low while
// a frame is being sent. Used for McBSP0/McBSP1 (TTC data to the DSPs) and
// for McBSP2 writes to a DSP. The frame format mirrors serial_rx; the
// framing details are this design's choice.
module serial_tx #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] word,
  output logic             ready,
  output logic             fs,
  output logic             dx
);
  localparam int unsigned CW = $clog2(WIDTH + 1);
  logic [CW-1:0]    left;
  logic [WIDTH-1:0] sh;

  assign ready = (left == '0) && !fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0; sh <= '0; fs <= 1'b0; dx <= 1'b0;
    end else begin
      fs <= 1'b0;
      if (load && ready) begin
        sh <= word; fs <= 1'b1; left <= CW'(WIDTH); dx <= 1'b0;
      end else if (left != '0) begin
        dx   <= sh[WIDTH-1];
        sh   <= {sh[WIDTH-2:0], 1'b0};
        left <= left - 1'b1;
      end else dx <= 1'b0;
    end
  end
endmodule
