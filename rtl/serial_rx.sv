// serial_rx: framed serial receiver, most significant bit first.
//
// A one-clock frame pulse marks a frame; the WIDTH data bits follow on
// `sdata`, one per clock, starting in the clock after the frame pulse. When
// the last bit has been taken, `valid` pulses for one clock with the word.
// A frame pulse during reception restarts the frame and raises `frame_err`
// for one clock. Used for the TTC BCID/EVTID and trigger-type lines and for
// the McBSP2 link from the DSP. Bit order and frame pulse width follow the
// TTC timing diagram; the one-clock delay between frame pulse and first bit
// is this design's reading of it and matches the McBSP one-bit data delay.
module serial_rx #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             frame,
  input  logic             sdata,
  output logic             valid,
  output logic [WIDTH-1:0] word,
  output logic             frame_err
);
  localparam int unsigned CW = $clog2(WIDTH + 1);
  logic [CW-1:0]    left;   // bits still to receive
  logic [WIDTH-1:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0; sh <= '0; valid <= 1'b0; word <= '0; frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      if (frame) begin
        frame_err <= (left != '0);
        left <= CW'(WIDTH);
      end else if (left != '0) begin
        sh   <= {sh[WIDTH-2:0], sdata};
        left <= left - 1'b1;
        if (left == CW'(1)) begin
          valid <= 1'b1;
          word  <= {sh[WIDTH-2:0], sdata};
        end
      end
    end
  end
endmodule
