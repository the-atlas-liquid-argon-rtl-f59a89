// infpga_programmer: serial configuration of an input FPGA from VME.
//
// Each byte written to the InFPGA programming register is shifted out on
// `data0`, least significant bit first, with `dclk` running at the system
// clock divided by DIV (40 MHz / 8 = 5 MHz). data0 changes while dclk is low
// and holds through its rising edge. `busy` is high while a byte is being
// sent; a byte loaded while busy is ignored (the host polls busy through the
// status register). nconfig is driven straight from the control register
// bit "/Input fpga nconfig"; conf_done and nstatus come back from the FPGA.
//
// From the document: programming through data0/dclk/nconfig at 5 MHz, one
// byte per register write, broadcast to both input FPGAs. This design's own:
// LSB-first order (the passive-serial convention of this FPGA family) and the
// drop-while-busy policy.
module infpga_programmer #(
  parameter int unsigned DIV = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [7:0] byte_in,
  output logic       busy,
  output logic       dclk,
  output logic       data0
);
  localparam int unsigned CW = $clog2(DIV);
  logic [CW-1:0] div_cnt;
  logic [3:0]    bits_left;
  logic [7:0]    sh;

  assign busy = (bits_left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0; bits_left <= '0; sh <= '0; dclk <= 1'b0; data0 <= 1'b0;
    end else if (!busy) begin
      dclk <= 1'b0;
      if (load) begin
        sh <= byte_in; bits_left <= 4'd8; div_cnt <= '0;
      end
    end else begin
      div_cnt <= (div_cnt == CW'(DIV - 1)) ? '0 : div_cnt + 1'b1;
      if (div_cnt == '0) begin
        data0 <= sh[0];                 // new bit while dclk is low
        dclk  <= 1'b0;
      end else if (div_cnt == CW'(DIV / 2)) begin
        dclk  <= 1'b1;                  // rising edge in mid-bit
      end else if (div_cnt == CW'(DIV - 1)) begin
        sh <= {1'b0, sh[7:1]};
        bits_left <= bits_left - 4'd1;
      end
    end
  end
endmodule
