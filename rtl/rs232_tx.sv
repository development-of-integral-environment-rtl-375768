// rs232_tx: RS-232 transmitter for one 16-bit sample.
//
// On a send strobe while idle it transmits the 16-bit data word as two
// asynchronous characters, high byte first, each 8N1 (start bit 0, eight
// data bits LSB first, stop bit 1), at BAUD bits per second. The line idles
// high. A send strobe while busy is ignored.
//
// The document only names an RS-232 block for the toolbox; the word size,
// byte order, framing and rate are this design's own choices.
//
// Interface: clk, rst (synchronous), send (strobe), data; tx (line), busy.
// One word takes 20 bit times, 20 * CLK_FREQ/BAUD clocks.
module rs232_tx
  import fpga_rt_pkg::*;
#(
  parameter int unsigned BAUD     = 115_200,
  parameter int unsigned CLK_FREQ = CLK_HZ
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        send,
  input  logic [15:0] data,
  output logic        tx,
  output logic        busy
);
  localparam int unsigned DIV  = CLK_FREQ / BAUD;
  localparam int unsigned DV_W = $clog2(DIV + 1);

  logic [19:0]     shreg;
  logic [4:0]      bits_left;
  logic [DV_W-1:0] div_cnt;

  assign busy = (bits_left != 0);
  assign tx   = busy ? shreg[0] : 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      bits_left <= '0;
      div_cnt   <= '0;
    end else if (!busy) begin
      if (send) begin
        shreg     <= {1'b1, data[7:0], 1'b0, 1'b1, data[15:8], 1'b0};
        bits_left <= 5'd20;
        div_cnt   <= '0;
      end
    end else if (32'(div_cnt) == DIV - 1) begin
      div_cnt   <= '0;
      shreg     <= {1'b1, shreg[19:1]};
      bits_left <= bits_left - 1'b1;
    end else begin
      div_cnt <= div_cnt + 1'b1;
    end
  end
endmodule
