// button_debounce: push-button synchronizer, debouncer and press detector.
//
// The raw button level is synchronized by two flip-flops. The debounced
// level takes the synchronized value only after it has been different from
// the debounced level for 2**DEB_LOG2 consecutive clocks, so contact bounce
// shorter than that is ignored. press is a one-clock pulse on each 0 -> 1
// change of the debounced level.
//
// Part of the push-button gain entry; the method is this design's own.
//
// Interface: clk, rst (synchronous), btn (raw, active high); press.
module button_debounce #(
  parameter int unsigned DEB_LOG2 = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic btn,
  output logic press
);
  logic [1:0]          sync;
  logic                level;
  logic [DEB_LOG2-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync  <= '0;
      level <= 1'b0;
      cnt   <= '0;
      press <= 1'b0;
    end else begin
      sync  <= {sync[0], btn};
      press <= 1'b0;
      if (sync[1] == level) begin
        cnt <= '0;
      end else if (cnt == {DEB_LOG2{1'b1}}) begin
        cnt   <= '0;
        level <= sync[1];
        press <= sync[1];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
