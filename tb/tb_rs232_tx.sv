// tb_rs232_tx: the line is decoded by sampling the middle of each bit;
// both 8N1 characters (high byte first) must carry the word, the frame
// must take 20 bit times, and a send while busy must be ignored.
module tb_rs232_tx;
  localparam int DIV = 10;
  logic clk = 0, rst = 1, send = 0, tx, busy;
  logic [15:0] data = 0;
  int checks = 0, failures = 0;

  rs232_tx #(.BAUD(100), .CLK_FREQ(100 * DIV)) dut (.clk, .rst, .send, .data, .tx, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic rx_byte(output logic [7:0] b, output bit framing_ok);
    // called on the clock where the start bit begins
    repeat (DIV / 2) @(posedge clk);
    #1 framing_ok = (tx == 0);
    for (int i = 0; i < 8; i++) begin
      repeat (DIV) @(posedge clk);
      #1 b[i] = tx;
    end
    repeat (DIV) @(posedge clk);
    #1 framing_ok = framing_ok && (tx == 1);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] hi, lo;
    logic [15:0] w;
    bit f1, f2;
    int t0, busy_cycles;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    #1 check(tx == 1 && !busy, "idle high");
    for (int k = 0; k < 200; k++) begin
      w = $urandom;
      data <= w; send <= 1;
      @(posedge clk);
      send <= 0; data <= ~w;
      fork
        begin
          // a send in the middle of the frame must be ignored
          repeat (5 * DIV) @(posedge clk);
          send <= 1; @(posedge clk); send <= 0;
        end
        begin
          busy_cycles = 0;
          #1;
          while (busy) begin @(posedge clk); #1; busy_cycles++; end
        end
        begin
          rx_byte(hi, f1);
          // next start bit follows immediately
          repeat (DIV / 2) @(posedge clk);
          rx_byte(lo, f2);
        end
      join
      check(f1 && f2, "start and stop bits");
      check({hi, lo} == w, "data word");
      check(busy_cycles == 20 * DIV, "frame length 20 bit times");
      repeat ($urandom_range(0, 30)) @(posedge clk);
      #1 check(tx == 1 && !busy, "idle after frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
