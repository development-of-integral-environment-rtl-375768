// tb_error_discriminator: random and corner-case check of the saturated
// error reference - feedback.
module tb_error_discriminator;
  logic signed [15:0] ref_in, fb, err;
  int checks = 0, failures = 0, sats = 0;
  int d, ex;

  error_discriminator dut (.ref_in, .fb, .err);

  initial begin
    for (int i = 0; i < 20000; i++) begin
      ref_in = $urandom; fb = $urandom;
      if (i < 4) begin
        ref_in = (i[0]) ? 16'sh7fff : 16'sh8000;
        fb     = (i[1]) ? 16'sh7fff : 16'sh8000;
      end
      #1;
      d  = int'(ref_in) - int'(fb);
      ex = d > 32767 ? 32767 : (d < -32768 ? -32768 : d);
      if (ex != d) sats++;
      checks++;
      if (int'(err) != ex) begin
        failures++;
        if (failures < 10) $display("FAIL ref=%0d fb=%0d err=%0d exp=%0d", ref_in, fb, err, ex);
      end
    end
    checks++; if (sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
