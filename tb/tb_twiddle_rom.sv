// tb_twiddle_rom: checks all 16 twiddle factors against exp(-j*2*pi*n/32)
// computed with real arithmetic, scaled by 1024 and truncated toward zero.
module tb_twiddle_rom;
  logic [3:0] adr_tw;
  logic signed [15:0] tw_re, tw_im;
  int checks = 0, failures = 0;
  real pi = 3.14159265358979323846;

  twiddle_rom dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // round toward zero
  function automatic int trunc0(real x);
    return (x >= 0.0) ? int'($floor(x)) : -int'($floor(-x));
  endfunction

  initial begin
    for (int n = 0; n < 16; n++) begin
      int er, ei;
      adr_tw = 4'(n);
      #1;
      er = trunc0(1024.0 * $cos(2.0 * pi * n / 32.0));
      ei = trunc0(-1024.0 * $sin(2.0 * pi * n / 32.0));
      checks += 2;
      if (int'(tw_re) != er) begin
        failures++;
        $display("FAIL re[%0d]: got %0d expected %0d", n, tw_re, er);
      end
      if (int'(tw_im) != ei) begin
        failures++;
        $display("FAIL im[%0d]: got %0d expected %0d", n, tw_im, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
