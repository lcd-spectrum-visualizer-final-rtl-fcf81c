// tb_fft_top: end-to-end test of the SPI-attached 32-point FFT at its default
// (and only) size. A bit-banged SPI master plays the host microcontroller:
// raise LOAD and CE, send 32 samples, drop LOAD, wait for FFT_DONE, clock out
// 32 x 32 result bits. Every result is compared bit for bit with a reference
// FFT computed here (textbook decimation-in-time loops, twiddles from $cos/$sin
// truncated toward zero, products floored by 2^10, 16-bit wrap), and within a
// tolerance with an exact real-valued DFT. Input sets: DC, a tone in bin 3,
// random 10-bit ADC codes as the host sends them, random signed values, and a
// run aborted by a new LOAD. Checks the 80-cycle FFT latency and counts the
// mechanisms: bit-reversed loads, RAM ping-pong switches, completed FFTs,
// output word reloads, SCK edges ignored with CE low, and restarts by LOAD.
module tb_fft_top;
  import fft_pkg::*;
  localparam int HALF = 40;            // SCK half period: 4 clk periods
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic load = 0, ce = 0, sck = 0, sdi = 0, sdo, fft_done;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_bitrev_writes = 0, n_pingpong = 0, n_done = 0, n_reload = 0;
  int n_ce_ignored = 0, n_restart = 0;

  fft_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- observation ----------------
  logic prev_sel = 0, prev_done = 0, prev_loads = 0;
  int   lat = 0, last_latency = -1;
  always @(posedge clk) begin
    if (dut.we1 && dut.we2 && dut.load_s && dut.adr_a != 0 && dut.adr_a != 31)
      n_bitrev_writes++;
    if (!dut.load_s && !fft_done && dut.rd_select != prev_sel) n_pingpong++;
    prev_sel <= dut.rd_select;
    if (fft_done && !prev_done) begin
      n_done++;
      last_latency = lat;
    end
    prev_done <= fft_done;
    if (dut.load_s) lat = 0;
    else if (!fft_done) lat++;
    if (dut.u_spi.sck_sync[1] && !dut.u_spi.sck_q && !dut.u_spi.ce_s) n_ce_ignored++;
    if (dut.u_spi.out_mode && dut.u_spi.sck_fall && dut.u_spi.out_bit == 31) n_reload++;
  end

  // ---------------- SPI master ----------------
  task automatic spi_xfer16(input logic [15:0] tx, output logic [15:0] rx);
    rx = 0;
    for (int i = 15; i >= 0; i--) begin
      sdi = tx[i];
      #HALF sck = 1;
      rx = {rx[14:0], sdo};
      #HALF sck = 0;
    end
  endtask

  task automatic send_samples(input logic signed [15:0] x [32]);
    logic [15:0] rx;
    load = 1; #30; ce = 1; #30;
    for (int k = 0; k < 32; k++) begin
      spi_xfer16(x[k], rx);
      if (k == 10) begin
        // a burst of SCK while CE is low (e.g. the host talking to the LCD)
        ce = 0; #30;
        spi_xfer16(16'hA5A5, rx);
        #30; ce = 1; #30;
      end
    end
    #30; load = 0;
  endtask

  task automatic read_results(output cplx_t y [32]);
    logic [15:0] re, im;
    wait (fft_done);
    #100;
    for (int k = 0; k < 32; k++) begin
      spi_xfer16(16'hFFFF, re);
      spi_xfer16(16'hFFFF, im);
      y[k] = {re, im};
    end
    #30; ce = 0;
  endtask

  // ---------------- reference models ----------------
  function automatic int trunc0(real x);
    return (x >= 0.0) ? int'($floor(x)) : -int'($floor(-x));
  endfunction

  function automatic int floor1024(longint x);
    longint q = x / 1024;
    if (x < 0 && q * 1024 != x) q--;
    return int'(q);
  endfunction

  function automatic int wrap16(int x);
    return int'(16'(signed'(x[15:0])));
  endfunction

  task automatic ref_fft(input logic signed [15:0] x [32], output int yr [32], output int yi [32]);
    int ar [32], ai [32];
    for (int k = 0; k < 32; k++) begin
      int r = 0;
      for (int b = 0; b < 5; b++) if ((k & (1 << b)) != 0) r |= 1 << (4 - b);
      ar[r] = int'(x[k]); ai[r] = 0;
    end
    for (int half = 1; half < 32; half *= 2)
      for (int g = 0; g < 32; g += 2 * half)
        for (int j = 0; j < half; j++) begin
          int n = j * (16 / half);
          int wr = (n == 0) ? 1024 : trunc0(1024.0 * $cos(2.0 * PI * n / 32.0));
          int wi = trunc0(-1024.0 * $sin(2.0 * PI * n / 32.0));
          int p = g + j, q = g + j + half;
          int tr = wrap16(floor1024(longint'(ar[q]) * wr - longint'(ai[q]) * wi));
          int ti = wrap16(floor1024(longint'(ar[q]) * wi + longint'(ai[q]) * wr));
          int a0r = ar[p], a0i = ai[p];
          ar[p] = wrap16(a0r + tr); ai[p] = wrap16(a0i + ti);
          ar[q] = wrap16(a0r - tr); ai[q] = wrap16(a0i - ti);
        end
    yr = ar; yi = ai;
  endtask

  task automatic check_run(input logic signed [15:0] x [32], input string name, input real tol);
    cplx_t y [32];
    int yr [32], yi [32];
    int mism = 0;
    real maxerr = 0.0;
    send_samples(x);
    read_results(y);
    ref_fft(x, yr, yi);
    checks++;
    if (last_latency != 80) begin
      failures++;
      $display("FAIL %s: FFT latency %0d cycles, expected 80", name, last_latency);
    end
    for (int k = 0; k < 32; k++) begin
      real dr = 0.0, di = 0.0, e;
      checks += 2;
      if (int'(y[k].re) != yr[k] || int'(y[k].im) != yi[k]) begin
        failures++; mism++;
        $display("FAIL %s bin %0d: got (%0d,%0d) expected (%0d,%0d)",
                 name, k, y[k].re, y[k].im, yr[k], yi[k]);
      end
      for (int n = 0; n < 32; n++) begin
        dr += x[n] * $cos(2.0 * PI * k * n / 32.0);
        di -= x[n] * $sin(2.0 * PI * k * n / 32.0);
      end
      e = (dr - y[k].re) * (dr - y[k].re) + (di - y[k].im) * (di - y[k].im);
      e = $sqrt(e);
      if (e > maxerr) maxerr = e;
      if (e > tol) begin
        failures++;
        $display("FAIL %s bin %0d: %0.1f LSB from the exact DFT", name, k, e);
      end
    end
    $display("%s: %0d bit mismatches, worst distance from exact DFT %0.1f LSB",
             name, mism, maxerr);
  endtask

  // ---------------- stimulus ----------------
  initial begin
    logic signed [15:0] x [32];
    repeat (3) @(negedge clk);
    rst_n = 1;
    #100;

    // 1. DC level 0.5: everything in bin 0
    foreach (x[i]) x[i] = 16'sd512;
    check_run(x, "dc", 48.0);

    // 2. tone in bin 3, amplitude 0.75, as a 10-bit ADC would see it
    foreach (x[i]) x[i] = 16'(512 + trunc0(384.0 * $cos(2.0 * PI * 3 * i / 32.0)));
    check_run(x, "tone_bin3", 48.0);

    // 3. random 10-bit ADC codes (Q5.10 values 0..1023/1024)
    foreach (x[i]) x[i] = 16'($urandom_range(1023));
    check_run(x, "adc_random", 48.0);

    // 4. an FFT aborted by a new LOAD half way, then signed random data
    foreach (x[i]) x[i] = 16'($urandom_range(1023));
    send_samples(x);
    repeat (40) @(posedge clk);
    n_restart++;
    foreach (x[i]) x[i] = 16'(int'($urandom_range(2047)) - 1024);
    check_run(x, "signed_after_restart", 48.0);

    // mechanism coverage
    $display("bit-reversed writes %0d, RAM switches %0d, FFTs done %0d, word reloads %0d, SCK edges ignored with CE low %0d, restarts %0d",
             n_bitrev_writes, n_pingpong, n_done, n_reload, n_ce_ignored, n_restart);
    checks += 6;
    if (n_bitrev_writes == 0) begin failures++; $display("FAIL no bit-reversed load"); end
    if (n_pingpong == 0)      begin failures++; $display("FAIL no RAM ping-pong"); end
    if (n_done != 4)          begin failures++; $display("FAIL %0d FFTs finished, expected 4", n_done); end
    if (n_reload == 0)        begin failures++; $display("FAIL no output word reload"); end
    if (n_ce_ignored == 0)    begin failures++; $display("FAIL no CE-low burst"); end
    if (n_restart == 0)       begin failures++; $display("FAIL no restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
