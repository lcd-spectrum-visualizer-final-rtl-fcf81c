// tb_agu: checks the FFT sequencer cycle by cycle against the textbook
// decimation-in-time schedule: at level l (half = 2^l) the butterflies are
// taken group by group, j = 0..half-1 inside a group, on addresses
// (g + j, g + j + half) with twiddle w^(j * 16/half). Also checks the RAM
// alternation and write enables, that fft_done rises after exactly 80 cycles,
// that each level touches every address once, and that load restarts a run.
module tb_agu;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, load = 1;
  logic [4:0] adr_a, adr_b;
  logic [3:0] adr_tw;
  logic rd_select, we1, we2, fft_done;
  logic [2:0] level;
  logic [3:0] pair;
  int checks = 0, failures = 0;

  agu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  // One complete FFT schedule, checked on every cycle.
  task automatic full_run();
    int cycles = 0;
    @(negedge clk) load = 0;
    for (int l = 0; l < 5; l++) begin
      int half = 1 << l;
      bit [31:0] seen = 0;
      for (int g = 0; g < 32; g += 2 * half)
        for (int j = 0; j < half; j++) begin
          #1;
          expect_eq(fft_done, 0, "done during run");
          expect_eq(adr_a, g + j, "adr_a");
          expect_eq(adr_b, g + j + half, "adr_b");
          expect_eq(adr_tw, j * (16 / half), "adr_tw");
          expect_eq(rd_select, l % 2, "rd_select");
          expect_eq(we1, l % 2, "we1");
          expect_eq(we2, 1 - l % 2, "we2");
          seen[adr_a] = 1; seen[adr_b] = 1;
          @(negedge clk);
          cycles++;
        end
      expect_eq(int'(seen == '1), 1, "every address once per level");
    end
    #1;
    expect_eq(cycles, 80, "cycles to fft_done");
    expect_eq(fft_done, 1, "fft_done after 80 cycles");
    expect_eq(we1 | we2, 0, "no write when done");
    expect_eq(rd_select, 1, "result in RAM2");
    // done holds
    repeat (10) @(negedge clk);
    expect_eq(fft_done, 1, "fft_done holds");
    expect_eq(we1 | we2, 0, "no write while done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    #1;
    expect_eq(we1 | we2 | fft_done, 0, "idle while load");
    full_run();
    // load restarts; abort a run midway, then do a full one
    load = 1;
    @(negedge clk); #1;
    expect_eq(fft_done, 0, "load clears done");
    expect_eq(adr_a, 0, "load resets pair");
    @(negedge clk) load = 0;
    repeat (37) @(negedge clk);
    load = 1;
    repeat (2) @(negedge clk);
    full_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
