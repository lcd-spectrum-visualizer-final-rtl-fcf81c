// tb_ram_spi: checks the SPI slave on its own, with a behavioural RAM and a
// bit-banged SPI master (mode 0, MSB first, SCK half period 5 clk periods).
// Load: 32 random samples must land at bit-reversed addresses as {sample, 0};
// SCK pulses with CE low and a 33rd sample must write nothing. Read-out: after
// fft_done the 32 words of the RAM must come back in natural order, MSB first,
// with the first bit valid before the first SCK edge.
module tb_ram_spi;
  import fft_pkg::*;
  localparam int HALF = 50;            // SCK half period in time units (5 clk)
  logic clk = 0, rst_n = 0;
  logic sck = 0, sdi = 0, ce = 0, load = 0, sdo;
  logic fft_done = 0;
  logic [31:0] rd, wd;
  logic [4:0] adr;
  logic we, load_s;
  logic [31:0] mem [32];
  logic [15:0] samples [33];
  int checks = 0, failures = 0, writes = 0;

  ram_spi dut (.*);

  always #5 clk = ~clk;

  // behavioural RAM: asynchronous read, write at the clock edge
  assign rd = mem[adr];
  always @(posedge clk) if (we) begin
    mem[adr] <= wd;
    writes++;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic spi_xfer(input int nbits, input logic [31:0] tx, output logic [31:0] rx);
    rx = 0;
    for (int i = nbits - 1; i >= 0; i--) begin
      sdi = tx[i];
      #HALF sck = 1;
      rx = {rx[30:0], sdo};
      #HALF sck = 0;
    end
  endtask

  function automatic logic [4:0] rev5(input logic [4:0] a);
    return {a[0], a[1], a[2], a[3], a[4]};
  endfunction

  initial begin
    logic [31:0] rx;
    for (int i = 0; i < 32; i++) mem[i] = 32'hDEAD_0000 | i;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- load ----
    load = 1; #20; ce = 1; #20;
    for (int k = 0; k < 33; k++) begin
      samples[k] = 16'($urandom);
      spi_xfer(16, {16'h0, samples[k]}, rx);
      if (k == 4) begin
        // SCK activity with CE low must be ignored
        ce = 0;
        spi_xfer(16, 32'h0000_5A5A, rx);
        ce = 1;
      end
    end
    #200;
    expect_eq(load_s, 1, "load_s follows load");
    expect_eq(writes, 32, "exactly 32 sample writes");
    for (int k = 0; k < 32; k++)
      expect_eq(mem[rev5(5'(k))], {samples[k], 16'h0}, $sformatf("sample %0d at bit-reversed address", k));
    load = 0;
    #200;
    expect_eq(load_s, 0, "load_s drops");
    // ---- pretend an FFT ran: fill with results, raise done ----
    for (int i = 0; i < 32; i++) mem[i] = $urandom;
    @(negedge clk) fft_done = 1;
    #100;
    expect_eq(sdo, mem[0][31], "first bit ready before SCK");
    for (int k = 0; k < 32; k++) begin
      spi_xfer(16, 32'hFFFF, rx);
      expect_eq(rx[15:0], mem[k][31:16], $sformatf("word %0d real half", k));
      spi_xfer(16, 32'hFFFF, rx);
      expect_eq(rx[15:0], mem[k][15:0], $sformatf("word %0d imaginary half", k));
    end
    expect_eq(writes, 32, "no writes during read-out");
    #100; ce = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
