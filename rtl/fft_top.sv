// fft_top: SPI-attached 32-point FFT accelerator, the FPGA half of a live audio
// spectrum visualizer.
//
// A host microcontroller sends 32 audio samples (16-bit Q5.10, real) over SPI,
// the FPGA computes their 32-point radix-2 FFT, and the host reads back 32
// complex results {re[31:16], im[15:0]}, both Q5.10, bin 0 first.
//
// Datapath: two 32 x 32-bit two-port RAMs (ram2) hold the data. The SPI slave
// (ram_spi) writes each sample into both RAMs at its bit-reversed address. The
// FFT then runs in place, ping-ponging between the RAMs: at each level the
// sequencer (agu) reads a pair A, B from one RAM, the butterfly (bfu) computes
// A +/- B*w^n with the twiddle from twiddle_rom, and both results are written to
// the same two addresses of the other RAM in the same cycle. Five levels of 16
// butterflies take 80 clock cycles; the result ends in RAM2 in natural order.
// Muxes give RAM port A (and port B, with the same address and data) to the SPI
// slave while LOAD is high or the FFT is done, and to the sequencer otherwise.
//
// Pins: sck/sdi/sdo (SPI mode 0, MSB first), ce (high while the host talks to
// the FPGA), load (high while samples are sent; dropping it starts the FFT) and
// fft_done (high once the result is ready, until the next load). clk is the
// system clock; each SCK half period must last at least 4 clk periods. rst_n is
// an asynchronous active-low reset.
//
// The structure (two RAMs, twiddle ROM, butterfly, address unit, SPI slave,
// muxes on load|fft_done) follows the design description; rst_n and the
// synchronous sampling of the SPI pins are this implementation's own.
module fft_top
  import fft_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic ce,
  input  logic sck,
  input  logic sdi,
  output logic sdo,
  output logic fft_done
);

  // sequencer
  logic [LOGN-1:0] agu_adr_a, agu_adr_b;
  logic [LOGN-2:0] adr_tw;
  logic            rd_select, agu_we1, agu_we2;
  logic [$clog2(LOGN+1)-1:0] level;
  logic [LOGN-2:0] pair;

  // SPI slave
  logic [LOGN-1:0] spi_adr;
  logic [WW-1:0]   spi_wd;
  logic            spi_we, load_s;

  // RAM ports
  logic            spi_port;
  logic [LOGN-1:0] adr_a, adr_b;
  logic [WW-1:0]   wd_a, wd_b;
  logic            we1, we2;
  cplx_t           rd1_a, rd1_b, rd2_a, rd2_b, rd_a, rd_b, bfu_a, bfu_b;

  // twiddle
  logic signed [DW-1:0] tw_re, tw_im;

  agu u_agu (
    .clk, .rst_n,
    .load      (load_s),
    .adr_a     (agu_adr_a),
    .adr_b     (agu_adr_b),
    .adr_tw,
    .rd_select,
    .we1       (agu_we1),
    .we2       (agu_we2),
    .fft_done,
    .level,
    .pair
  );

  ram_spi u_spi (
    .clk, .rst_n,
    .sck, .sdi, .ce, .load, .sdo,
    .fft_done,
    .rd     (rd_a),
    .adr    (spi_adr),
    .wd     (spi_wd),
    .we     (spi_we),
    .load_s
  );

  // The SPI slave owns the RAM ports while loading and after the FFT is done.
  assign spi_port = load_s || fft_done;
  assign adr_a    = spi_port ? spi_adr : agu_adr_a;
  assign adr_b    = spi_port ? spi_adr : agu_adr_b;
  assign wd_a     = spi_port ? spi_wd  : bfu_a;
  assign wd_b     = spi_port ? spi_wd  : bfu_b;
  // Samples go into both RAMs; during the FFT the RAM not being read is written.
  assign we1      = spi_port ? spi_we : agu_we1;
  assign we2      = spi_port ? spi_we : agu_we2;

  ram2 #(.DEPTH(N), .WIDTH(WW)) u_ram1 (
    .clk, .we(we1), .adr_a, .adr_b, .wd_a, .wd_b, .rd_a(rd1_a), .rd_b(rd1_b)
  );

  ram2 #(.DEPTH(N), .WIDTH(WW)) u_ram2 (
    .clk, .we(we2), .adr_a, .adr_b, .wd_a, .wd_b, .rd_a(rd2_a), .rd_b(rd2_b)
  );

  // rd_select = 0 reads RAM1, 1 reads RAM2.
  assign rd_a = rd_select ? rd2_a : rd1_a;
  assign rd_b = rd_select ? rd2_b : rd1_b;

  twiddle_rom u_tw (.adr_tw, .tw_re, .tw_im);

  bfu #(.W(DW), .FR(FRAC)) u_bfu (
    .tw_r (tw_re), .tw_i (tw_im),
    .a_r  (rd_a.re), .a_i (rd_a.im),
    .b_r  (rd_b.re), .b_i (rd_b.im),
    .ao_r (bfu_a.re), .ao_i (bfu_a.im),
    .bo_r (bfu_b.re), .bo_i (bfu_b.im)
  );

endmodule
