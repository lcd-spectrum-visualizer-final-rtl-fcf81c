// ram_spi: SPI slave that fills the FFT's RAMs and reads the result back out.
//
// The host is an SPI master in mode 0 (SCK idles low, both sides sample on the
// rising edge and change data after the falling edge), most significant bit
// first. Two transactions make one FFT:
//   * Load: the host raises LOAD and CE and sends N 16-bit samples (Q5.10). The
//     16-bit input shift register takes SDI on each rising SCK edge; after every
//     16th bit the sample is written, as the word {sample, 16'h0000} (imaginary
//     part zero), to address bit_reverse(k) for the k-th sample. Words after the
//     N-th are ignored. The host then drops LOAD, which starts the FFT.
//   * Read-out: once fft_done is high the 32-bit output shift register is loaded
//     with result word 0 and its MSB drives SDO before the first SCK edge. The
//     register shifts on each falling SCK edge and after every 32 bits is
//     reloaded from the next address, in natural order, so the host reads
//     {re, im} of bins 0..N-1 in turn.
// Together the two shift registers are the 48 bits of shifting the design
// needs. CE must be high for SCK edges to count.
//
// Timing: SCK, SDI, CE and LOAD are asynchronous to clk and pass through
// two-flop synchronizers; SCK edges are found by comparing the synchronized
// value with its previous one. Each half period of SCK must therefore last at
// least 4 clk periods. The write of a sample reaches the RAM (we, adr, wd) one
// clk after the 16th rising edge is seen; load_s is the synchronized LOAD, which
// holds the FFT sequencer in reset and gives this module the RAM ports.
//
// Bit-reversed loading, the 16-in/32-out word sizes, the zero imaginary part,
// the LOAD/CE/FFT_DONE protocol and SPI mode 0 follow the design description.
// Sampling SCK with the system clock, instead of clocking the shift registers
// with SCK itself, and the synchronizers and reset are this implementation's
// choices.
module ram_spi
  import fft_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // SPI pins from the host
  input  logic            sck,
  input  logic            sdi,
  input  logic            ce,
  input  logic            load,
  output logic            sdo,
  // from the FFT sequencer
  input  logic            fft_done,
  // RAM port A while loading or reading out
  input  logic [WW-1:0]   rd,
  output logic [LOGN-1:0] adr,
  output logic [WW-1:0]   wd,
  output logic            we,
  output logic            load_s
);

  // ---- synchronizers and edge detection ----
  logic [1:0] sck_sync, sdi_sync, ce_sync, load_sync;
  logic       sck_q, load_q, done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_sync  <= '0;
      sdi_sync  <= '0;
      ce_sync   <= '0;
      load_sync <= '0;
      sck_q     <= 1'b0;
      load_q    <= 1'b0;
      done_q    <= 1'b0;
    end else begin
      sck_sync  <= {sck_sync[0], sck};
      sdi_sync  <= {sdi_sync[0], sdi};
      ce_sync   <= {ce_sync[0], ce};
      load_sync <= {load_sync[0], load};
      sck_q     <= sck_sync[1];
      load_q    <= load_sync[1];
      done_q    <= fft_done;
    end
  end

  logic sck_rise, sck_fall, ce_s, sdi_s, load_start, out_mode, out_start;

  assign load_s     = load_sync[1];
  assign ce_s       = ce_sync[1];
  assign sdi_s      = sdi_sync[1];
  assign sck_rise   = ce_s &&  sck_sync[1] && !sck_q;
  assign sck_fall   = ce_s && !sck_sync[1] &&  sck_q;
  assign load_start = load_s && !load_q;
  assign out_mode   = fft_done && !load_s;
  assign out_start  = out_mode && !done_q;

  // ---- load: 16-bit input shift register, bit-reversed writes ----
  logic [DW-2:0]   in_sh;          // the 15 bits before the current one
  logic [3:0]      in_cnt;
  logic [LOGN:0]   word_in;       // samples written so far, 0..N
  logic [LOGN-1:0] wr_adr;
  logic [DW-1:0]   wr_sample;
  logic            wr_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sh     <= '0;
      in_cnt    <= '0;
      word_in   <= '0;
      wr_adr    <= '0;
      wr_sample <= '0;
      wr_en     <= 1'b0;
    end else begin
      wr_en <= 1'b0;
      if (load_start) begin
        in_cnt  <= '0;
        word_in <= '0;
      end else if (load_s && sck_rise) begin
        in_sh  <= {in_sh[DW-3:0], sdi_s};
        in_cnt <= in_cnt + 1'b1;
        if (in_cnt == 4'd15 && word_in < (LOGN+1)'(N)) begin
          wr_en     <= 1'b1;
          wr_adr    <= bit_reverse(word_in[LOGN-1:0]);
          wr_sample <= {in_sh[DW-2:0], sdi_s};
          word_in   <= word_in + 1'b1;
        end
      end
    end
  end

  // ---- read-out: 32-bit output shift register, natural order ----
  logic [WW-1:0]   out_sh;
  logic [4:0]      out_bit;
  logic [LOGN:0]   word_out;      // next word to load into out_sh

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_sh   <= '0;
      out_bit  <= '0;
      word_out <= '0;
    end else if (!out_mode) begin
      out_bit  <= '0;
      word_out <= '0;
    end else if (out_start) begin
      out_sh   <= rd;                // word 0, addressed while word_out == 0
      out_bit  <= '0;
      word_out <= 1;
    end else if (sck_fall) begin
      out_bit <= out_bit + 1'b1;
      if (out_bit == 5'd31) begin
        out_sh   <= rd;
        word_out <= word_out + 1'b1;
      end else begin
        out_sh <= {out_sh[WW-2:0], 1'b0};
      end
    end
  end

  assign sdo = out_mode ? out_sh[WW-1] : 1'b0;
  assign adr = out_mode ? word_out[LOGN-1:0] : wr_adr;
  assign wd  = {wr_sample, {DW{1'b0}}};
  assign we  = wr_en;

endmodule
