// twiddle_rom: the 16 twiddle factors of the 32-point FFT, in Q5.10.
//
// Entry n holds w^n = exp(-j*2*pi*n/32), n = 0..15, as two signed Q5.10 parts:
//   tw_re = trunc(1024 * cos(2*pi*n/32)),  tw_im = trunc(-1024 * sin(2*pi*n/32))
// where trunc rounds toward zero (so 1004.3 -> 1004 and -199.8 -> -199); w^0
// is exactly 1.0 (16'h0400). The ROM is a purely combinational lookup: tw_re/tw_im follow adr_tw
// in the same cycle. The real part and its rounding follow the design
// description's table exactly. The imaginary part follows the definition
// exp(-j...), so it is negative for n = 1..15; the two halves are one module here
// rather than two.
module twiddle_rom (
  input  logic        [3:0]  adr_tw,
  output logic signed [15:0] tw_re,
  output logic signed [15:0] tw_im
);

  always_comb begin
    unique case (adr_tw)
      4'd0:  begin tw_re = 16'sh0400; tw_im = 16'sh0000; end
      4'd1:  begin tw_re = 16'sh03EC; tw_im = 16'shFF39; end
      4'd2:  begin tw_re = 16'sh03B2; tw_im = 16'shFE79; end
      4'd3:  begin tw_re = 16'sh0353; tw_im = 16'shFDC8; end
      4'd4:  begin tw_re = 16'sh02D4; tw_im = 16'shFD2C; end
      4'd5:  begin tw_re = 16'sh0238; tw_im = 16'shFCAD; end
      4'd6:  begin tw_re = 16'sh0187; tw_im = 16'shFC4E; end
      4'd7:  begin tw_re = 16'sh00C7; tw_im = 16'shFC14; end
      4'd8:  begin tw_re = 16'sh0000; tw_im = 16'shFC00; end
      4'd9:  begin tw_re = 16'shFF39; tw_im = 16'shFC14; end
      4'd10: begin tw_re = 16'shFE79; tw_im = 16'shFC4E; end
      4'd11: begin tw_re = 16'shFDC8; tw_im = 16'shFCAD; end
      4'd12: begin tw_re = 16'shFD2C; tw_im = 16'shFD2C; end
      4'd13: begin tw_re = 16'shFCAD; tw_im = 16'shFDC8; end
      4'd14: begin tw_re = 16'shFC4E; tw_im = 16'shFE79; end
      default: begin tw_re = 16'shFC14; tw_im = 16'shFF39; end
    endcase
  end

endmodule
