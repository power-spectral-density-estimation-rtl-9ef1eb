// psd_pkg: types and constants shared by the PSD estimator.
//
// All arithmetic in the design is 32-bit two's complement fixed point in
// which a real value v is carried as the whole number trunc(v * 10,000)
// (the scale is the run-time parameter "fixedpointmult"). A complex value is
// a 32-bit real part plus a 32-bit imaginary part. The FFT twiddle factors
// are the 16th roots of unity scaled by 10,000 and rounded to whole numbers;
// W^0 = 1 and W^4 = -j are exact small integers and are used unscaled, so
// their products need no division.
package psd_pkg;

  typedef logic signed [31:0] word_t;

  typedef struct packed {
    word_t re;
    word_t im;
  } cplx_t;

  localparam int unsigned N_FFT    = 16;  // FFT points
  localparam int unsigned N_MULT   = 7;   // complex multipliers (stage 4 needs 7)
  localparam int unsigned N_DIV    = 4;   // dividers

  // Twiddle W16^k = exp(-j*2*pi*k/16) for k = 0..7 as used by the FFT.
  function automatic cplx_t twiddle(input logic [2:0] k);
    cplx_t w;
    case (k)
      3'd0: begin w.re =  32'sd1;     w.im =  32'sd0;     end
      3'd1: begin w.re =  32'sd9239;  w.im = -32'sd3827;  end
      3'd2: begin w.re =  32'sd7071;  w.im = -32'sd7071;  end
      3'd3: begin w.re =  32'sd3827;  w.im = -32'sd9239;  end
      3'd4: begin w.re =  32'sd0;     w.im = -32'sd1;     end
      3'd5: begin w.re = -32'sd3827;  w.im = -32'sd9239;  end
      3'd6: begin w.re = -32'sd7071;  w.im = -32'sd7071;  end
      default: begin w.re = -32'sd9239; w.im = -32'sd3827; end
    endcase
    return w;
  endfunction

  // True when the product with W16^k carries the 10,000 scale and must be
  // divided back.
  function automatic bit twiddle_scaled(input logic [2:0] k);
    return (k != 3'd0) && (k != 3'd4);
  endfunction

  // 4-bit bit reversal, the FFT input order.
  function automatic logic [3:0] bitrev4(input logic [3:0] i);
    return {i[0], i[1], i[2], i[3]};
  endfunction

endpackage
