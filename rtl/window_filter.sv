// window_filter - time-domain window applied to one frame before the FFT.
//
// A frame of N = 2^nfft_log2 complex samples is multiplied, sample by sample,
// by the window coefficients held in the shared coefficient RAM. The
// controller and sample counter keep track of how many samples of the frame
// have been taken, which coefficient is needed next and when the frame is
// complete. Both branches use the same coefficient: two 16 x 16 multipliers
// give 32-bit products that are cut back to 16 bits.
//
// What follows the design this is based on: 16-bit real and imaginary
// samples, 16-bit coefficients from a RAM shared with the microcontroller, two
// multipliers, 32-bit products truncated to 16 bits, a controller with a
// sample counter. This design's own choices: the coefficient format (signed
// Q2.14, see decimator_pkg), truncation by dropping the 14 fraction bits
// (floor), saturation of a product beyond the 16-bit range (only possible with
// a coefficient above 1.0), and the start/busy/done handshake below.
//
// Interface / timing:
//   start        one-clock pulse, arms the filter for a frame of 2^nfft_log2
//                samples (nfft_log2 is sampled at start, 3 .. 13)
//   in_valid     a sample is offered; it is taken while busy is high
//   coef_rd_*    read port to window_coef_ram (address = sample index)
//   coef_data    coefficient, one clock after coef_rd_addr
//   out_*        windowed sample, two clocks after it was taken;
//                out_last marks the last sample of the frame
//   busy         high from start until the last sample has been taken
//   done         one-clock pulse with the last output sample
module window_filter
  import decimator_pkg::*;
#(
  parameter int unsigned MAX_LOG2 = 13
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [3:0]                 nfft_log2,
  input  logic                       in_valid,
  input  cplx16_t                    in_data,
  output logic                       coef_rd_en,
  output logic [MAX_LOG2-1:0]        coef_rd_addr,
  input  logic signed [WCOEF_W-1:0]  coef_data,
  output logic                       out_valid,
  output cplx16_t                    out_data,
  output logic                       out_last,
  output logic                       busy,
  output logic                       done
);

  logic [MAX_LOG2:0]   count;      // samples taken in this frame
  logic [MAX_LOG2:0]   frame_len;
  logic                take;
  logic                v1, last1;
  cplx16_t             d1;
  logic signed [DATA_W+WCOEF_W-1:0] p_re, p_im;

  assign take         = busy && in_valid;
  assign coef_rd_en   = take;
  assign coef_rd_addr = count[MAX_LOG2-1:0];

  // Controller and sample counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      count     <= '0;
      frame_len <= '0;
    end else if (start && !busy) begin
      busy      <= 1'b1;
      count     <= '0;
      frame_len <= (MAX_LOG2+1)'(1) << nfft_log2;
    end else if (take) begin
      count <= count + 1'b1;
      if (count + 1'b1 == frame_len) busy <= 1'b0;
    end
  end

  // Stage 1: sample waits for its coefficient.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1    <= 1'b0;
      last1 <= 1'b0;
      d1    <= '0;
    end else begin
      v1    <= take;
      last1 <= take && (count + 1'b1 == frame_len);
      if (take) d1 <= in_data;
    end
  end

  // Stage 2: two multipliers, 32-bit products back to 16 bits.
  function automatic logic signed [DATA_W-1:0] cut16(input logic signed [DATA_W+WCOEF_W-1:0] p);
    logic signed [DATA_W+WCOEF_W-1:0] s;
    s = p >>> WCOEF_FRAC;
    if (s > (DATA_W+WCOEF_W)'(32767))       return 16'sh7fff;
    else if (s < -(DATA_W+WCOEF_W)'(32768)) return 16'sh8000;
    else                                    return s[DATA_W-1:0];
  endfunction

  always_comb begin
    p_re = d1.re * coef_data;
    p_im = d1.im * coef_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      done      <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= v1;
      out_last  <= last1;
      done      <= last1;
      if (v1) begin
        out_data.re <= cut16(p_re);
        out_data.im <= cut16(p_im);
      end
    end
  end

endmodule
