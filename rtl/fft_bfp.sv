// fft_bfp - burst-I/O radix-2 FFT with block floating point (BFP) scaling.
//
// A frame of N = 2^nfft_log2 complex 16-bit samples (N = 8 .. 2^MAX_LOG2) is
// loaded, transformed in place and unloaded in natural bin order:
//     X[k] = sum_n x[n] * exp(-j*2*pi*k*n/N)  ~=  out[k] * 2^blk_exp
// The transform is decimation in time: samples are stored at bit-reversed
// addresses while loading, then log2(N) stages of N/2 butterflies
//     A' = a + b*W,  B' = a - b*W
// run over a single frame memory. One butterfly engine shares one read and
// one write port: a butterfly takes two clocks, so a stage takes N+2 clocks.
//
// Block floating point: the frame memory keeps two guard bits, so a stage
// never overflows. While a stage writes its results, the engine records how
// many bits beyond 16 the largest result needs (0, 1 or 2). That many bits are
// shifted out (arithmetic shift, i.e. truncation) when the next stage reads
// its inputs, or when the result is unloaded, and blk_exp grows by the same
// amount. Data is thus scaled only after a stage that actually overflowed the
// 16-bit range, and blk_exp tells the host by how much to scale the bins back.
//
// Taken from the design this follows: burst I/O (load, compute and unload are
// separate), radix-2 DIT, 16-bit input and output, BFP arithmetic with a block
// exponent, largest frame 8192 points, run-time choice of frame length, and
// 16-bit phase factors. This design's own choices: the two-clock butterfly on
// one read/one write port, the guard-bit way of detecting overflow, truncating
// rather than convergent rounding, Q1.14 twiddles, and the handshake below.
//
// Interface / timing:
//   start        one-clock pulse in idle; nfft_log2 (3 .. MAX_LOG2) sampled
//   in_valid     sample n of the frame, n = 0 .. N-1 in order (load phase)
//   out_valid    bin out_index of the result, one per clock, in natural order
//   out_last     with the last bin; done pulses one clock later
//   blk_exp      block exponent of the frame being unloaded / last unloaded
//   busy         high from start until the last bin has been sent
// Compute time: log2(N) * (N+2) clocks after the last sample is loaded, then
// N clocks of unload (8192 points: 106,522 + 8,192 clocks).
//
// Lint note: the assertion below is disabled during reset with
// "disable iff (!rst_n)". A linter may report rst_n as used both as an
// asynchronous reset and as a synchronous signal. That use is only in the
// assertion, which is not hardware, so the warning stands.
module fft_bfp
  import decimator_pkg::*;
#(
  parameter int unsigned MAX_LOG2 = 13,
  parameter int unsigned TW_W     = 16,
  parameter int unsigned TW_FRAC  = 14
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [3:0]            nfft_log2,
  input  logic                  in_valid,
  input  cplx16_t               in_data,
  output logic                  out_valid,
  output cplx16_t               out_data,
  output logic [MAX_LOG2-1:0]   out_index,
  output logic                  out_last,
  output logic [4:0]            blk_exp,
  output logic                  busy,
  output logic                  done
);

  localparam int unsigned IW   = DATA_W + 2;   // stored width with guard bits
  localparam int unsigned AW   = MAX_LOG2;
  localparam int unsigned PW   = DATA_W + TW_W + 1;

  typedef enum logic [1:0] {F_IDLE, F_LOAD, F_CALC, F_UNLOAD} fft_state_e;

  typedef struct packed {
    logic signed [IW-1:0] re;
    logic signed [IW-1:0] im;
  } cplxw_t;

  fft_state_e           st;
  logic [3:0]           nlog;
  logic [3:0]           stage;
  logic [AW:0]          cnt;        // load / unload index, or clock within a stage
  logic [AW:0]          n_pts;
  logic [1:0]           shift_cur;  // shift applied to data read from memory
  logic [1:0]           need_max;   // largest need seen in the current stage

  // frame memory: one write port, one synchronous read port
  cplxw_t               mem [1 << AW];
  logic                 we;
  logic [AW-1:0]        waddr, raddr;
  cplxw_t               wdata, rdata;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

  // --- helpers ---------------------------------------------------------
  function automatic logic [AW-1:0] bitrev(input logic [AW-1:0] idx, input logic [3:0] l);
    logic [AW-1:0] r;
    for (int b = 0; b < AW; b++) r[b] = idx[AW-1-b];
    return r >> (AW - int'(l));
  endfunction

  function automatic logic [AW-1:0] addr_a(input logic [AW-1:0] k, input logic [3:0] s);
    logic [AW-1:0] lowmask;
    lowmask = (AW'(1) << s) - AW'(1);
    return ((k & ~lowmask) << 1) | (k & lowmask);
  endfunction

  // bits beyond DATA_W that a stored value needs (0 .. 2)
  function automatic logic [1:0] need_of(input logic signed [IW-1:0] v);
    if (v >= -(IW'(1) << (DATA_W-1)) && v < (IW'(1) << (DATA_W-1))) return 2'd0;
    else if (v >= -(IW'(1) << DATA_W) && v < (IW'(1) << DATA_W))   return 2'd1;
    else                                                             return 2'd2;
  endfunction

  function automatic logic [1:0] max2(input logic [1:0] a, input logic [1:0] b);
    return (a > b) ? a : b;
  endfunction

  // --- butterfly datapath ----------------------------------------------
  logic [AW-1:0]              k_rd, k_wr;
  logic [AW-2:0]              tw_addr;
  logic signed [TW_W-1:0]     tw_c, tw_s;
  logic signed [DATA_W-1:0]   a_re, a_im;      // scaled first operand (held)
  logic signed [DATA_W-1:0]   b_re, b_im;      // scaled second operand
  logic signed [PW-1:0]       bw_re_full, bw_im_full;
  logic signed [IW-1:0]       bw_re, bw_im;
  cplxw_t                     res_a, res_b, hold_b;
  logic [AW-1:0]              hold_b_addr;
  logic signed [IW-1:0]       sh_re, sh_im;

  fft_twiddle_rom #(.MAX_LOG2(MAX_LOG2), .TW_W(TW_W), .TW_FRAC(TW_FRAC)) u_tw (
    .clk   (clk),
    .addr  (tw_addr),
    .cos_o (tw_c),
    .sin_o (tw_s)
  );

  assign k_rd    = cnt[AW:1];
  assign k_wr    = cnt[AW:1] - 1'b1;
  // twiddle of stage s, butterfly k: W_NMAX^(j << (MAX_LOG2-1-s)), j = k mod 2^s
  assign tw_addr = (AW-1)'((k_rd & ((AW'(1) << stage) - AW'(1))) << (MAX_LOG2 - 1 - int'(stage)));

  always_comb begin
    sh_re = rdata.re >>> shift_cur;
    sh_im = rdata.im >>> shift_cur;
    b_re  = sh_re[DATA_W-1:0];
    b_im  = sh_im[DATA_W-1:0];
    // b * (cos - j sin)
    bw_re_full = PW'(b_re * tw_c) + PW'(b_im * tw_s);
    bw_im_full = PW'(b_im * tw_c) - PW'(b_re * tw_s);
    bw_re = IW'(bw_re_full >>> TW_FRAC);
    bw_im = IW'(bw_im_full >>> TW_FRAC);
    res_a.re = IW'(a_re) + bw_re;
    res_a.im = IW'(a_im) + bw_im;
    res_b.re = IW'(a_re) - bw_re;
    res_b.im = IW'(a_im) - bw_im;
  end

  // --- memory port control -----------------------------------------------
  always_comb begin
    we    = 1'b0;
    waddr = '0;
    wdata = '0;
    raddr = '0;
    unique case (st)
      F_LOAD: begin
        we       = in_valid;
        waddr    = bitrev(cnt[AW-1:0], nlog);
        wdata.re = IW'(in_data.re);
        wdata.im = IW'(in_data.im);
      end
      F_CALC: begin
        if (cnt < n_pts)
          raddr = cnt[0] ? (addr_a(k_rd, stage) | (AW'(1) << stage)) : addr_a(k_rd, stage);
        if (cnt >= 2 && !cnt[0]) begin
          we    = 1'b1;
          waddr = addr_a(k_wr, stage);
          wdata = res_a;
        end else if (cnt >= 3 && cnt[0]) begin
          we    = 1'b1;
          waddr = hold_b_addr;
          wdata = hold_b;
        end
      end
      F_UNLOAD: raddr = cnt[AW-1:0];
      default: ;
    endcase
  end

  // --- sequencing ----------------------------------------------------------
  logic             unl_v, unl_last;
  logic [AW-1:0]    unl_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= F_IDLE;
      nlog        <= 4'd3;
      n_pts       <= '0;
      stage       <= '0;
      cnt         <= '0;
      shift_cur   <= '0;
      need_max    <= '0;
      blk_exp     <= '0;
      a_re        <= '0;
      a_im        <= '0;
      hold_b      <= '0;
      hold_b_addr <= '0;
      unl_v       <= 1'b0;
      unl_last    <= 1'b0;
      unl_idx     <= '0;
    end else begin
      unl_v    <= 1'b0;
      unl_last <= 1'b0;
      unique case (st)
        F_IDLE: begin
          if (start) begin
            st        <= F_LOAD;
            nlog      <= nfft_log2;
            n_pts     <= (AW+1)'(1) << nfft_log2;
            cnt       <= '0;
            stage     <= '0;
            shift_cur <= '0;
            need_max  <= '0;
            blk_exp   <= '0;
          end
        end
        F_LOAD: begin
          if (in_valid) begin
            if (cnt + 1'b1 == n_pts) begin
              st  <= F_CALC;
              cnt <= '0;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end
        F_CALC: begin
          if (cnt < n_pts && cnt[0]) begin
            a_re <= sh_re[DATA_W-1:0];
            a_im <= sh_im[DATA_W-1:0];
          end
          if (cnt >= 2 && !cnt[0]) begin
            hold_b      <= res_b;
            hold_b_addr <= addr_a(k_wr, stage) | (AW'(1) << stage);
            need_max    <= max2(need_max, max2(max2(need_of(res_a.re), need_of(res_a.im)),
                                               max2(need_of(res_b.re), need_of(res_b.im))));
          end
          if (cnt == n_pts + 1'b1) begin
            // stage finished: scale the next reads by what this stage grew
            shift_cur <= need_max;
            blk_exp   <= blk_exp + 5'(need_max);
            need_max  <= '0;
            cnt       <= '0;
            if (stage + 1'b1 == nlog) st <= F_UNLOAD;
            else                      stage <= stage + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        F_UNLOAD: begin
          unl_v   <= 1'b1;
          unl_idx <= cnt[AW-1:0];
          if (cnt + 1'b1 == n_pts) begin
            unl_last <= 1'b1;
            st       <= F_IDLE;
            cnt      <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: st <= F_IDLE;
      endcase
    end
  end

  // A butterfly input must fit 16 bits once the stage shift is applied.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (st == F_CALC && cnt >= 1 && cnt <= n_pts) |-> need_of(sh_re) == 2'd0 && need_of(sh_im) == 2'd0);

  // --- output -----------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
    end else begin
      done <= unl_last;
    end
  end

  always_comb begin
    out_valid   = unl_v;
    out_last    = unl_last;
    out_index   = unl_idx;
    out_data.re = sh_re[DATA_W-1:0];
    out_data.im = sh_im[DATA_W-1:0];
    busy        = (st != F_IDLE) || unl_v;
  end

endmodule
