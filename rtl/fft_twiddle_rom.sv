// fft_twiddle_rom - twiddle factors W_NMAX^k = cos(2*pi*k/NMAX) - j*sin(2*pi*k/NMAX)
// for k = 0 .. NMAX/2-1, the half circle a radix-2 FFT needs.
//
// Each entry holds cos and sin rounded to TW_W-bit two's complement with
// TW_FRAC fraction bits (Q1.14 by default, so 1.0 = 16384 is exact). The
// table is filled at elaboration from the formula above; an FPGA flow turns
// it into a block-RAM or LUT ROM. A smaller FFT uses every (NMAX/N)-th entry.
//
// Interface / timing: synchronous read, data one clock after addr.
//
// The reference design uses 16-bit phase factors; computing them at
// elaboration and the Q1.14 scaling are this design's choices.
module fft_twiddle_rom #(
  parameter int unsigned MAX_LOG2 = 13,
  parameter int unsigned TW_W     = 16,
  parameter int unsigned TW_FRAC  = 14
) (
  input  logic                       clk,
  input  logic [MAX_LOG2-2:0]        addr,
  output logic signed [TW_W-1:0]     cos_o,
  output logic signed [TW_W-1:0]     sin_o
);

  localparam int unsigned HALF = 1 << (MAX_LOG2 - 1);
  localparam real         PI   = 3.14159265358979323846;

  typedef logic [2*TW_W-1:0] rom_t [HALF];

  function automatic rom_t make_table();
    rom_t t;
    for (int i = 0; i < HALF; i++) begin
      real ang, c, s;
      ang  = 2.0 * PI * real'(i) / real'(2 * HALF);
      c    = $floor($cos(ang) * real'(1 << TW_FRAC) + 0.5);
      s    = $floor($sin(ang) * real'(1 << TW_FRAC) + 0.5);
      t[i] = {TW_W'($rtoi(c)), TW_W'($rtoi(s))};
    end
    return t;
  endfunction

  localparam rom_t TABLE = make_table();

  always_ff @(posedge clk) begin
    {cos_o, sin_o} <= TABLE[addr];
  end

endmodule
