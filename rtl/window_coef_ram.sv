// window_coef_ram - the shared coefficient RAM between the host
// microcontroller and the window filter.
//
// The microcontroller computes the window (Hamming, Hanning, flat-top, ...),
// cuts each coefficient to 16 bits and writes it here; the window filter reads
// one coefficient per sample. Depth defaults to 8192, the largest frame the
// spectrum analyser handles.
//
// Interface / timing: simple dual-port RAM. Write port (host): wr_en, wr_addr,
// wr_data, written on the clock edge. Read port (window filter): rd_en,
// rd_addr; rd_data is registered and valid one clock after the address.
// A read and a write of the same address in one clock return the old word.
// Contents are not reset; the host must load a window before use.
//
// The shared RAM and the 16-bit coefficient width follow the design this is
// based on. The simple dual-port arrangement, the read-before-write rule and
// the signed Q2.14 coefficient format are this design's choices.
module window_coef_ram
  import decimator_pkg::*;
#(
  parameter int unsigned DEPTH = 8192
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WCOEF_W-1:0]       wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WCOEF_W-1:0]       rd_data
);

  logic [WCOEF_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
