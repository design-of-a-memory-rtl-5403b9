// Single-port data memory of the memory-based FFT.
//
// One array of DEPTH words holds the FFT data; each word packs the 16-bit
// real part above the 16-bit imaginary part (4096 x 32 bits by default, as
// the design calls for). One port is shared by reads and writes: a write
// stores wdata at addr on the rising edge; every cycle the word at addr is
// registered onto rdata (read-before-write), so read data appears one
// clock after the address. No reset: the FFT writes every word before it
// reads it.
module fft_ram #(
  parameter int unsigned AW = 12,
  parameter int unsigned W  = 32
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
