// recip_rom: table of the reciprocal of the BPM sum signal, used to normalise
// the difference signal for the bunch charge.
//
// The FONT5 system stores this reciprocal in FPGA RAM next to the gain table; its
// size and scaling are this design's choice. The address is the top RECIP_AW
// bits of a positive sum word, so address a stands for sums from a*2^s to
// (a+1)*2^s - 1; the entry is the reciprocal of the middle of that range,
//   rom[a] = round( 2^(FRAC+1) / (2a+1) ),   a >= 1
//   rom[0] = 0   (no beam: the position comes out as zero)
// so that diff * rom[a] / 2^(FRAC+s) is diff/sum. The table is computed at
// elaboration and read synchronously (one cycle), as a block RAM is.
module recip_rom
  import font5_pkg::*;
#(
  parameter int unsigned AW   = RECIP_AW,
  parameter int unsigned FRAC = RECIP_FRAC,
  localparam int unsigned DW  = FRAC + 1
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);

  logic [DW-1:0] rom [2**AW];

  function automatic logic [DW-1:0] recip(input int unsigned a);
    longint unsigned num, den;
    if (a == 0) return '0;
    num = longint'(1) << (FRAC + 1);
    den = 2 * longint'(a) + 1;
    return DW'((num + den / 2) / den);
  endfunction

  initial begin
    for (int unsigned a = 0; a < 2**AW; a++) rom[a] = recip(a);
  end

  always_ff @(posedge clk) data <= rom[addr];

endmodule
