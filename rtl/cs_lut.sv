// cs_lut: sampling-instant lookup tables of the compressive-sampling modes.
//
// One 512-bit table per compression ratio (8x, 10x, 30x); bit n of a table is
// the entry of the reduced-order identity measurement matrix for slot n, i.e.
// 1 when slot n of the 4 s window is sampled. Three 512-bit tables indexed by
// a 9-bit slot counter are as the original ASIC describes; their contents are this
// design's own: the window is cut into M = 512/CR equal segments
// (M = 64, 51, 17) and one slot per segment is chosen at a pseudorandom
// offset, the offsets taken modulo the segment length from successive states
// of the 16-bit LFSR x^16+x^14+x^13+x^11+1 seeded with 0xACE1. Uniform mode
// (1x) samples every slot. Purely combinational read.
module cs_lut
  import ppg_pkg::*;
(
  input  cr_e               cr_i,    // compression ratio select
  input  logic [SLOT_W-1:0] slot_i,  // slot index 0..511
  output logic              samp_o   // 1: slot is a sampling instant
);

  logic [NSLOT-1:0] lut [3];

  initial $readmemh("rtl/cs_lut.hex", lut);

  always_comb begin
    unique case (cr_i)
      CR_1X:   samp_o = 1'b1;
      CR_8X:   samp_o = lut[0][slot_i];
      CR_10X:  samp_o = lut[1][slot_i];
      default: samp_o = lut[2][slot_i];
    endcase
  end

endmodule
