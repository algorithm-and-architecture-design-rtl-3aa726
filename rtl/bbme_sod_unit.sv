// bbme_sod_unit: shared SOD processing unit of the BBME search (SOD1/SOD2).
//
// A 256-bit XOR of current and reference data followed by an adder tree.
// The 256 bits are sixteen 16-bit groups; group i gives the 4x4 SOD s4[i]
// (0..16). Groups 4j..4j+3 add up to the 8x8 SOD s8[j] and all sixteen to the
// 16x16 SOD s16. The same unit serves all three pyramid levels: the address
// generator packs sixteen 4x4 candidates (LV1), four 8x8 candidates (LV2) or
// one 16x16 candidate with its four 8x8 quarters (LV3) into the 256 bits.
// Combinational.
module bbme_sod_unit (
  input  logic [255:0]     cur,
  input  logic [255:0]     ref_data,
  output logic [15:0][4:0] s4,
  output logic [3:0][6:0]  s8,
  output logic [8:0]       s16
);

  logic [255:0] d;

  always_comb begin
    d = cur ^ ref_data;
    for (int i = 0; i < 16; i++) begin
      s4[i] = '0;
      for (int b = 0; b < 16; b++) s4[i] = s4[i] + 5'(d[i * 16 + b]);
    end
    for (int j = 0; j < 4; j++)
      s8[j] = 7'(s4[4*j]) + 7'(s4[4*j+1]) + 7'(s4[4*j+2]) + 7'(s4[4*j+3]);
    s16 = 9'(s8[0]) + 9'(s8[1]) + 9'(s8[2]) + 9'(s8[3]);
  end

endmodule
