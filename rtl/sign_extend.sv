// sign_extend: widens the 16-bit immediate field of an I-type instruction to a
// full data word by copying its most significant bit into every upper bit, so
// that negative offsets (for example the -4 of a backward branch) keep their
// value. Purely combinational; sits in the decode stage.
//   imm_i : immediate field, IN_W bits (instruction bits [15:0])
//   ext_o : OUT_W-bit two's-complement value
// The widths 16 and 32 are the instruction-set widths; the replication of the
// MSB is how the method is described for this processor.
module sign_extend #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  imm_i,
  output logic [OUT_W-1:0] ext_o
);
  always_comb ext_o = {{(OUT_W-IN_W){imm_i[IN_W-1]}}, imm_i};
endmodule
