// rram_sense_amp: behavioural model of a current-mode sense amplifier.
// Not synthesizable logic: it stands for an analog comparator.
//
// While `en` is high, `out` is 1 when the bit-line current `i_bl_na`
// exceeds the reference `i_ref_na` (the bit reads as LRS, "1") and 0
// otherwise (HRS, "0"). With `en` low the output is 0. The comparison is
// instantaneous; sensing delay is not modelled.
module rram_sense_amp (
  input  logic        en,
  input  logic [31:0] i_bl_na,
  input  logic [31:0] i_ref_na,
  output logic        out
);

  always_comb out = en && (i_bl_na > i_ref_na);

endmodule
