// analyze_unit: the analysis module of one subsystem.
//
// It holds the two units the document names. The error-detection unit
// compares the complete outputs of the subsystem's two cores (ALU result,
// store request and data, register write, next PC) and raises `err` when they
// differ: with two copies a disagreement can be detected but not attributed.
// The output-data-generating unit forms the subsystem's single output from the
// pair. It filters: when both copies agree it forwards the agreed bundle, and
// when they disagree it emits a null bundle (no store, no register write, all
// fields zero), so a disagreeing subsystem can never issue a store even if it
// were selected. Comparing the whole bundle and this filtering rule are this
// design's choices.
//
// Purely combinational, same cycle as the cores.
module analyze_unit
  import mips_pkg::*;
(
  input  core_out_t in0,
  input  core_out_t in1,
  output core_out_t out,
  output logic      err
);

  // error-detection unit
  assign err = (in0 != in1);

  // output-data-generating unit
  assign out = err ? core_out_t'('0) : in0;

endmodule
