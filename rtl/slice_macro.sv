// slice_macro: isolation stage on the signals a PRR drives into the static
// region.
//
// While a PRR is being reconfigured its outputs are undefined. The PRSocket's
// SM_en bit opens the slice macros: with en low every output bit is forced
// to 0, so no write or read strobe from a half-loaded module reaches the
// module interfaces or FSLs; with en high the bits pass unchanged. The
// function (enable per Table 1, bit 0) is the published one; forcing zeros
// and the purely combinational form are this design's choice.
module slice_macro #(
  parameter int unsigned W = 8
) (
  input  logic         en,
  input  logic [W-1:0] from_prr,
  output logic [W-1:0] to_static
);
  assign to_static = en ? from_prr : '0;
endmodule
