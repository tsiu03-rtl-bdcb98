// blank_gen: blanking signal generator (combinational).
//
// blank1 is 1 while the counters point into the visible picture
// (hcnt < H_VISIBLE and vcnt < V_VISIBLE) and 0 in the front porch, sync
// pulse and back porch of either direction. It is active low: 0 tells the
// video DAC that no colour is to be shown.
//
// Interface: hcnt, vcnt in; blank1 out. Timing: purely combinational, in the
// same pipeline stage as the counters' outputs; the top registers it twice
// (blank2, blank3) to line it up with the colour data.
module blank_gen
  import vga_pkg::*;
#(
  parameter int unsigned H_VIS = H_VISIBLE,
  parameter int unsigned V_VIS = V_VISIBLE
) (
  input  hcnt_t hcnt,
  input  vcnt_t vcnt,
  output logic  blank1
);

  always_comb blank1 = (hcnt < hcnt_t'(H_VIS)) && (vcnt < vcnt_t'(V_VIS));

endmodule
