// bres_stepper: incremental mapping of destination pixels onto source pixels.
//
// For an irreducible scale fraction d/s (destination size over source size,
// d >= s) and r = d - s, the error term of destination pixel N obeys
//   eps(N+1) = eps(N) + s   if eps(N) <  0
//   eps(N+1) = eps(N) - r   if eps(N) >= 0
// starting from eps(0) = -r/2. Destination pixel N (N >= 1) moves on to the
// next source pixel exactly when eps(N) >= 0; pixel 0 always uses source
// pixel 0. This recurrence follows the published architecture; unrolling it
// LANES times so that LANES destination pixels are mapped per clock is how
// the design scales to several comparators.
//
// Purely combinational. eps_in is eps of the first of the LANES pixels;
// adv[i] says whether lane i starts a new source pixel (forced to 0 for lane
// 0 when 'first' marks pixel 0 of a scanline); eps_out is eps of the pixel
// following the last lane.
module bres_stepper
  import ht_pkg::*;
#(
  parameter int unsigned LANES = 2
) (
  input  logic signed [EPS_W-1:0] eps_in,
  input  logic        [DIM_W-1:0] scale_s,
  input  logic        [DIM_W-1:0] scale_r,
  input  logic                    first,
  output logic        [LANES-1:0] adv,
  output logic signed [EPS_W-1:0] eps_out
);

  logic signed [EPS_W-1:0] s_ext, r_ext;
  logic signed [EPS_W-1:0] e [LANES+1];

  assign s_ext = signed'({{(EPS_W-DIM_W){1'b0}}, scale_s});
  assign r_ext = signed'({{(EPS_W-DIM_W){1'b0}}, scale_r});

  always_comb begin
    e[0] = eps_in;
    for (int i = 0; i < LANES; i++) begin
      adv[i]  = (e[i] >= 0) && !(first && i == 0);
      e[i+1]  = (e[i] < 0) ? e[i] + s_ext : e[i] - r_ext;
    end
    eps_out = e[LANES];
  end

endmodule
