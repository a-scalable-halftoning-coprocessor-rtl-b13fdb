// comparator_array: the parallel comparators of the coprocessor.
//
// Lane i compares the gray level of its source pixel with the threshold of its
// dither cell and produces one output bit. As in the published architecture, a
// pixel whose intensity is below the threshold becomes a black output pixel;
// this design codes black as 1. LANES comparisons happen in the same clock (two
// in the basic architecture, four or eight in the scaled versions). Purely
// combinational.
module comparator_array
  import ht_pkg::*;
#(
  parameter int unsigned LANES = 2
) (
  input  gray_t            gray [LANES],
  input  gray_t            thr  [LANES],
  output logic [LANES-1:0] black
);

  always_comb
    for (int i = 0; i < LANES; i++)
      black[i] = gray[i] < thr[i];

endmodule
