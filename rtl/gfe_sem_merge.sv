// gfe_sem_merge: global feature extraction and edge-map merging.
//
// For each result of the local feature extraction (largest gradient magnitude
// and its direction) this stage applies the edge-detecting threshold: the
// pixel becomes a significant edge in the map of its direction when its
// gradient exceeds edge_th (strictly greater). This gives four significant
// edge maps (horizontal, -45 degree, vertical, +45 degree); their logical OR
// is the merged significant edge map (MSEM). Works on all NLFE x 4 results of
// one clock in parallel and is purely combinational.
// The threshold, the four maps and the OR merge are from the design
// description. It does not say how the threshold is set; here it is a
// programmable input, the same for the whole frame.
module gfe_sem_merge
  import dps_pkg::*;
#(
  parameter int unsigned NLFE = 24
) (
  input  lfe_res_t res  [NLFE][OUT_SIDE],
  input  mag_t     edge_th,
  output logic     sem  [NDIR][NLFE][OUT_SIDE],
  output logic     msem [NLFE][OUT_SIDE]
);

  always_comb begin
    for (int g = 0; g < NLFE; g++)
      for (int q = 0; q < OUT_SIDE; q++) begin
        for (int d = 0; d < NDIR; d++)
          sem[d][g][q] = (res[g][q].dir == dir_e'(d)) && (res[g][q].grad > edge_th);
        msem[g][q] = sem[DIR_H][g][q] | sem[DIR_M45][g][q] | sem[DIR_V][g][q] | sem[DIR_P45][g][q];
      end
  end

endmodule
