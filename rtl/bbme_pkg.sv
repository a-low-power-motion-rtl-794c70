// bbme_pkg: types and constants shared by the bi-directional binary motion
// estimator. A motion vector is a pair of signed components; its unit depends
// on where it is used (LV1, LV2, LV3 full pel, or half pel in the sub-pel stage).
package bbme_pkg;
  typedef struct packed {
    logic signed [7:0] x;
    logic signed [7:0] y;
  } mv_t;

  // Search window of the sub-pel stage: 16 + 2*2 (integer +-2) + 2 (half pel).
  localparam int SSW    = 22;
endpackage
