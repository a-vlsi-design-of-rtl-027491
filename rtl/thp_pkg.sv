// thp_pkg: constants shared by the fixed-point precoding datapath (modulo
// fold, interference cancellation, weight multiplication, coefficient memories).
//
// The 15-bit word length and the 4x4 channel size (four transmit antennas,
// two double-antenna users) follow the design description; the split of the
// word into integer and fraction bits is this implementation's own choice:
// samples carry 10 fraction bits (range +-16), coefficients carry 11 fraction
// bits (range +-8). Running sums inside the units are 4 bits wider than a
// sample so that values before the modulo fold do not wrap.
package thp_pkg;
  localparam int DATA_W    = 15;   // fixed-point word length of IC and WCM
  localparam int DATA_FRAC = 10;   // fraction bits of x, x~, x^
  localparam int COEF_FRAC = 11;   // fraction bits of L ratios and Q^H entries
  localparam int GUARD     = 4;    // extra integer bits of running sums
  localparam int NT        = 4;    // transmit antennas = streams
  localparam int NL        = 6;    // strictly-lower entries of L: L21 L31 L32 L41 L42 L43
  localparam int NQ        = NT*NT;// entries of Q^H
  localparam int NSC       = 480;  // data subcarriers (channel matrices) per CSI update

  // Position of L_ij (i > j, 1-based) in the packed list of six ratios.
  function automatic int lidx(input int i, input int j);
    return (i-1)*(i-2)/2 + (j-1);
  endfunction
endpackage
