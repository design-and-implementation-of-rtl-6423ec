// vedic_pkg: types shared by the Vedic multiply-accumulate units.
//
// sutra_e names the Vedic rule a MAC uses for its multiplier:
//   URDHVA    - Urdhva Tiryagbhyam, vertically and crosswise (general a*b)
//   NIKHILAM  - Nikhilam, multiplication through deviations from the base 2^N
//   YAVADUNAM - Yavadunam, squaring through the deficiency from the base 2^N
// The three rules are the ones the design is built around; the encoding is
// this design's own choice.
package vedic_pkg;

  typedef enum logic [1:0] {
    URDHVA    = 2'd0,
    NIKHILAM  = 2'd1,
    YAVADUNAM = 2'd2
  } sutra_e;

endpackage
