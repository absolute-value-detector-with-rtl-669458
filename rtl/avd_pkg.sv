// Shared widths of the 5-bit absolute value detector.
//
// The detector takes a 5-bit two's complement sample: one sign bit and four
// magnitude bits. The magnitude path, the adder, the multiplexer and the
// comparator are all four bits wide, and so is the threshold. These numbers
// are the design's own (a 5-bit input, a 4-bit adder, a 4-bit comparator);
// the package only gives them one name each so every module agrees.
package avd_pkg;
  localparam int unsigned IN_W  = 5;          // signed input width
  localparam int unsigned MAG_W = IN_W - 1;   // magnitude / threshold width

  typedef logic [IN_W-1:0]  sample_t;         // two's complement sample
  typedef logic [MAG_W-1:0] mag_t;            // magnitude or threshold
endpackage
