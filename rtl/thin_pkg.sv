// thin_pkg: types and constants shared by the thinning core.
//
// The core thins a binary image held one bit per pixel (1 = object/vein, 0 =
// background). The default frame is 240 columns by 160 rows, the finger-vein
// image size the core is aimed at. The 3x3 window type names the eight
// neighbours by compass direction; in the usual thinning notation P1 is the
// centre, P2 north and P3..P9 follow clockwise (NE, E, SE, S, SW, W, NW).
package thin_pkg;

  // Default frame size: 240 x 160 pixels (width x height).
  localparam int unsigned IMG_W = 240;
  localparam int unsigned IMG_H = 160;

  // Pipeline depth of the pixel processing unit, in clock cycles.
  localparam int unsigned PPU_LAT = 3;

  // One 3x3 neighbourhood. Bits outside the image are already forced to 0.
  typedef struct packed {
    logic nw;  // P9
    logic n;   // P2
    logic ne;  // P3
    logic w;   // P8
    logic c;   // P1, the pixel under test
    logic e;   // P4
    logic sw;  // P7
    logic s;   // P6
    logic se;  // P5
  } window_t;

  // The two sub-iterations of one thinning iteration.
  typedef enum logic {
    SUB_1 = 1'b0,  // removes south-east boundary and north-west corner points
    SUB_2 = 1'b1   // removes north-west boundary and south-east corner points
  } subiter_e;

endpackage
