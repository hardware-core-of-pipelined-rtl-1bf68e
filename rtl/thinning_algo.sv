// thinning_algo: top level of the pipelined thinning core.
//
// Reduces the objects of a binary image (finger-vein patterns, 1 = vein) to
// skeletons one pixel wide. The host pulses start, then offers the frame in
// raster order, row 0 first, one pixel per clock on pix_in with
// pix_in_valid; a pixel is taken in each clock where pix_in_valid and
// in_ready are both high. The core then repeats thinning iterations (two
// parallel sub-iterations, each one pass over the frame at one pixel per
// clock) until an iteration deletes nothing, and streams the result out on
// pix_out/pix_out_valid, one pixel per clock in raster order. done pulses
// one clock after the last output pixel; iterations then holds the number
// of iterations run. busy is high from start until done.
//
// Timing at the default 240 x 160 frame (W*H = 38400 pixels):
//   one sub-iteration pass: W*H + W + 8 = 38648 clocks, start to start
//   from the clock that takes the last input pixel to done:
//   2 * iterations * (W*H + W + 8) + W*H + 4 clocks.
//   The load takes as long as the host needs to supply W*H pixels.
//
// The division into control unit and datapath unit and the names follow
// the implemented design; the port protocol is this design's choice.
module thinning_algo
  import thin_pkg::*;
#(
  parameter int unsigned W      = IMG_W,
  parameter int unsigned H      = IMG_H,
  parameter int unsigned ITER_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              pix_in,
  input  logic              pix_in_valid,
  output logic              in_ready,
  output logic              pix_out,
  output logic              pix_out_valid,
  output logic              busy,
  output logic              done,
  output logic [ITER_W-1:0] iterations
);

  du_cu_if ctl ();

  control_unit #(.ITER_W(ITER_W)) u_cu (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .ctl       (ctl),
    .busy      (busy),
    .done      (done),
    .iterations(iterations)
  );

  datapath_unit #(.W(W), .H(H)) u_du (
    .clk          (clk),
    .rst_n        (rst_n),
    .ctl          (ctl),
    .pix_in       (pix_in),
    .pix_in_valid (pix_in_valid),
    .in_ready     (in_ready),
    .pix_out      (pix_out),
    .pix_out_valid(pix_out_valid)
  );

endmodule
