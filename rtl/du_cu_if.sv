// du_cu_if: control and status bundle between the control unit and the
// datapath unit.
//
// Control (control unit -> datapath):
//   load_en       level: the datapath accepts input pixels into the frame
//   pass_start    one-clock pulse: stream the frame once through the window
//                 generator and pixel processing unit, writing results back
//   sub           sub-iteration applied by the pass started with pass_start
//   unload_start  one-clock pulse: stream the frame out in raster order
// Status (datapath -> control unit):
//   load_done     level: the whole frame has been received
//   pass_done     one-clock pulse after the last pixel of a pass is written
//   pass_changed  valid with pass_done: the pass deleted at least one pixel
//   unload_done   one-clock pulse with the last output pixel
interface du_cu_if;
  logic               load_en;
  logic               pass_start;
  thin_pkg::subiter_e sub;
  logic               unload_start;
  logic               load_done;
  logic               pass_done;
  logic               pass_changed;
  logic               unload_done;

  modport cu (output load_en, pass_start, sub, unload_start,
              input  load_done, pass_done, pass_changed, unload_done);
  modport du (input  load_en, pass_start, sub, unload_start,
              output load_done, pass_done, pass_changed, unload_done);
endinterface
