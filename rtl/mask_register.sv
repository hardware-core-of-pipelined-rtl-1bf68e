// mask_register: serial-in parallel-out window generator (the MR).
//
// Pixels arrive one per shift in raster order. A shift register of
// 2*W+3 bits holds two full image lines plus three pixels, so that after a
// shift its taps form the 3x3 window centred on the pixel W+1 places behind
// the newest one. The first W+1 shifts of a frame only fill the register;
// every later shift presents one window, for centres (0,0), (0,1), ... in
// raster order. The feeder appends W+1 zero pixels after the last real pixel
// to push the last windows out, so one frame takes W*H + W + 1 shifts.
// Neighbours that fall outside the image are forced to 0 from the centre's
// row and column, so stale register contents never leak in.
//
// Timing: win, win_valid and win_addr are registered together; win_valid is
// high for one clock per window, in the clock after the shift. clear
// restarts the frame (row/column counters and fill count); it does not
// need to empty the shift register.
//
// A serial-in parallel-out mask register is the structure the implemented
// design names; the line-length shift register, border masking and zero
// flush are this design's choices.
module mask_register
  import thin_pkg::*;
#(
  parameter int unsigned W      = IMG_W,
  parameter int unsigned H      = IMG_H,
  parameter int unsigned ADDR_W = $clog2(W * H)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              shift_en,
  input  logic              din,
  output window_t           win,
  output logic              win_valid,
  output logic [ADDR_W-1:0] win_addr
);

  localparam int unsigned SR_LEN = 2 * W + 3;
  localparam int unsigned ROW_W  = $clog2(H + 1);
  localparam int unsigned COL_W  = $clog2(W + 1);
  localparam int unsigned FILL_W = $clog2(W + 2);

  logic [SR_LEN-1:0] sr;        // sr[k] is the pixel shifted in k shifts ago
  logic [FILL_W-1:0] fill;      // shifts seen so far, saturating at W+1
  logic [ROW_W-1:0]  row, win_row;
  logic [COL_W-1:0]  col, win_col;
  logic [ADDR_W-1:0] addr;
  logic              frame_done;

  always_ff @(posedge clk) begin
    if (shift_en) sr <= {sr[SR_LEN-2:0], din};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill       <= '0;
      row        <= '0;
      col        <= '0;
      addr       <= '0;
      frame_done <= 1'b0;
      win_valid  <= 1'b0;
      win_row    <= '0;
      win_col    <= '0;
      win_addr   <= '0;
    end else if (clear) begin
      fill       <= '0;
      row        <= '0;
      col        <= '0;
      addr       <= '0;
      frame_done <= 1'b0;
      win_valid  <= 1'b0;
    end else begin
      win_valid <= 1'b0;
      if (shift_en) begin
        if (fill != FILL_W'(W + 1)) begin
          fill <= fill + 1'b1;
        end else if (!frame_done) begin
          win_valid <= 1'b1;
          win_row   <= row;
          win_col   <= col;
          win_addr  <= addr;
          addr      <= addr + 1'b1;
          if (col == COL_W'(W - 1)) begin
            col <= '0;
            row <= row + 1'b1;
            if (row == ROW_W'(H - 1)) frame_done <= 1'b1;
          end else begin
            col <= col + 1'b1;
          end
        end
      end
    end
  end

  // Border masking from the registered centre position.
  logic n_ok, s_ok, w_ok, e_ok;
  assign n_ok = (win_row != '0);
  assign s_ok = (win_row != ROW_W'(H - 1));
  assign w_ok = (win_col != '0);
  assign e_ok = (win_col != COL_W'(W - 1));

  always_comb begin
    win.nw = sr[2*W+2] & n_ok & w_ok;
    win.n  = sr[2*W+1] & n_ok;
    win.ne = sr[2*W]   & n_ok & e_ok;
    win.w  = sr[W+2]   & w_ok;
    win.c  = sr[W+1];
    win.e  = sr[W]     & e_ok;
    win.sw = sr[2]     & s_ok & w_ok;
    win.s  = sr[1]     & s_ok;
    win.se = sr[0]     & s_ok & e_ok;
  end

endmodule
