// tb_mask_register: self-checking testbench of the window generator.
// Uses a small 7 x 5 frame. Each frame is random; it is fed in raster order
// followed by W+1 zeros, with random idle clocks between shifts. Every
// window must appear once, in raster order, one clock after its shift,
// with the eight neighbours equal to the frame's pixels (0 outside).
// Three frames are run back to back to check that clear restarts cleanly.
module tb_mask_register;
  import thin_pkg::*;

  localparam int W = 7, H = 5, N = W * H, AW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic clear, shift_en, din;
  window_t win;
  logic win_valid;
  logic [AW-1:0] win_addr;

  mask_register #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit img[N];
  int next_centre;
  bit expect_window;

  function automatic bit px(int r, int c);
    if (r < 0 || r >= H || c < 0 || c >= W) return 0;
    return img[r * W + c];
  endfunction

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (win_valid !== expect_window) begin
      failures++;
      $display("win_valid %0b expected %0b (centre %0d)", win_valid, expect_window, next_centre);
    end else if (win_valid) begin
      int r, c;
      window_t e;
      r = next_centre / W;
      c = next_centre % W;
      e.nw = px(r-1, c-1); e.n = px(r-1, c); e.ne = px(r-1, c+1);
      e.w  = px(r, c-1);   e.c = px(r, c);   e.e  = px(r, c+1);
      e.sw = px(r+1, c-1); e.s = px(r+1, c); e.se = px(r+1, c+1);
      checks++;
      if (win !== e || win_addr !== AW'(next_centre)) begin
        failures++;
        $display("centre %0d: window %b addr %0d, expected %b", next_centre, win, win_addr, e);
      end
      next_centre++;
    end
  end

  initial begin
    clear = 0; shift_en = 0; din = 0; expect_window = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int shifts;
      foreach (img[i]) img[i] = ($urandom_range(0, 2) != 0);
      @(negedge clk) clear = 1;
      expect_window = 0;
      next_centre = 0;
      @(negedge clk) clear = 0;
      shifts = 0;
      while (shifts < N + W + 1) begin
        if (f == 0 || $urandom_range(0, 3) != 0) begin
          shift_en = 1;
          din = (shifts < N) ? img[shifts] : 1'b0;
          shifts++;
        end else begin
          shift_en = 0;
        end
        // The window for centre k follows the shift of pixel k + W + 1.
        @(posedge clk) #1 expect_window = shift_en && shifts > W + 1;
        @(negedge clk);
      end
      shift_en = 0;
      @(posedge clk) #1 expect_window = 0;
      @(negedge clk);
      checks++;
      if (next_centre != N) begin
        failures++;
        $display("frame %0d: %0d windows, expected %0d", f, next_centre, N);
      end
      // Extra shifts after a frame must not produce windows.
      shift_en = 1;
      repeat (3) @(negedge clk);
      shift_en = 0;
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
