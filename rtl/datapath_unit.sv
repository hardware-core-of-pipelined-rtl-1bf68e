// datapath_unit: frame memory, address counters, mask register and pixel
// processing unit of the thinning core (the DU).
//
// Three operations, selected by the control unit through du_cu_if:
//  * Load: while load_en is high, every pix_in with pix_in_valid and
//    in_ready is written at the next raster address. load_done rises once
//    W*H pixels are in; the counter clears when load_en drops.
//  * Pass: a pass_start pulse streams the frame through the pipeline. The
//    read counter runs over W*H + W + 1 clocks (the last W+1 feed zeros to
//    flush the window). Memory read (1 clock) feeds the mask register, whose
//    window goes to the PPU (3 clocks); each result is written back to the
//    centre address. The write address always trails the read address by
//    more than a line, and every pixel of the window was read before its
//    centre is rewritten, so the pass works in place on one memory and
//    still sees only the frame as it was at the start of the pass.
//    pass_done pulses one clock after the last write, with pass_changed
//    telling whether any pixel was deleted. One pass takes W*H + W + 7
//    clocks from pass_start to pass_done.
//  * Unload: an unload_start pulse reads the frame out in raster order, one
//    pixel per clock on pix_out/pix_out_valid, starting two clocks later.
//
// The split into datapath and control unit, the mask register and PPU
// follow the implemented design; the single in-place frame memory and the
// operation handshake are this design's choices.
module datapath_unit
  import thin_pkg::*;
#(
  parameter int unsigned W      = IMG_W,
  parameter int unsigned H      = IMG_H,
  parameter int unsigned N      = W * H,
  parameter int unsigned ADDR_W = $clog2(N)
) (
  input  logic clk,
  input  logic rst_n,
  du_cu_if.du  ctl,
  input  logic pix_in,
  input  logic pix_in_valid,
  output logic in_ready,
  output logic pix_out,
  output logic pix_out_valid
);

  localparam int unsigned CNT_W = $clog2(N + W + 2);

  // ---- load -------------------------------------------------------------
  logic [CNT_W-1:0] wr_cnt;
  logic             load_we;

  assign ctl.load_done = (wr_cnt == CNT_W'(N));
  assign in_ready      = ctl.load_en && !ctl.load_done;
  assign load_we       = in_ready && pix_in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            wr_cnt <= '0;
    else if (!ctl.load_en) wr_cnt <= '0;
    else if (load_we)      wr_cnt <= wr_cnt + 1'b1;
  end

  // ---- read sequencer (pass and unload) ----------------------------------
  logic             pass_run, unload_run;
  logic [CNT_W-1:0] rd_cnt;
  logic             rd_en;
  logic             feed_valid, feed_real;   // memory data arrives this clock
  logic             out_rd;                  // unload data arrives this clock
  logic             out_last;

  assign rd_en = (pass_run && rd_cnt < CNT_W'(N)) || unload_run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pass_run   <= 1'b0;
      unload_run <= 1'b0;
      rd_cnt     <= '0;
      feed_valid <= 1'b0;
      feed_real  <= 1'b0;
      out_rd     <= 1'b0;
      out_last   <= 1'b0;
    end else begin
      feed_valid <= pass_run;
      feed_real  <= pass_run && rd_cnt < CNT_W'(N);
      out_rd     <= unload_run;
      out_last   <= unload_run && rd_cnt == CNT_W'(N - 1);
      if (ctl.pass_start) begin
        pass_run <= 1'b1;
        rd_cnt   <= '0;
      end else if (ctl.unload_start) begin
        unload_run <= 1'b1;
        rd_cnt     <= '0;
      end else if (pass_run) begin
        rd_cnt <= rd_cnt + 1'b1;
        if (rd_cnt == CNT_W'(N + W)) pass_run <= 1'b0;
      end else if (unload_run) begin
        rd_cnt <= rd_cnt + 1'b1;
        if (rd_cnt == CNT_W'(N - 1)) unload_run <= 1'b0;
      end
    end
  end

  // ---- frame memory -----------------------------------------------------
  logic              rd_data;
  logic              we, wr_data;
  logic [ADDR_W-1:0] wr_addr;

  frame_ram #(.DEPTH(N), .ADDR_W(ADDR_W)) u_ram (
    .clk    (clk),
    .rd_en  (rd_en),
    .rd_addr(rd_cnt[ADDR_W-1:0]),
    .rd_data(rd_data),
    .we     (we),
    .wr_addr(wr_addr),
    .wr_data(wr_data)
  );

  // ---- window generator -------------------------------------------------
  window_t           win;
  logic              win_valid;
  logic [ADDR_W-1:0] win_addr;

  mask_register #(.W(W), .H(H), .ADDR_W(ADDR_W)) u_mr (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (ctl.pass_start),
    .shift_en (feed_valid),
    .din      (feed_real & rd_data),
    .win      (win),
    .win_valid(win_valid),
    .win_addr (win_addr)
  );

  // ---- pixel processing unit ---------------------------------------------
  subiter_e          sub_q;
  logic              ppu_valid, ppu_pix, ppu_del;
  logic [ADDR_W-1:0] ppu_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              sub_q <= SUB_1;
    else if (ctl.pass_start) sub_q <= ctl.sub;
  end

  ppu #(.TAG_W(ADDR_W)) u_ppu (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (win_valid),
    .in_win   (win),
    .in_sub   (sub_q),
    .in_tag   (win_addr),
    .out_valid(ppu_valid),
    .out_pix  (ppu_pix),
    .out_del  (ppu_del),
    .out_tag  (ppu_tag)
  );

  // ---- write-back ---------------------------------------------------------
  logic changed;

  always_comb begin
    if (ctl.load_en) begin
      we      = load_we;
      wr_addr = wr_cnt[ADDR_W-1:0];
      wr_data = pix_in;
    end else begin
      we      = ppu_valid;
      wr_addr = ppu_tag;
      wr_data = ppu_pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      changed       <= 1'b0;
      ctl.pass_done <= 1'b0;
    end else begin
      ctl.pass_done <= ppu_valid && ppu_tag == ADDR_W'(N - 1);
      if (ctl.pass_start)             changed <= 1'b0;
      else if (ppu_valid && ppu_del)  changed <= 1'b1;
    end
  end

  assign ctl.pass_changed = changed;
  assign ctl.unload_done  = out_rd && out_last;
  assign pix_out          = rd_data;
  assign pix_out_valid    = out_rd;

  // A pass and an unload never overlap, and no pass starts while loading.
  assert property (@(posedge clk) disable iff (!rst_n)
                   ctl.pass_start |-> !pass_run && !unload_run && !ctl.load_en);
  assert property (@(posedge clk) disable iff (!rst_n)
                   ctl.unload_start |-> !pass_run && !unload_run);

endmodule
