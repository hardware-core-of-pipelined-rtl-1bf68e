// control_unit: state machine that sequences the thinning core (the CU).
//
// After a start pulse it loads one frame, then runs thinning iterations,
// each made of a sub-iteration-1 pass followed by a sub-iteration-2 pass.
// When a whole iteration deletes no pixel the image is a one-pixel-wide
// skeleton; the frame is then streamed out and done pulses for one clock.
// States:
//   IDLE      waiting for start
//   LOAD      load_en high until the datapath reports the frame loaded
//   SUB1_GO   one clock: pass_start with sub-iteration 1
//   SUB1_RUN  waiting for pass_done; remembers whether pixels were deleted
//   SUB2_GO   one clock: pass_start with sub-iteration 2
//   SUB2_RUN  waiting for pass_done; another iteration if either pass
//             deleted a pixel, otherwise unload
//   OUT_GO    one clock: unload_start
//   OUT_RUN   waiting for unload_done
//   DONE      one clock: done pulse
// busy is high outside IDLE; iterations counts completed iterations,
// including the final one that changed nothing, and holds its value until
// the next start.
//
// A control unit driven by an ASM chart follows the implemented design; the
// states and the control signals above are this design's choices.
module control_unit
  import thin_pkg::*;
#(
  parameter int unsigned ITER_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  du_cu_if.cu               ctl,
  output logic              busy,
  output logic              done,
  output logic [ITER_W-1:0] iterations
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_SUB1_GO, S_SUB1_RUN, S_SUB2_GO, S_SUB2_RUN,
    S_OUT_GO, S_OUT_RUN, S_DONE
  } state_e;

  state_e state, state_n;
  logic   sub1_changed;

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:     if (start)          state_n = S_LOAD;
      S_LOAD:     if (ctl.load_done)  state_n = S_SUB1_GO;
      S_SUB1_GO:                      state_n = S_SUB1_RUN;
      S_SUB1_RUN: if (ctl.pass_done)  state_n = S_SUB2_GO;
      S_SUB2_GO:                      state_n = S_SUB2_RUN;
      S_SUB2_RUN: if (ctl.pass_done)  state_n = (sub1_changed || ctl.pass_changed)
                                                ? S_SUB1_GO : S_OUT_GO;
      S_OUT_GO:                       state_n = S_OUT_RUN;
      S_OUT_RUN:  if (ctl.unload_done) state_n = S_DONE;
      S_DONE:                         state_n = S_IDLE;
      default:                        state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      sub1_changed <= 1'b0;
      iterations   <= '0;
    end else begin
      state <= state_n;
      if (state == S_IDLE && start) iterations <= '0;
      if (state == S_SUB1_RUN && ctl.pass_done) sub1_changed <= ctl.pass_changed;
      if (state == S_SUB2_RUN && ctl.pass_done) iterations <= iterations + 1'b1;
    end
  end

  // Moore outputs.
  assign ctl.load_en      = (state == S_LOAD);
  assign ctl.pass_start   = (state == S_SUB1_GO) || (state == S_SUB2_GO);
  assign ctl.sub          = (state == S_SUB2_GO) ? SUB_2 : SUB_1;
  assign ctl.unload_start = (state == S_OUT_GO);
  assign busy             = (state != S_IDLE);
  assign done             = (state == S_DONE);

endmodule
