// actn_if: IF_c element of the adaptive control token network.
//
// For the statement "if (c) {S} else {T}" it reads one condition token c, then
// forwards the 1s of the selected branch's use-resource sequence (t_S when c is
// true, t_T when false) to t, emitting a datapath control token for each 1:
// dp=1 for the true branch and dp=0 for the false one. The 0 that ends the
// branch sequence is absorbed and one 0 is appended to t, closing the
// statement's sequence. The unselected branch sequence is not touched. That
// behaviour is the method's; the valid/ready channels, registered outputs and
// reset are this design's choices.
//
// Interface: inputs c, ts, tt and outputs t, dp, all one-bit valid/ready.
// Timing: the condition is taken in one cycle (no output), then one branch
// token per cycle; outputs are registered, one cycle after the input.
module actn_if
  import pipelink_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    c_valid,
  output logic    c_ready,
  input  logic    c_data,
  input  logic    ts_valid,
  output logic    ts_ready,
  input  ur_tok_t ts_data,
  input  logic    tt_valid,
  output logic    tt_ready,
  input  ur_tok_t tt_data,
  output logic    t_valid,
  input  logic    t_ready,
  output ur_tok_t t_data,
  output logic    dp_valid,
  input  logic    dp_ready,
  output dp_tok_t dp_data
);
  typedef enum logic [1:0] {WAIT_COND, FWD_THEN, FWD_ELSE} if_state_e;
  if_state_e state;

  logic    t_free, dp_free, br_valid, br_fire;
  ur_tok_t br_data;

  assign t_free  = !t_valid  || t_ready;
  assign dp_free = !dp_valid || dp_ready;

  assign c_ready  = (state == WAIT_COND);
  assign br_valid = (state == FWD_THEN) ? ts_valid : (state == FWD_ELSE) ? tt_valid : 1'b0;
  assign br_data  = (state == FWD_THEN) ? ts_data  : tt_data;

  // A 1 needs both t and dp; the closing 0 needs only t.
  assign br_fire  = br_valid && t_free && ((br_data == UR_END) || dp_free);
  assign ts_ready = (state == FWD_THEN) && br_fire;
  assign tt_ready = (state == FWD_ELSE) && br_fire;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= WAIT_COND;
      t_valid  <= 1'b0;
      dp_valid <= 1'b0;
      t_data   <= UR_END;
      dp_data  <= DP_FIRST;
    end else begin
      if (t_ready)  t_valid  <= 1'b0;
      if (dp_ready) dp_valid <= 1'b0;
      case (state)
        WAIT_COND: if (c_valid) state <= c_data ? FWD_THEN : FWD_ELSE;
        default: if (br_fire) begin
          t_valid <= 1'b1;
          t_data  <= br_data;
          if (br_data == UR_USE) begin
            dp_valid <= 1'b1;
            dp_data  <= (state == FWD_THEN) ? DP_SECOND : DP_FIRST;
          end else begin
            state <= WAIT_COND;
          end
        end
      endcase
    end
  end

  a_t_hold:  assert property (@(posedge clk) disable iff (!rst_n)
                              t_valid && !t_ready |=> t_valid && $stable(t_data));
  a_dp_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              dp_valid && !dp_ready |=> dp_valid && $stable(dp_data));
endmodule
