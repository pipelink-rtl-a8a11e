// actn_seq: SEQ element of the adaptive control token network.
//
// Composes the use-resource sequences t0 and t1 of two program parts run one
// after the other. While reading t0 it forwards every 1 to t and emits dp=0 for
// it; the 0 that ends t0 is absorbed and the element switches to t1. While
// reading t1 it forwards every 1 to t with dp=1; the 0 that ends t1 is forwarded
// to t and the element switches back to t0. With t0=1,0 and t1=1,0 this gives
// t=1,1,0 and dp=0,1. That behaviour is the method's; the clocked valid/ready
// channels and the one-register output stages are this design's choices.
//
// Interface: inputs t0, t1 and outputs t, dp, all one-bit valid/ready channels.
// Timing: an input token is consumed in the cycle where every output it feeds
// can take a token; results appear one cycle later (registered outputs).
// Throughput one input token per cycle.
module actn_seq
  import pipelink_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    t0_valid,
  output logic    t0_ready,
  input  ur_tok_t t0_data,
  input  logic    t1_valid,
  output logic    t1_ready,
  input  ur_tok_t t1_data,
  output logic    t_valid,
  input  logic    t_ready,
  output ur_tok_t t_data,
  output logic    dp_valid,
  input  logic    dp_ready,
  output dp_tok_t dp_data
);
  typedef enum logic {READ_T0, READ_T1} seq_state_e;
  seq_state_e state;

  logic    in_valid, in_fire, t_free, dp_free;
  ur_tok_t in_data;
  logic    emit_t, emit_dp;

  assign t_free  = !t_valid  || t_ready;
  assign dp_free = !dp_valid || dp_ready;

  assign in_valid = (state == READ_T0) ? t0_valid : t1_valid;
  assign in_data  = (state == READ_T0) ? t0_data  : t1_data;

  // A 1 from either side produces t=1 and a dp token; only t1's 0 reaches t.
  always_comb begin
    emit_dp = (in_data == UR_USE);
    emit_t  = (in_data == UR_USE) || (state == READ_T1);
  end

  assign in_fire  = in_valid && (!emit_t || t_free) && (!emit_dp || dp_free);
  assign t0_ready = (state == READ_T0) && in_fire;
  assign t1_ready = (state == READ_T1) && in_fire;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= READ_T0;
      t_valid  <= 1'b0;
      dp_valid <= 1'b0;
      t_data   <= UR_END;
      dp_data  <= DP_FIRST;
    end else begin
      if (t_ready)  t_valid  <= 1'b0;
      if (dp_ready) dp_valid <= 1'b0;
      if (in_fire) begin
        if (emit_t) begin
          t_valid <= 1'b1;
          t_data  <= in_data;
        end
        if (emit_dp) begin
          dp_valid <= 1'b1;
          dp_data  <= (state == READ_T0) ? DP_FIRST : DP_SECOND;
        end
        if (in_data == UR_END)
          state <= (state == READ_T0) ? READ_T1 : READ_T0;
      end
    end
  end

  // An output token must stay put until it is taken.
  a_t_hold:  assert property (@(posedge clk) disable iff (!rst_n)
                              t_valid && !t_ready |=> t_valid && $stable(t_data));
  a_dp_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              dp_valid && !dp_ready |=> dp_valid && $stable(dp_data));
endmodule
