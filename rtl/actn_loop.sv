// actn_loop: LOOP_c element of the adaptive control token network.
//
// For a loop whose body has the use-resource sequence t_body, each loop test
// delivers one condition token c. While c is true the element forwards the 1s
// of one body sequence to t and absorbs the body's closing 0, then reads the
// next condition. When c is false the loop has ended and a single 0 is appended
// to t. So t accumulates the 1s of every iteration followed by one 0. A loop
// has a single body, so no datapath control token is produced. The behaviour
// is the method's; channels, registered output and reset are this design's.
//
// Interface: inputs c (loop condition) and tb (body sequence), output t; all
// one-bit valid/ready. Timing: one input token per cycle, registered output.
module actn_loop
  import pipelink_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    c_valid,
  output logic    c_ready,
  input  logic    c_data,
  input  logic    tb_valid,
  output logic    tb_ready,
  input  ur_tok_t tb_data,
  output logic    t_valid,
  input  logic    t_ready,
  output ur_tok_t t_data
);
  typedef enum logic {WAIT_COND, FWD_BODY} loop_state_e;
  loop_state_e state;

  logic t_free;
  assign t_free = !t_valid || t_ready;

  // A false condition writes the closing 0, so it needs a free output stage.
  assign c_ready  = (state == WAIT_COND) && (c_data || t_free);
  // The body's 1s go out; its 0 is absorbed without output.
  assign tb_ready = (state == FWD_BODY) && ((tb_data == UR_END) || t_free);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= WAIT_COND;
      t_valid <= 1'b0;
      t_data  <= UR_END;
    end else begin
      if (t_ready) t_valid <= 1'b0;
      if (c_valid && c_ready) begin
        if (c_data) state <= FWD_BODY;
        else begin
          t_valid <= 1'b1;
          t_data  <= UR_END;
        end
      end
      if (tb_valid && tb_ready) begin
        if (tb_data == UR_USE) begin
          t_valid <= 1'b1;
          t_data  <= UR_USE;
        end else begin
          state <= WAIT_COND;
        end
      end
    end
  end

  a_t_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             t_valid && !t_ready |=> t_valid && $stable(t_data));
endmodule
