// use_resource_src: use-resource sequence of a single call site (the base case).
//
// Each execution of a lone function call uses the shared function exactly once,
// so its use-resource sequence is 1,0. The sequence is identical for every
// execution and the consuming composition element only reads it when the
// program reaches the call site, so this source needs no trigger: it offers
// 1,0,1,0,... and advances on each accepted token. The absence of a trigger
// input is this design's choice; the 1,0 sequence is the method's.
//
// Interface: one valid/ready output channel t (1 bit). t_valid is high from the
// first cycle after reset; the value toggles after each handshake.
module use_resource_src
  import pipelink_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  output logic    t_valid,
  input  logic    t_ready,
  output ur_tok_t t_data
);
  logic sent_use;  // the 1 of the current execution has been consumed

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sent_use <= 1'b0;
      t_valid  <= 1'b0;
    end else begin
      t_valid <= 1'b1;
      if (t_valid && t_ready) sent_use <= !sent_use;
    end
  end

  assign t_data = sent_use ? UR_END : UR_USE;
endmodule
