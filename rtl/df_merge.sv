// df_merge: MERGE dataflow element, the building block of a collection circuit.
//
// Collects the arguments of a shared function from two callers in the order
// given by control tokens: each control token names the input (0 or 1) whose
// next token is passed to the output. The control token and the selected data
// token are consumed in the same cycle; the other input waits. Function from
// the method; two inputs as in its examples; registered output stage, clocked
// valid/ready channels and reset are this design's choices.
//
// Interface: ctrl (1 bit), in0/in1 and out (DW bits), all valid/ready.
// Timing: one token per cycle, one cycle from input to output.
module df_merge
  import pipelink_pkg::*;
#(
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ctrl_valid,
  output logic          ctrl_ready,
  input  dp_tok_t       ctrl_data,
  input  logic          in0_valid,
  output logic          in0_ready,
  input  logic [DW-1:0] in0_data,
  input  logic          in1_valid,
  output logic          in1_ready,
  input  logic [DW-1:0] in1_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data
);
  logic sel_valid, fire;

  assign sel_valid  = (ctrl_data == DP_SECOND) ? in1_valid : in0_valid;
  assign fire       = ctrl_valid && sel_valid && (!out_valid || out_ready);
  assign ctrl_ready = fire;
  assign in0_ready  = fire && (ctrl_data == DP_FIRST);
  assign in1_ready  = fire && (ctrl_data == DP_SECOND);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (fire) begin
      out_valid <= 1'b1;
      out_data  <= (ctrl_data == DP_SECOND) ? in1_data : in0_data;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule
