// df_split: SPLIT dataflow element, the building block of a delivery circuit.
//
// Delivers results of a shared function back to the callers: each control
// token names the output (0 or 1) that receives the next input token. The
// control token and the data token are consumed together. Function from the
// method; two outputs as in its examples; registered output stages, clocked
// valid/ready channels and reset are this design's choices.
//
// Interface: ctrl (1 bit), in and out0/out1 (DW bits), all valid/ready.
// Timing: one token per cycle, one cycle from input to output.
module df_split
  import pipelink_pkg::*;
#(
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ctrl_valid,
  output logic          ctrl_ready,
  input  dp_tok_t       ctrl_data,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_data,
  output logic          out0_valid,
  input  logic          out0_ready,
  output logic [DW-1:0] out0_data,
  output logic          out1_valid,
  input  logic          out1_ready,
  output logic [DW-1:0] out1_data
);
  logic dst_free, fire;

  assign dst_free   = (ctrl_data == DP_SECOND) ? (!out1_valid || out1_ready)
                                               : (!out0_valid || out0_ready);
  assign fire       = ctrl_valid && in_valid && dst_free;
  assign ctrl_ready = fire;
  assign in_ready   = fire;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out0_valid <= 1'b0;
      out1_valid <= 1'b0;
      out0_data  <= '0;
      out1_data  <= '0;
    end else begin
      if (out0_ready) out0_valid <= 1'b0;
      if (out1_ready) out1_valid <= 1'b0;
      if (fire) begin
        if (ctrl_data == DP_SECOND) begin
          out1_valid <= 1'b1;
          out1_data  <= in_data;
        end else begin
          out0_valid <= 1'b1;
          out0_data  <= in_data;
        end
      end
    end
  end

  a_out0_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                out0_valid && !out0_ready |=> out0_valid && $stable(out0_data));
  a_out1_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                out1_valid && !out1_ready |=> out1_valid && $stable(out1_data));
endmodule
