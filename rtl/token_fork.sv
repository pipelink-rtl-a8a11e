// token_fork: eager two-way fork of a valid/ready channel.
//
// Copies every input token to two consumers (here: a MERGE and the FIFO in
// front of the matching SPLIT). Each output is offered the token until it takes
// it; the input is released once both have taken it, so a slow consumer does
// not hold the other back within one token. This element is this design's way
// of drawing the branching control wire of the method's figures.
//
// Interface: in, out0, out1, W-bit valid/ready. Timing: combinational path
// from input to outputs, no added latency.
module token_fork #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out0_valid,
  input  logic         out0_ready,
  output logic [W-1:0] out0_data,
  output logic         out1_valid,
  input  logic         out1_ready,
  output logic [W-1:0] out1_data
);
  logic done0, done1;  // output has taken the current token

  assign out0_valid = in_valid && !done0;
  assign out1_valid = in_valid && !done1;
  assign out0_data  = in_data;
  assign out1_data  = in_data;
  assign in_ready   = (done0 || out0_ready) && (done1 || out1_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done0 <= 1'b0;
      done1 <= 1'b0;
    end else if (in_valid && in_ready) begin
      done0 <= 1'b0;
      done1 <= 1'b0;
    end else begin
      if (out0_valid && out0_ready) done0 <= 1'b1;
      if (out1_valid && out1_ready) done1 <= 1'b1;
    end
  end
endmodule
