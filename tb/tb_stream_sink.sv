// tb_stream_sink: testbench sink for a valid/ready channel.
//
// Raises ready with probability PCT/100 per cycle and records every accepted
// token, with the cycle it arrived in, for the testbench to compare.
module tb_stream_sink #(
  parameter int unsigned W   = 1,
  parameter int unsigned PCT = 70
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  output logic         ready,
  input  logic [W-1:0] data
);
  logic [W-1:0] got[$];
  longint       when[$];
  longint       cyc = 0;
  int unsigned  stalls = 0;   // cycles with a token offered and not taken

  initial ready = 1'b0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && valid && ready) begin
      got.push_back(data);
      when.push_back(cyc);
    end
    if (rst_n && valid && !ready) stalls++;
  end

  always @(negedge clk) ready = ($urandom_range(99) < PCT);
endmodule
