// tb_stream_src: testbench token source for a valid/ready channel.
//
// Tokens queued with push() are offered in order. While a token waits, valid is
// raised with probability PCT/100 per cycle (PCT=100: always); once raised it
// stays high with stable data until the handshake. Signals change on the
// falling clock edge, handshakes are taken on the rising edge.
module tb_stream_src #(
  parameter int unsigned W   = 1,
  parameter int unsigned PCT = 70
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         valid,
  input  logic         ready,
  output logic [W-1:0] data
);
  logic [W-1:0] q[$];
  int unsigned  sent = 0;

  function automatic void push(logic [W-1:0] v);
    q.push_back(v);
  endfunction

  initial begin
    valid = 1'b0;
    data  = '0;
  end

  always @(posedge clk) begin
    if (rst_n && valid && ready) begin
      void'(q.pop_front());
      sent++;
      valid <= 1'b0;
    end
  end

  always @(negedge clk) begin
    if (!valid && q.size() > 0 && ($urandom_range(99) < PCT)) valid = 1'b1;
    data = (q.size() > 0) ? q[0] : '0;
  end
endmodule
