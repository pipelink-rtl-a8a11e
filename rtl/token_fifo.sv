// token_fifo: FIFO buffer for control tokens at the delivery end.
//
// The control token that steers a SPLIT is produced as soon as the control
// network knows the access order, usually long before the shared function
// returns the result. This FIFO holds such tokens so the network can run ahead
// and start new invocations without waiting for earlier ones to finish. The
// placement is the method's; depth, width and the circular-buffer structure are
// this design's choices.
//
// Interface: in and out, W-bit valid/ready channels. Timing: a token written in
// one cycle can be read in the next; DEPTH tokens can be held; one write and
// one read per cycle, including when full (a read frees the slot).
module token_fifo #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;
  logic          wr, rd;

  assign out_valid = (count != 0);
  assign out_data  = mem[rd_ptr];
  assign in_ready  = (count < (AW+1)'(DEPTH)) || out_ready;
  assign wr        = in_valid && in_ready;
  assign rd        = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr) wr_ptr <= next_ptr(wr_ptr);
      if (rd) rd_ptr <= next_ptr(rd_ptr);
      case ({wr, rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wr_ptr] <= in_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  count <= (AW+1)'(DEPTH));
endmodule
