// tb_token_fifo: checks the delivery-end FIFO. Random tokens pass through under
// random push and pop rates and must come out unchanged and in order; the
// occupancy must reach DEPTH (the writer is then held off) and a read from a
// full FIFO must allow a write in the same cycle.
module tb_token_fifo;
  localparam int W = 4, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic i_v, i_r, o_v, o_r;
  logic [W-1:0] i_d, o_d;
  int checks = 0, failures = 0;
  int full_seen = 0, full_pass = 0;
  logic [W-1:0] exp_o[$];

  always #5 clk = !clk;

  token_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n,
    .in_valid(i_v), .in_ready(i_r), .in_data(i_d),
    .out_valid(o_v), .out_ready(o_r), .out_data(o_d));
  tb_stream_src  #(.W(W), .PCT(80)) si (.clk, .rst_n, .valid(i_v), .ready(i_r), .data(i_d));
  tb_stream_sink #(.W(W), .PCT(40)) ko (.clk, .rst_n, .valid(o_v), .ready(o_r), .data(o_d));

  // Occupancy model from the handshakes alone.
  int occ = 0;
  always @(posedge clk) if (rst_n) begin
    if (occ == DEPTH) begin
      full_seen++;
      checks++;
      if (i_r !== o_r) begin failures++; $display("full FIFO: in_ready=%0d out_ready=%0d", i_r, o_r); end
      if (i_v && o_r) full_pass++;
    end
    occ = occ + int'(i_v && i_r) - int'(o_v && o_r);
    if (occ > DEPTH || occ < 0) begin failures++; $display("occupancy %0d out of range", occ); end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      si.push(v);
      exp_o.push_back(v);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ko.got.size() >= exp_o.size());
    repeat (20) @(posedge clk);
    checks++;
    if (ko.got.size() != exp_o.size()) begin failures++; $display("count wrong"); end
    foreach (exp_o[i]) begin
      checks++;
      if (ko.got[i] !== exp_o[i]) begin failures++; $display("out[%0d] wrong", i); end
    end
    checks++;
    if (full_seen == 0 || full_pass == 0) begin
      failures++;
      $display("full FIFO not exercised: full=%0d pass=%0d", full_seen, full_pass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
