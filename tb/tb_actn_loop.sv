// tb_actn_loop: checks LOOP_c composition over random loop executions. Each
// execution runs n iterations (0..4; the condition stream is n ones then a 0)
// and each iteration's body sequence has k ones (0..2) then 0. t must carry the
// sum of all k as ones, then a single 0.
module tb_actn_loop;
  logic clk = 0, rst_n = 0;
  logic c_v, c_r, c_d, b_v, b_r, b_d, t_v, t_r, t_d;
  int checks = 0, failures = 0;
  logic exp_t[$];

  always #5 clk = !clk;

  actn_loop dut (.clk, .rst_n,
    .c_valid(c_v), .c_ready(c_r), .c_data(c_d),
    .tb_valid(b_v), .tb_ready(b_r), .tb_data(b_d),
    .t_valid(t_v), .t_ready(t_r), .t_data(t_d));
  tb_stream_src  #(.W(1), .PCT(60)) sc (.clk, .rst_n, .valid(c_v), .ready(c_r), .data(c_d));
  tb_stream_src  #(.W(1), .PCT(70)) sb (.clk, .rst_n, .valid(b_v), .ready(b_r), .data(b_d));
  tb_stream_sink #(.W(1), .PCT(60)) kt (.clk, .rst_n, .valid(t_v), .ready(t_r), .data(t_d));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 60; r++) begin
      int n;
      n = (r == 0) ? 0 : $urandom_range(4);
      repeat (n) begin
        int k;
        k = $urandom_range(2);
        sc.push(1'b1);
        repeat (k) begin sb.push(1'b1); exp_t.push_back(1'b1); end
        sb.push(1'b0);
      end
      sc.push(1'b0);
      exp_t.push_back(1'b0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (kt.got.size() >= exp_t.size() && sb.q.size() == 0 && sc.q.size() == 0);
    repeat (20) @(posedge clk);
    checks++;
    if (kt.got.size() != exp_t.size()) begin
      failures++;
      $display("count: t %0d/%0d", kt.got.size(), exp_t.size());
    end
    foreach (exp_t[i]) begin
      checks++;
      if (kt.got[i] !== exp_t[i]) begin failures++; $display("t[%0d] wrong", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
