// tb_actn_if: checks IF_c composition over random runs. For each run a
// condition c is drawn; the chosen branch's sequence has k ones (0..3) then 0.
// t must be k ones then an appended 0; dp must be k ones for the true branch or
// k zeros for the false one. The branch sources hold only the sequences of the
// runs that select them, so a read of the wrong branch shows as a mismatch.
module tb_actn_if;
  logic clk = 0, rst_n = 0;
  logic c_v, c_r, c_d, ts_v, ts_r, ts_d, tt_v, tt_r, tt_d, t_v, t_r, t_d, dp_v, dp_r, dp_d;
  int checks = 0, failures = 0;
  int n_then = 0, n_else = 0;
  logic exp_t[$], exp_dp[$];

  always #5 clk = !clk;

  actn_if dut (.clk, .rst_n,
    .c_valid(c_v), .c_ready(c_r), .c_data(c_d),
    .ts_valid(ts_v), .ts_ready(ts_r), .ts_data(ts_d),
    .tt_valid(tt_v), .tt_ready(tt_r), .tt_data(tt_d),
    .t_valid(t_v), .t_ready(t_r), .t_data(t_d),
    .dp_valid(dp_v), .dp_ready(dp_r), .dp_data(dp_d));
  tb_stream_src  #(.W(1), .PCT(60)) sc (.clk, .rst_n, .valid(c_v), .ready(c_r), .data(c_d));
  tb_stream_src  #(.W(1), .PCT(70)) ss (.clk, .rst_n, .valid(ts_v), .ready(ts_r), .data(ts_d));
  tb_stream_src  #(.W(1), .PCT(70)) st (.clk, .rst_n, .valid(tt_v), .ready(tt_r), .data(tt_d));
  tb_stream_sink #(.W(1), .PCT(60)) kt (.clk, .rst_n, .valid(t_v), .ready(t_r), .data(t_d));
  tb_stream_sink #(.W(1), .PCT(60)) kd (.clk, .rst_n, .valid(dp_v), .ready(dp_r), .data(dp_d));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 80; r++) begin
      logic c;
      int k;
      c = 1'($urandom_range(1));
      k = $urandom_range(3);
      sc.push(c);
      if (c) n_then++; else n_else++;
      repeat (k) begin
        if (c) ss.push(1'b1); else st.push(1'b1);
        exp_t.push_back(1'b1);
        exp_dp.push_back(c);
      end
      if (c) ss.push(1'b0); else st.push(1'b0);
      exp_t.push_back(1'b0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (kt.got.size() >= exp_t.size() && kd.got.size() >= exp_dp.size());
    repeat (20) @(posedge clk);
    checks++;
    if (kt.got.size() != exp_t.size() || kd.got.size() != exp_dp.size() || n_then == 0 || n_else == 0) begin
      failures++;
      $display("count: t %0d/%0d dp %0d/%0d", kt.got.size(), exp_t.size(), kd.got.size(), exp_dp.size());
    end
    foreach (exp_t[i]) begin
      checks++;
      if (kt.got[i] !== exp_t[i]) begin failures++; $display("t[%0d] wrong", i); end
    end
    foreach (exp_dp[i]) begin
      checks++;
      if (kd.got[i] !== exp_dp[i]) begin failures++; $display("dp[%0d] wrong", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
