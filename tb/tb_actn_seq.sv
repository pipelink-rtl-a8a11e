// tb_actn_seq: checks SEQ composition. First the two-call example (t0=1,0 and
// t1=1,0 must give t=1,1,0 and dp=0,1), then random runs where t0 and t1 carry
// k0 and k1 ones (0..4) before their 0: t must be k0+k1 ones then 0 and dp must
// be k0 zeros then k1 ones. Inputs and outputs are stalled at random.
module tb_actn_seq;
  logic clk = 0, rst_n = 0;
  logic t0_v, t0_r, t0_d, t1_v, t1_r, t1_d, t_v, t_r, t_d, dp_v, dp_r, dp_d;
  int checks = 0, failures = 0;
  logic exp_t[$], exp_dp[$];

  always #5 clk = !clk;

  actn_seq dut (.clk, .rst_n,
    .t0_valid(t0_v), .t0_ready(t0_r), .t0_data(t0_d),
    .t1_valid(t1_v), .t1_ready(t1_r), .t1_data(t1_d),
    .t_valid(t_v), .t_ready(t_r), .t_data(t_d),
    .dp_valid(dp_v), .dp_ready(dp_r), .dp_data(dp_d));
  tb_stream_src  #(.W(1), .PCT(70)) s0 (.clk, .rst_n, .valid(t0_v), .ready(t0_r), .data(t0_d));
  tb_stream_src  #(.W(1), .PCT(70)) s1 (.clk, .rst_n, .valid(t1_v), .ready(t1_r), .data(t1_d));
  tb_stream_sink #(.W(1), .PCT(60)) kt (.clk, .rst_n, .valid(t_v), .ready(t_r), .data(t_d));
  tb_stream_sink #(.W(1), .PCT(60)) kd (.clk, .rst_n, .valid(dp_v), .ready(dp_r), .data(dp_d));

  task automatic add_run(int k0, int k1);
    repeat (k0) begin s0.push(1'b1); exp_t.push_back(1'b1); exp_dp.push_back(1'b0); end
    s0.push(1'b0);
    repeat (k1) begin s1.push(1'b1); exp_t.push_back(1'b1); exp_dp.push_back(1'b1); end
    s1.push(1'b0);
    exp_t.push_back(1'b0);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    add_run(1, 1);
    for (int r = 0; r < 60; r++) add_run($urandom_range(4), $urandom_range(4));
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (kt.got.size() >= exp_t.size() && kd.got.size() >= exp_dp.size());
    repeat (20) @(posedge clk);
    // The worked example from the method: t01 = 1,1,0 and dp01 = 0,1.
    checks++;
    if (!(kt.got[0] == 1 && kt.got[1] == 1 && kt.got[2] == 0 && kd.got[0] == 0 && kd.got[1] == 1)) begin
      failures++;
      $display("two-call example wrong");
    end
    checks++;
    if (kt.got.size() != exp_t.size() || kd.got.size() != exp_dp.size()) begin
      failures++;
      $display("count: t %0d/%0d dp %0d/%0d", kt.got.size(), exp_t.size(), kd.got.size(), exp_dp.size());
    end
    foreach (exp_t[i]) begin
      checks++;
      if (i >= kt.got.size() || kt.got[i] !== exp_t[i]) begin
        failures++;
        $display("t[%0d] wrong", i);
      end
    end
    foreach (exp_dp[i]) begin
      checks++;
      if (i >= kd.got.size() || kd.got[i] !== exp_dp[i]) begin
        failures++;
        $display("dp[%0d] wrong", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
