// tb_pipelink_top: end-to-end test of the linked program
//     y0 = f(x0); if (c) y1 = f(x1); while (d) y2 = f(x2);
// with every parameter at its default. Random program runs draw c and a loop
// trip count (0..4); all argument, condition and result channels run with
// random valid/ready, independently of each other. The reference model numbers
// the calls in program order: the i-th call with argument x must return x + i
// to the caller that made it. The program's use-resource stream t must carry
// one 1 per call and a 0 per run. The test also counts how often each
// mechanism of the design occurred and fails if one never did: taken and
// untaken if, zero-trip and multi-trip loops, the SEQ switching to its second
// part, control tokens queued ahead of the data in every delivery FIFO, a full
// delivery FIFO, several calls in flight inside f, a MERGE holding a control
// token while waiting for its data, and back-pressure on a result.
module tb_pipelink_top;
  localparam int DW = 32, RUNS = 150, FD = 4;  // FD: the top's delivery FIFO depth
  logic clk = 0, rst_n = 0;
  logic x0_v, x0_r, x1_v, x1_r, x2_v, x2_r, c_v, c_r, c_d, d_v, d_r, d_d;
  logic y0_v, y0_r, y1_v, y1_r, y2_v, y2_r, t_v, t_r, t_d;
  logic [DW-1:0] x0_d, x1_d, x2_d, y0_d, y1_d, y2_d;
  int checks = 0, failures = 0;
  logic [DW-1:0] exp0[$], exp1[$], exp2[$];
  logic exp_t[$];

  always #5 clk = !clk;

  pipelink_top dut (.clk, .rst_n,
    .x0_valid(x0_v), .x0_ready(x0_r), .x0_data(x0_d),
    .x1_valid(x1_v), .x1_ready(x1_r), .x1_data(x1_d),
    .x2_valid(x2_v), .x2_ready(x2_r), .x2_data(x2_d),
    .c_valid(c_v), .c_ready(c_r), .c_data(c_d),
    .d_valid(d_v), .d_ready(d_r), .d_data(d_d),
    .y0_valid(y0_v), .y0_ready(y0_r), .y0_data(y0_d),
    .y1_valid(y1_v), .y1_ready(y1_r), .y1_data(y1_d),
    .y2_valid(y2_v), .y2_ready(y2_r), .y2_data(y2_d),
    .t_valid(t_v), .t_ready(t_r), .t_data(t_d));

  tb_stream_src  #(.W(DW), .PCT(50)) sx0 (.clk, .rst_n, .valid(x0_v), .ready(x0_r), .data(x0_d));
  tb_stream_src  #(.W(DW), .PCT(50)) sx1 (.clk, .rst_n, .valid(x1_v), .ready(x1_r), .data(x1_d));
  tb_stream_src  #(.W(DW), .PCT(50)) sx2 (.clk, .rst_n, .valid(x2_v), .ready(x2_r), .data(x2_d));
  tb_stream_src  #(.W(1),  .PCT(90)) sc  (.clk, .rst_n, .valid(c_v),  .ready(c_r),  .data(c_d));
  tb_stream_src  #(.W(1),  .PCT(90)) sd  (.clk, .rst_n, .valid(d_v),  .ready(d_r),  .data(d_d));
  tb_stream_sink #(.W(DW), .PCT(60)) ky0 (.clk, .rst_n, .valid(y0_v), .ready(y0_r), .data(y0_d));
  tb_stream_sink #(.W(DW), .PCT(60)) ky1 (.clk, .rst_n, .valid(y1_v), .ready(y1_r), .data(y1_d));
  tb_stream_sink #(.W(DW), .PCT(60)) ky2 (.clk, .rst_n, .valid(y2_v), .ready(y2_r), .data(y2_d));
  tb_stream_sink #(.W(1),  .PCT(80)) kt  (.clk, .rst_n, .valid(t_v),  .ready(t_r),  .data(t_d));

  // ---------------------------------------------------- mechanism counters
  int n_if_taken = 0, n_if_skipped = 0, n_loop_zero = 0, n_loop_multi = 0;
  int n_seq_second = 0, n_fifo_ahead_out = 0, n_fifo_ahead_in = 0, n_fifo_ahead_if = 0;
  int f_in = 0, f_out = 0;  // calls accepted by f / results left f
  int n_fifo_full = 0, n_f_inflight = 0, n_merge_wait = 0, n_result_stall = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_seq_out.dp_valid && dut.u_seq_out.dp_ready && dut.u_seq_out.dp_data) n_seq_second++;
    if (dut.u_fifo_out.count >= 2) n_fifo_ahead_out++;
    if (dut.u_fifo_in.count  >= 2) n_fifo_ahead_in++;
    if (dut.u_fifo_if.count  >= 2) n_fifo_ahead_if++;
    if (dut.u_fifo_out.count == FD || dut.u_fifo_in.count == FD || dut.u_fifo_if.count == FD) n_fifo_full++;
    f_in  += int'(dut.fx_v && dut.fx_r);
    f_out += int'(dut.fy_v && dut.fy_r);
    if (f_in - f_out >= 2) n_f_inflight++;
    if (dut.u_merge_out.ctrl_valid && !dut.u_merge_out.ctrl_ready) n_merge_wait++;
    if ((y0_v && !y0_r) || (y1_v && !y1_r) || (y2_v && !y2_r)) n_result_stall++;
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
    end else $display("mechanism %-34s %0d", what, n);
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int call = 0;
    for (int r = 0; r < RUNS; r++) begin
      logic [DW-1:0] v;
      logic c;
      int n, ones;
      ones = 0;
      v = $urandom; sx0.push(v); call++; ones++; exp0.push_back(v + DW'(call));
      c = 1'($urandom_range(1));
      sc.push(c);
      if (c) begin
        n_if_taken++;
        v = $urandom; sx1.push(v); call++; ones++; exp1.push_back(v + DW'(call));
      end else n_if_skipped++;
      n = $urandom_range(4);
      if (n == 0) n_loop_zero++;
      if (n >= 2) n_loop_multi++;
      repeat (n) begin
        sd.push(1'b1);
        v = $urandom; sx2.push(v); call++; ones++; exp2.push_back(v + DW'(call));
      end
      sd.push(1'b0);
      repeat (ones) exp_t.push_back(1'b1);
      exp_t.push_back(1'b0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Wait for all results, but give up after a bound so that a wrong design
    // still reaches the comparisons below.
    fork
      wait (ky0.got.size() >= exp0.size() && ky1.got.size() >= exp1.size() &&
            ky2.got.size() >= exp2.size() && kt.got.size() >= exp_t.size());
      repeat (100000) @(posedge clk);
    join_any
    disable fork;
    repeat (30) @(posedge clk);
    checks++;
    if (ky0.got.size() != exp0.size() || ky1.got.size() != exp1.size() ||
        ky2.got.size() != exp2.size()) begin
      failures++;
      $display("result counts differ from the program");
    end
    // The control network runs ahead: with the data exhausted it may already
    // have issued the 1 of the next run's first call, but nothing further.
    checks++;
    if (kt.got.size() < exp_t.size() || kt.got.size() > exp_t.size() + 1 ||
        (kt.got.size() == exp_t.size() + 1 && kt.got[exp_t.size()] !== 1'b1)) begin
      failures++;
      $display("use-resource stream length %0d, program needs %0d", kt.got.size(), exp_t.size());
    end
    foreach (exp0[i]) begin checks++; if (i >= ky0.got.size() || ky0.got[i] !== exp0[i]) begin failures++; $display("y0[%0d] wrong", i); end end
    foreach (exp1[i]) begin checks++; if (i >= ky1.got.size() || ky1.got[i] !== exp1[i]) begin failures++; $display("y1[%0d] wrong", i); end end
    foreach (exp2[i]) begin checks++; if (i >= ky2.got.size() || ky2.got[i] !== exp2[i]) begin failures++; $display("y2[%0d] wrong", i); end end
    foreach (exp_t[i]) begin checks++; if (i >= kt.got.size() || kt.got[i] !== exp_t[i]) begin failures++; $display("t[%0d] wrong", i); end end
    $display("calls: %0d in %0d runs, last result at cycle %0d", call, RUNS, ky2.cyc);
    need("if taken", n_if_taken);
    need("if not taken", n_if_skipped);
    need("loop with zero iterations", n_loop_zero);
    need("loop with several iterations", n_loop_multi);
    need("SEQ serving its second part", n_seq_second);
    need("outer delivery FIFO ahead by >=2", n_fifo_ahead_out);
    need("inner delivery FIFO ahead by >=2", n_fifo_ahead_in);
    need("if delivery FIFO ahead by >=2", n_fifo_ahead_if);
    need("delivery FIFO full", n_fifo_full);
    need("several calls in flight in f", n_f_inflight);
    need("MERGE control waiting for data", n_merge_wait);
    need("result back-pressure", n_result_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
