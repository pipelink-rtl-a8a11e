// tb_df_split: checks the SPLIT element. Random data tokens are steered by a
// random control sequence; each output must receive exactly the tokens
// addressed to it, in order. All channels are stalled at random.
module tb_df_split;
  localparam int DW = 32;
  logic clk = 0, rst_n = 0;
  logic c_v, c_r, c_d, i_v, i_r, o0_v, o0_r, o1_v, o1_r;
  logic [DW-1:0] i_d, o0_d, o1_d;
  int checks = 0, failures = 0;
  logic [DW-1:0] exp0[$], exp1[$];

  always #5 clk = !clk;

  df_split #(.DW(DW)) dut (.clk, .rst_n,
    .ctrl_valid(c_v), .ctrl_ready(c_r), .ctrl_data(c_d),
    .in_valid(i_v), .in_ready(i_r), .in_data(i_d),
    .out0_valid(o0_v), .out0_ready(o0_r), .out0_data(o0_d),
    .out1_valid(o1_v), .out1_ready(o1_r), .out1_data(o1_d));
  tb_stream_src  #(.W(1),  .PCT(70)) sc (.clk, .rst_n, .valid(c_v), .ready(c_r), .data(c_d));
  tb_stream_src  #(.W(DW), .PCT(70)) si (.clk, .rst_n, .valid(i_v), .ready(i_r), .data(i_d));
  tb_stream_sink #(.W(DW), .PCT(50)) k0 (.clk, .rst_n, .valid(o0_v), .ready(o0_r), .data(o0_d));
  tb_stream_sink #(.W(DW), .PCT(50)) k1 (.clk, .rst_n, .valid(o1_v), .ready(o1_r), .data(o1_d));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      logic sel;
      logic [DW-1:0] v;
      sel = 1'($urandom_range(1));
      v   = $urandom;
      sc.push(sel);
      si.push(v);
      if (sel) exp1.push_back(v); else exp0.push_back(v);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      wait (k0.got.size() >= exp0.size() && k1.got.size() >= exp1.size());
      repeat (10000) @(posedge clk);
    join_any
    disable fork;
    repeat (20) @(posedge clk);
    checks++;
    if (k0.got.size() != exp0.size() || k1.got.size() != exp1.size()) begin failures++; $display("count wrong"); end
    foreach (exp0[i]) begin
      checks++;
      if (i >= k0.got.size() || k0.got[i] !== exp0[i]) begin failures++; $display("out0[%0d] wrong", i); end
    end
    foreach (exp1[i]) begin
      checks++;
      if (i >= k1.got.size() || k1.got[i] !== exp1[i]) begin failures++; $display("out1[%0d] wrong", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
