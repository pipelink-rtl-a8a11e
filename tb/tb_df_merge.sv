// tb_df_merge: checks the MERGE element. A random control sequence decides,
// token by token, which input the next output comes from; each input holds
// exactly the tokens addressed to it, so the output must equal the tokens in
// control order. All channels are stalled at random.
module tb_df_merge;
  localparam int DW = 32;
  logic clk = 0, rst_n = 0;
  logic c_v, c_r, c_d, i0_v, i0_r, i1_v, i1_r, o_v, o_r;
  logic [DW-1:0] i0_d, i1_d, o_d;
  int checks = 0, failures = 0;
  logic [DW-1:0] exp_o[$];

  always #5 clk = !clk;

  df_merge #(.DW(DW)) dut (.clk, .rst_n,
    .ctrl_valid(c_v), .ctrl_ready(c_r), .ctrl_data(c_d),
    .in0_valid(i0_v), .in0_ready(i0_r), .in0_data(i0_d),
    .in1_valid(i1_v), .in1_ready(i1_r), .in1_data(i1_d),
    .out_valid(o_v), .out_ready(o_r), .out_data(o_d));
  tb_stream_src  #(.W(1),  .PCT(70)) sc (.clk, .rst_n, .valid(c_v), .ready(c_r), .data(c_d));
  tb_stream_src  #(.W(DW), .PCT(60)) s0 (.clk, .rst_n, .valid(i0_v), .ready(i0_r), .data(i0_d));
  tb_stream_src  #(.W(DW), .PCT(60)) s1 (.clk, .rst_n, .valid(i1_v), .ready(i1_r), .data(i1_d));
  tb_stream_sink #(.W(DW), .PCT(70)) ko (.clk, .rst_n, .valid(o_v), .ready(o_r), .data(o_d));

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
      if (sel) s1.push(v); else s0.push(v);
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
      if (ko.got[i] !== exp_o[i]) begin failures++; $display("out[%0d] %h exp %h", i, ko.got[i], exp_o[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
