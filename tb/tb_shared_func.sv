// tb_shared_func: checks the example shared function. Call i (counting from 1)
// with argument x must return x + i, in order, under random stalls. Then a
// burst of calls with the output always ready must see the first result
// STAGES cycles after its call and one result per cycle after that.
module tb_shared_func;
  localparam int DW = 32, STAGES = 3, N1 = 200, N2 = 20;
  logic clk = 0, rst_n = 0;
  logic x_v, x_r, y_v, y_r;
  logic [DW-1:0] x_d, y_d;
  int checks = 0, failures = 0;
  logic [DW-1:0] exp_y[$];
  longint cyc = 0, t_first_call;
  int phase = 1;
  logic ready_force = 0;
  logic rnd_ready;

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  shared_func #(.DW(DW), .STAGES(STAGES)) dut (.clk, .rst_n,
    .x_valid(x_v), .x_ready(x_r), .x_data(x_d),
    .y_valid(y_v), .y_ready(y_r), .y_data(y_d));
  tb_stream_src  #(.W(DW), .PCT(100)) sx (.clk, .rst_n, .valid(x_v), .ready(x_r), .data(x_d));
  tb_stream_sink #(.W(DW), .PCT(50))  ky (.clk, .rst_n, .valid(y_v), .ready(rnd_ready), .data(y_d));
  assign y_r = rnd_ready || ready_force;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Results taken while ready_force is high bypass the sink's record.
  logic [DW-1:0] burst_got[$];
  longint burst_when[$];
  always @(posedge clk) if (rst_n && y_v && y_r && !rnd_ready) begin
    burst_got.push_back(y_d);
    burst_when.push_back(cyc);
  end

  initial begin
    for (int i = 1; i <= N1; i++) begin
      logic [DW-1:0] v;
      v = $urandom;
      sx.push(v);
      exp_y.push_back(v + DW'(i));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ky.got.size() >= N1);
    repeat (10) @(posedge clk);
    checks++;
    if (ky.got.size() != N1) begin failures++; $display("count %0d", ky.got.size()); end
    foreach (exp_y[i]) begin
      checks++;
      if (ky.got[i] !== exp_y[i]) begin failures++; $display("y[%0d] %h exp %h", i, ky.got[i], exp_y[i]); end
    end
    // Burst with the output always ready: latency and rate.
    force ky.ready = 1'b0;
    ready_force = 1;
    @(negedge clk);
    for (int i = 1; i <= N2; i++) sx.push(DW'(i));
    t_first_call = cyc + 1;  // the source raises valid at this negedge; taken at the next posedge
    wait (burst_got.size() >= N2);
    for (int i = 0; i < N2; i++) begin
      checks++;
      if (burst_got[i] !== DW'(i + 1) + DW'(N1 + i + 1)) begin failures++; $display("burst y[%0d] wrong", i); end
      checks++;
      if (burst_when[i] != t_first_call + STAGES + i) begin
        failures++;
        $display("burst y[%0d] at cycle %0d, expected %0d", i, burst_when[i], t_first_call + STAGES + i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
