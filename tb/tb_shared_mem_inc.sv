// tb_shared_mem_inc: checks the shared memory resource. A stream of random
// indices (mostly from a few words, so back-to-back accesses to one word are
// common) must return the incremented values of a reference array, in order,
// under random stalls. A burst with the output always ready must show the
// first result STAGES cycles after its access and one result per cycle.
module tb_shared_mem_inc;
  localparam int DW = 32, M = 64, STAGES = 3, N1 = 300, N2 = 16;
  logic clk = 0, rst_n = 0;
  logic x_v, x_r, y_v, y_r;
  logic [DW-1:0] x_d, y_d;
  int checks = 0, failures = 0;
  int model[M];
  logic [DW-1:0] exp_y[$];
  longint cyc = 0, t_first;
  logic ready_force = 0, rnd_ready;
  logic [DW-1:0] burst_got[$];
  longint burst_when[$];

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  shared_mem_inc #(.DW(DW), .M(M), .STAGES(STAGES)) dut (.clk, .rst_n,
    .x_valid(x_v), .x_ready(x_r), .x_data(x_d),
    .y_valid(y_v), .y_ready(y_r), .y_data(y_d));
  tb_stream_src  #(.W(DW), .PCT(100)) sx (.clk, .rst_n, .valid(x_v), .ready(x_r), .data(x_d));
  tb_stream_sink #(.W(DW), .PCT(50)) ky (.clk, .rst_n, .valid(y_v), .ready(rnd_ready), .data(y_d));
  assign y_r = rnd_ready || ready_force;

  always @(posedge clk) if (rst_n && y_v && y_r && !rnd_ready) begin
    burst_got.push_back(y_d);
    burst_when.push_back(cyc);
  end

  function automatic logic [DW-1:0] pick_index();
    logic [DW-1:0] v;
    v = $urandom;
    // Upper bits above the array index must be ignored.
    if ($urandom_range(3) != 0) v[5:0] = 6'($urandom_range(3));
    return v;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < N1; i++) begin
      logic [DW-1:0] v;
      v = pick_index();
      sx.push(v);
      model[v[5:0]]++;
      exp_y.push_back(DW'(model[v[5:0]]));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ky.got.size() >= N1);
    repeat (10) @(posedge clk);
    checks++;
    if (ky.got.size() != N1) begin failures++; $display("count %0d", ky.got.size()); end
    foreach (exp_y[i]) begin
      checks++;
      if (ky.got[i] !== exp_y[i]) begin failures++; $display("y[%0d] %0d exp %0d", i, ky.got[i], exp_y[i]); end
    end
    // Burst on one word with the output always ready: latency, rate, and
    // back-to-back updates of the same word.
    force ky.ready = 1'b0;
    ready_force = 1;
    @(negedge clk);
    for (int i = 0; i < N2; i++) sx.push(DW'(7));
    t_first = cyc + 1;
    wait (burst_got.size() >= N2);
    for (int i = 0; i < N2; i++) begin
      checks++;
      if (burst_got[i] !== DW'(model[7] + i + 1)) begin failures++; $display("burst y[%0d] wrong", i); end
      checks++;
      if (burst_when[i] != t_first + STAGES + i) begin
        failures++;
        $display("burst y[%0d] at cycle %0d, expected %0d", i, burst_when[i], t_first + STAGES + i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
