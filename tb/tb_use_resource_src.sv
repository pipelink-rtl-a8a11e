// tb_use_resource_src: checks that the base-case source yields 1,0 per
// execution, repeating, under random back-pressure, and holds its token while
// not taken.
module tb_use_resource_src;
  logic clk = 0, rst_n = 0;
  logic t_valid, t_ready, t_data;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  use_resource_src dut (.clk, .rst_n, .t_valid, .t_ready, .t_data);
  tb_stream_sink #(.W(1), .PCT(50)) snk (.clk, .rst_n, .valid(t_valid), .ready(t_ready), .data(t_data));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (snk.got.size() >= 40);
    @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      checks++;
      if (snk.got[i] !== ((i % 2 == 0) ? 1'b1 : 1'b0)) begin
        failures++;
        $display("token %0d: got %0d", i, snk.got[i]);
      end
    end
    checks++;
    if (snk.stalls == 0) begin
      failures++;
      $display("back-pressure never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
