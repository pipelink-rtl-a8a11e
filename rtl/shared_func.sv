// shared_func: example shared function f with a side effect, pipelined.
//
// Models a function like "int f(int x) { static int count = 0; count++; ... }":
// every call increments a private call counter, and the result is x plus the
// new count. Because of the counter, results depend on the order in which the
// callers reach f, which is exactly what the resource-sharing network must
// keep in program order. The counter and result formula are this design's
// stand-in for an unspecified body; the pipelining (several calls in flight)
// is the point of the method.
//
// Interface: x (argument) and y (result), DW-bit valid/ready. Timing: the
// counter updates when a call is accepted; the result leaves STAGES cycles
// later if the output is not stalled; one call per cycle; a stall at y
// back-pressures stage by stage.
module shared_func #(
  parameter int unsigned DW     = 32,
  parameter int unsigned STAGES = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x_valid,
  output logic          x_ready,
  input  logic [DW-1:0] x_data,
  output logic          y_valid,
  input  logic          y_ready,
  output logic [DW-1:0] y_data
);
  logic [DW-1:0] count;
  logic [DW-1:0] data_q  [STAGES];
  logic          valid_q [STAGES];
  logic          adv     [STAGES];  // stage s loads in this cycle

  // A stage may load when empty or when its content moves on.
  always_comb begin
    adv[STAGES-1] = !valid_q[STAGES-1] || y_ready;
    for (int s = STAGES - 2; s >= 0; s--)
      adv[s] = !valid_q[s] || adv[s+1];
  end

  assign x_ready = adv[0];
  assign y_valid = valid_q[STAGES-1];
  assign y_data  = data_q[STAGES-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= '0;
      for (int s = 0; s < STAGES; s++) begin
        valid_q[s] <= 1'b0;
        data_q[s]  <= '0;
      end
    end else begin
      if (adv[0]) begin
        valid_q[0] <= x_valid;
        if (x_valid) begin
          count     <= count + 1'b1;
          data_q[0] <= x_data + count + 1'b1;
        end
      end
      for (int s = 1; s < STAGES; s++) begin
        if (adv[s]) begin
          valid_q[s] <= valid_q[s-1];
          data_q[s]  <= data_q[s-1];
        end
      end
    end
  end

  a_y_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             y_valid && !y_ready |=> y_valid && $stable(y_data));
endmodule
