// shared_mem_inc: shared memory resource, "A[i]++" on an array of M words.
//
// Memory is shared between call sites in the same way as a function: each
// access is a call whose argument is the index i. The access increments A[i]
// and returns the new value, like "int A[M]; int f(int i) { A[i]++; ... }".
// Because every access both reads and writes the array, accesses from
// different callers must arrive in program order; the resource performs each
// read-modify-write in one cycle at acceptance, in arrival order, so a later
// access to the same word always sees the earlier update without forwarding.
// The operation follows the method's side-effect example; M, the index taken
// from the low bits of the argument, the zeroed array at reset and the
// pipeline depth are this design's choices.
//
// Interface: x (index, DW bits; the low $clog2(M) bits are used) and y (new
// value of A[i]), valid/ready, same shape as shared_func. Timing: the result
// leaves STAGES cycles after acceptance if not stalled; one access per cycle.
module shared_mem_inc #(
  parameter int unsigned DW     = 32,
  parameter int unsigned M      = 64,
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
  localparam int unsigned AW = (M > 1) ? $clog2(M) : 1;

  logic [DW-1:0] mem     [M];
  logic [DW-1:0] data_q  [STAGES];
  logic          valid_q [STAGES];
  logic          adv     [STAGES];
  logic [AW-1:0] idx;
  logic [DW-1:0] new_val;

  assign idx     = x_data[AW-1:0];
  logic unused_hi;  // index bits above the array size are ignored
  assign unused_hi = ^x_data[DW-1:AW];
  assign new_val = mem[idx] + 1'b1;

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
      for (int a = 0; a < M; a++) mem[a] <= '0;
      for (int s = 0; s < STAGES; s++) begin
        valid_q[s] <= 1'b0;
        data_q[s]  <= '0;
      end
    end else begin
      if (adv[0]) begin
        valid_q[0] <= x_valid;
        if (x_valid) begin
          mem[idx]  <= new_val;
          data_q[0] <= new_val;
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
