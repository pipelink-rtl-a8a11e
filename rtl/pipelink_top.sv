// pipelink_top: pipelined sharing of one function f between three call sites.
//
// The program linked here is
//     y0 = f(x0);              // call site f^0
//     if (c) y1 = f(x1);       // call site f^1
//     while (d) y2 = f(x2);    // call site f^2
// f keeps state between calls, so the three callers must reach it in program
// order, yet several calls may be inside f at once. f is either a function
// with a static call counter (shared_func, default) or, with SHARE_MEM=1, a
// memory access A[x]++ (shared_mem_inc): function calls and memory accesses
// are shared by the same network. The adaptive control token
// network (ACTN) computes that order from the control flow alone, in parallel
// with the datapath:
//   * one use_resource_src per call site offers that site's sequence 1,0;
//   * actn_if turns the condition c and f^1's sequence into t_if / dp_if;
//   * actn_loop turns the loop conditions d and f^2's per-iteration sequence
//     into t_loop;
//   * the inner actn_seq composes t_if and t_loop (dp_in), the outer actn_seq
//     composes f^0's sequence with that (dp_out), giving the program's sequence t.
// Each dp stream is forked to a MERGE of the collection tree and, through a
// token_fifo, to the matching SPLIT of the delivery tree. The trees nest like
// the program: MERGE_out picks x0 or the inner tree; MERGE_in picks the if-part
// or x2; MERGE_if passes x1 (the else part calls nothing, so its use-resource
// input is a constant 0 stream and its MERGE input 0 is never selected). The
// delivery tree mirrors this. The templates, their nesting and the FIFOs at the
// delivery end follow the method; this particular program, the clocked
// valid/ready channels, the eager fork and the FIFO depth are this design's.
//
// Interface: x0/x1/x2 (arguments), c (one token per program run), d (one token
// per loop test: a 1 per iteration then a 0), y0/y1/y2 (results) and t (the
// program's use-resource sequence: a 1 per call, then 0 at the end of a run).
// All are valid/ready channels. Timing: the control network may run ahead of
// the data by up to FIFO_DEPTH calls per SPLIT; f takes F_STAGES cycles.
// MEM_WORDS is the array size when SHARE_MEM=1.
module pipelink_top
  import pipelink_pkg::*;
#(
  parameter int unsigned DW         = 32,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned F_STAGES   = 3,
  parameter bit          SHARE_MEM  = 1'b0,
  parameter int unsigned MEM_WORDS  = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x0_valid,
  output logic          x0_ready,
  input  logic [DW-1:0] x0_data,
  input  logic          x1_valid,
  output logic          x1_ready,
  input  logic [DW-1:0] x1_data,
  input  logic          x2_valid,
  output logic          x2_ready,
  input  logic [DW-1:0] x2_data,
  input  logic          c_valid,
  output logic          c_ready,
  input  logic          c_data,
  input  logic          d_valid,
  output logic          d_ready,
  input  logic          d_data,
  output logic          y0_valid,
  input  logic          y0_ready,
  output logic [DW-1:0] y0_data,
  output logic          y1_valid,
  input  logic          y1_ready,
  output logic [DW-1:0] y1_data,
  output logic          y2_valid,
  input  logic          y2_ready,
  output logic [DW-1:0] y2_data,
  output logic          t_valid,
  input  logic          t_ready,
  output ur_tok_t       t_data
);
  // ---------------------------------------------------------------- ACTN
  logic    s0_v, s0_r;  ur_tok_t s0_d;   // f^0 base sequence
  logic    s1_v, s1_r;  ur_tok_t s1_d;   // f^1 base sequence (then part)
  logic    s2_v, s2_r;  ur_tok_t s2_d;   // f^2 base sequence (loop body)
  logic    tt_r;                         // else part: constant 0 stream
  logic    tif_v, tif_r;   ur_tok_t tif_d;
  logic    dpif_v, dpif_r; dp_tok_t dpif_d;
  logic    tlp_v, tlp_r;   ur_tok_t tlp_d;
  logic    tin_v, tin_r;   ur_tok_t tin_d;
  logic    dpin_v, dpin_r; dp_tok_t dpin_d;
  logic    dpo_v, dpo_r;   dp_tok_t dpo_d;

  use_resource_src u_src0 (.clk, .rst_n, .t_valid(s0_v), .t_ready(s0_r), .t_data(s0_d));
  use_resource_src u_src1 (.clk, .rst_n, .t_valid(s1_v), .t_ready(s1_r), .t_data(s1_d));
  use_resource_src u_src2 (.clk, .rst_n, .t_valid(s2_v), .t_ready(s2_r), .t_data(s2_d));

  actn_if u_if (
    .clk, .rst_n,
    .c_valid, .c_ready, .c_data,
    .ts_valid(s1_v), .ts_ready(s1_r), .ts_data(s1_d),
    .tt_valid(1'b1), .tt_ready(tt_r), .tt_data(UR_END),
    .t_valid(tif_v), .t_ready(tif_r), .t_data(tif_d),
    .dp_valid(dpif_v), .dp_ready(dpif_r), .dp_data(dpif_d)
  );

  actn_loop u_loop (
    .clk, .rst_n,
    .c_valid(d_valid), .c_ready(d_ready), .c_data(d_data),
    .tb_valid(s2_v), .tb_ready(s2_r), .tb_data(s2_d),
    .t_valid(tlp_v), .t_ready(tlp_r), .t_data(tlp_d)
  );

  actn_seq u_seq_in (
    .clk, .rst_n,
    .t0_valid(tif_v), .t0_ready(tif_r), .t0_data(tif_d),
    .t1_valid(tlp_v), .t1_ready(tlp_r), .t1_data(tlp_d),
    .t_valid(tin_v), .t_ready(tin_r), .t_data(tin_d),
    .dp_valid(dpin_v), .dp_ready(dpin_r), .dp_data(dpin_d)
  );

  actn_seq u_seq_out (
    .clk, .rst_n,
    .t0_valid(s0_v), .t0_ready(s0_r), .t0_data(s0_d),
    .t1_valid(tin_v), .t1_ready(tin_r), .t1_data(tin_d),
    .t_valid, .t_ready, .t_data,
    .dp_valid(dpo_v), .dp_ready(dpo_r), .dp_data(dpo_d)
  );

  // --------------------------------------- control fan-out: MERGE and FIFO->SPLIT
  logic    mo_cv, mo_cr, fo_iv, fo_ir, so_cv, so_cr;  dp_tok_t mo_cd, fo_id, so_cd;
  logic    mi_cv, mi_cr, fi_iv, fi_ir, si_cv, si_cr;  dp_tok_t mi_cd, fi_id, si_cd;
  logic    mf_cv, mf_cr, ff_iv, ff_ir, sf_cv, sf_cr;  dp_tok_t mf_cd, ff_id, sf_cd;

  token_fork #(.W(1)) u_fork_out (
    .clk, .rst_n, .in_valid(dpo_v), .in_ready(dpo_r), .in_data(dpo_d),
    .out0_valid(mo_cv), .out0_ready(mo_cr), .out0_data(mo_cd),
    .out1_valid(fo_iv), .out1_ready(fo_ir), .out1_data(fo_id));
  token_fork #(.W(1)) u_fork_in (
    .clk, .rst_n, .in_valid(dpin_v), .in_ready(dpin_r), .in_data(dpin_d),
    .out0_valid(mi_cv), .out0_ready(mi_cr), .out0_data(mi_cd),
    .out1_valid(fi_iv), .out1_ready(fi_ir), .out1_data(fi_id));
  token_fork #(.W(1)) u_fork_if (
    .clk, .rst_n, .in_valid(dpif_v), .in_ready(dpif_r), .in_data(dpif_d),
    .out0_valid(mf_cv), .out0_ready(mf_cr), .out0_data(mf_cd),
    .out1_valid(ff_iv), .out1_ready(ff_ir), .out1_data(ff_id));

  token_fifo #(.W(1), .DEPTH(FIFO_DEPTH)) u_fifo_out (
    .clk, .rst_n, .in_valid(fo_iv), .in_ready(fo_ir), .in_data(fo_id),
    .out_valid(so_cv), .out_ready(so_cr), .out_data(so_cd));
  token_fifo #(.W(1), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .clk, .rst_n, .in_valid(fi_iv), .in_ready(fi_ir), .in_data(fi_id),
    .out_valid(si_cv), .out_ready(si_cr), .out_data(si_cd));
  token_fifo #(.W(1), .DEPTH(FIFO_DEPTH)) u_fifo_if (
    .clk, .rst_n, .in_valid(ff_iv), .in_ready(ff_ir), .in_data(ff_id),
    .out_valid(sf_cv), .out_ready(sf_cr), .out_data(sf_cd));

  // ------------------------------------------------------- collection tree
  logic mf_ov, mf_or, mi_ov, mi_or, fx_v, fx_r;
  logic [DW-1:0] mf_od, mi_od, fx_d;
  logic unused_else_in;

  df_merge #(.DW(DW)) u_merge_if (
    .clk, .rst_n, .ctrl_valid(mf_cv), .ctrl_ready(mf_cr), .ctrl_data(mf_cd),
    .in0_valid(1'b0), .in0_ready(unused_else_in), .in0_data('0),
    .in1_valid(x1_valid), .in1_ready(x1_ready), .in1_data(x1_data),
    .out_valid(mf_ov), .out_ready(mf_or), .out_data(mf_od));
  df_merge #(.DW(DW)) u_merge_in (
    .clk, .rst_n, .ctrl_valid(mi_cv), .ctrl_ready(mi_cr), .ctrl_data(mi_cd),
    .in0_valid(mf_ov), .in0_ready(mf_or), .in0_data(mf_od),
    .in1_valid(x2_valid), .in1_ready(x2_ready), .in1_data(x2_data),
    .out_valid(mi_ov), .out_ready(mi_or), .out_data(mi_od));
  df_merge #(.DW(DW)) u_merge_out (
    .clk, .rst_n, .ctrl_valid(mo_cv), .ctrl_ready(mo_cr), .ctrl_data(mo_cd),
    .in0_valid(x0_valid), .in0_ready(x0_ready), .in0_data(x0_data),
    .in1_valid(mi_ov), .in1_ready(mi_or), .in1_data(mi_od),
    .out_valid(fx_v), .out_ready(fx_r), .out_data(fx_d));

  // ------------------------------------------------------- shared function
  logic fy_v, fy_r;
  logic [DW-1:0] fy_d;

  if (SHARE_MEM) begin : g_mem
    shared_mem_inc #(.DW(DW), .M(MEM_WORDS), .STAGES(F_STAGES)) u_f (
      .clk, .rst_n, .x_valid(fx_v), .x_ready(fx_r), .x_data(fx_d),
      .y_valid(fy_v), .y_ready(fy_r), .y_data(fy_d));
  end else begin : g_func
    shared_func #(.DW(DW), .STAGES(F_STAGES)) u_f (
      .clk, .rst_n, .x_valid(fx_v), .x_ready(fx_r), .x_data(fx_d),
      .y_valid(fy_v), .y_ready(fy_r), .y_data(fy_d));
  end

  // --------------------------------------------------------- delivery tree
  logic so_v1, so_r1, si_v0, si_r0, else_v;
  logic [DW-1:0] so_d1, si_d0, else_d;

  df_split #(.DW(DW)) u_split_out (
    .clk, .rst_n, .ctrl_valid(so_cv), .ctrl_ready(so_cr), .ctrl_data(so_cd),
    .in_valid(fy_v), .in_ready(fy_r), .in_data(fy_d),
    .out0_valid(y0_valid), .out0_ready(y0_ready), .out0_data(y0_data),
    .out1_valid(so_v1), .out1_ready(so_r1), .out1_data(so_d1));
  df_split #(.DW(DW)) u_split_in (
    .clk, .rst_n, .ctrl_valid(si_cv), .ctrl_ready(si_cr), .ctrl_data(si_cd),
    .in_valid(so_v1), .in_ready(so_r1), .in_data(so_d1),
    .out0_valid(si_v0), .out0_ready(si_r0), .out0_data(si_d0),
    .out1_valid(y2_valid), .out1_ready(y2_ready), .out1_data(y2_data));
  df_split #(.DW(DW)) u_split_if (
    .clk, .rst_n, .ctrl_valid(sf_cv), .ctrl_ready(sf_cr), .ctrl_data(sf_cd),
    .in_valid(si_v0), .in_ready(si_r0), .in_data(si_d0),
    .out0_valid(else_v), .out0_ready(1'b1), .out0_data(else_d),
    .out1_valid(y1_valid), .out1_ready(y1_ready), .out1_data(y1_data));

  // The else part has no call: its MERGE input and SPLIT output stay idle.
  a_else_idle: assert property (@(posedge clk) disable iff (!rst_n) !else_v);
  logic unused;
  assign unused = ^{tt_r, unused_else_in, else_d};
endmodule
