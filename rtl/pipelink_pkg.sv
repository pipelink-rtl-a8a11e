// pipelink_pkg: shared constants of the adaptive control token network (ACTN).
//
// A use-resource sequence is a stream of one-bit tokens: each 1 lets one call
// site use the shared function once, and a 0 ends the call site's accesses for
// the current execution (run-length encoding of the access count). Datapath
// control tokens (dp) are also one bit: they select input/output 0 or 1 of a
// MERGE (collection) or SPLIT (delivery) element. The encodings follow the
// method; the type names are this design's own.
package pipelink_pkg;
  typedef logic ur_tok_t;   // use-resource token
  typedef logic dp_tok_t;   // datapath control token (MERGE/SPLIT select)

  localparam ur_tok_t UR_USE = 1'b1;  // one more access to the shared function
  localparam ur_tok_t UR_END = 1'b0;  // end of accesses for this execution

  localparam dp_tok_t DP_FIRST  = 1'b0;  // route to/from port 0 (first / else part)
  localparam dp_tok_t DP_SECOND = 1'b1;  // route to/from port 1 (second / then part)
endpackage
