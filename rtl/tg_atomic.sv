// Atomic operation unit of the HIB.
//
// Computes, in one combinational step, what a remote atomic operation does
// to the memory word it targets. Central control reads the word from the
// multiprocessor memory, feeds it in as old_val, writes new_val back when
// do_write is set, and returns result (always the old value) to the
// requester. Because central control serves one request at a time, the
// read-modify-write is indivisible.
//   fetch-and-store : new = arg,                    always written
//   fetch-and-inc   : new = old + 1 (wraps),        always written
//   compare-and-swap: new = arg2 if old == arg,     written only on a match
// The three operations are the ones the HIB provides; the argument
// convention (arg = stored / compared value, arg2 = swap value) is this
// design's own. The remote-copy code is not an atomic operation and writes
// nothing.
module tg_atomic
  import tg_pkg::*;
(
  input  sop_e  op,
  input  word_t old_val,
  input  word_t arg,
  input  word_t arg2,
  output word_t new_val,
  output logic  do_write,
  output word_t result
);
  always_comb begin
    result   = old_val;
    new_val  = old_val;
    do_write = 1'b0;
    unique case (op)
      SOP_FETCH_STORE: begin new_val = arg;           do_write = 1'b1; end
      SOP_FETCH_INC:   begin new_val = old_val + 1'b1; do_write = 1'b1; end
      SOP_CAS: begin
        if (old_val == arg) begin
          new_val  = arg2;
          do_write = 1'b1;
        end
      end
      default: ;
    endcase
  end
endmodule
