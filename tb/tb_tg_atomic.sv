// Self-checking test of tg_atomic: random operands for each operation,
// results compared with a reference computed here; compare-and-swap is
// driven both with matching and mismatching compare values.
module tb_tg_atomic;
  import tg_pkg::*;
  sop_e op; word_t old_val, arg, arg2, new_val, result; logic do_write;
  int checks = 0, failures = 0;

  tg_atomic dut (.op, .old_val, .arg, .arg2, .new_val, .do_write, .result);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s op=%0d old=%h arg=%h arg2=%h new=%h we=%b", what, op, old_val, arg, arg2, new_val, do_write); end
  endtask

  initial begin
    for (int i = 0; i < 400; i++) begin
      op = sop_e'(i % 4);
      old_val = (i % 40 == 1) ? 32'hffff_ffff : $urandom;
      arg = $urandom; arg2 = $urandom;
      if (op == SOP_CAS && i % 8 < 4) arg = old_val;
      #1;
      check("result is old value", result == old_val);
      unique case (op)
        SOP_FETCH_STORE: check("fetch-and-store", do_write && new_val == arg);
        SOP_FETCH_INC:   check("fetch-and-inc", do_write && new_val == old_val + 32'd1);
        SOP_CAS:         check("compare-and-swap", (old_val == arg) ? (do_write && new_val == arg2) : !do_write);
        default:         check("copy writes nothing", !do_write);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
