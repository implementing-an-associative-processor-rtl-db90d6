// tb_comparator: random and corner checks of the six set-on-condition
// functions, with unsigned operands.
module tb_comparator;
  import asc_pkg::*;
  cmp_fn_e fn; logic [7:0] a, b; logic y, e;
  int checks = 0, failures = 0;
  comparator dut (.fn, .a, .b, .y);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int ia, ib;
      fn = cmp_fn_e'($urandom_range(0, 5)); a = 8'($urandom); b = 8'($urandom);
      if (n % 4 == 0) b = a;
      if (n == 1) begin fn = C_SGT; a = 8'h80; b = 8'h7F; end
      #1; ia = a; ib = b;
      case (fn)
        C_SLE: e = ia <= ib; C_SGT: e = ia > ib; C_SGE: e = ia >= ib;
        C_SEQ: e = ia == ib; C_SNE: e = ia != ib; default: e = ia < ib;
      endcase
      checks++;
      if (y !== e) begin failures++; if (failures < 10) $display("FAIL fn=%0d a=%h b=%h", fn, a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
