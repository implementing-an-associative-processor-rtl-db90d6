// tb_fsr_unit: exhaustive check of the Find/Step/ResolveFirst decisions for
// every opcode class, responder bit and Responder_Before_Me value.
module tb_fsr_unit;
  import asc_pkg::*;
  opcode_e op; logic en, r, bm, sel, st, clr;
  int checks = 0, failures = 0;
  opcode_e ops [4] = '{OP_FIND, OP_STEP, OP_RESFST, OP_ADD};
  fsr_unit dut (.op, .en, .r, .before_me(bm), .sel, .set_top(st), .clr);
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int k = 0; k < 4; k++) for (int v = 0; v < 8; v++) begin
      logic esel, est, eclr;
      op = ops[k]; en = v[2]; r = v[1]; bm = v[0]; #1;
      esel = r && !bm;
      est  = en && k < 3;
      eclr = en && ((k == 1 && esel) || (k == 2 && !esel));
      checks++;
      if (sel !== esel || st !== est || clr !== eclr) begin
        failures++; $display("FAIL op=%s en=%b r=%b bm=%b -> %b%b%b", op.name(), en, r, bm, sel, st, clr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
