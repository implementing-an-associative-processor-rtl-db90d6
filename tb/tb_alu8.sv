// tb_alu8: random self-check of the 8-bit ALU against an integer model of
// each function, including carry-in use for ADD and SUB.
module tb_alu8;
  import asc_pkg::*;
  alu_fn_e fn; logic [7:0] a, b, y; logic uc, ci, co;
  int checks = 0, failures = 0;
  alu8 dut (.fn, .a, .b, .use_carry(uc), .carry_in(ci), .y, .carry_out(co));
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 4000; n++) begin
      int unsigned ea, eb, r; logic [7:0] ey; logic ec;
      fn = alu_fn_e'($urandom_range(0, 7)); a = 8'($urandom); b = 8'($urandom);
      uc = 1'($urandom); ci = 1'($urandom);
      if (n < 8) begin fn = alu_fn_e'(n); a = 8'hF0; b = 8'h23; end
      #1;
      ea = a; eb = b; ec = 0;
      case (fn)
        A_ADD: begin r = ea + eb + ((uc && ci) ? 1 : 0); ey = r[7:0]; ec = r[8]; end
        A_SUB: begin r = ea + (255 - eb) + (uc ? (ci ? 1 : 0) : 1); ey = r[7:0]; ec = r[8]; end
        A_AND: ey = a & b;
        A_OR:  ey = a | b;
        A_XOR: ey = a ^ b;
        A_NOT: ey = ~a;
        A_SLL: ey = 8'((ea * (1 << (eb % 8))) % 256);
        default: ey = 8'(ea / (1 << (eb % 8)));
      endcase
      checks++;
      if (y !== ey || co !== ec) begin
        failures++;
        if (failures < 10) $display("FAIL fn=%0d a=%h b=%h y=%h/%h c=%b/%b", fn, a, b, y, ey, co, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
