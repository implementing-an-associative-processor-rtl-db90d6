// tb_resp_resolver: exhaustive check of the 4-PE responder resolution
// circuit (V0 = 0, V1 = R0, V2 = R0|R1, V3 = R0|R1|R2, V4 = any) and a
// random check of a 16-PE instance.
module tb_resp_resolver;
  logic [3:0] r4, v4; logic a4;
  logic [15:0] r16, v16; logic a16;
  int checks = 0, failures = 0;
  resp_resolver #(.N(4))  d4  (.r(r4),  .before_me(v4),  .any_resp(a4));
  resp_resolver #(.N(16)) d16 (.r(r16), .before_me(v16), .any_resp(a16));
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int v = 0; v < 16; v++) begin
      r4 = 4'(v); #1; checks++;
      if (v4 !== {r4[0] | r4[1] | r4[2], r4[0] | r4[1], r4[0], 1'b0} || a4 !== (v != 0)) begin
        failures++; $display("FAIL r=%b v=%b a=%b", r4, v4, a4);
      end
    end
    for (int n = 0; n < 500; n++) begin
      logic [15:0] e; logic s;
      r16 = 16'($urandom) & 16'($urandom); #1; s = 0;
      for (int i = 0; i < 16; i++) begin e[i] = s; s |= r16[i]; end
      checks++;
      if (v16 !== e || a16 !== (r16 != 0)) begin failures++; $display("FAIL16 r=%h", r16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
