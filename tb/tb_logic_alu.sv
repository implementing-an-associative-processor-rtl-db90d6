// tb_logic_alu: exhaustive check of the 1-bit logical ALU.
module tb_logic_alu;
  import asc_pkg::*;
  lfn_e fn; logic a, b, y;
  int checks = 0, failures = 0;
  logic [3:0] tt [4] = '{4'b1000, 4'b1110, 4'b0110, 4'b0011}; // truth tables, index {a,b}
  logic_alu dut (.fn, .a, .b, .y);
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int f = 0; f < 4; f++)
      for (int v = 0; v < 4; v++) begin
        fn = lfn_e'(f); a = v[1]; b = v[0]; #1;
        checks++;
        if (y !== tt[f][v]) begin failures++; $display("FAIL fn=%0d a=%b b=%b y=%b", f, a, b, y); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
