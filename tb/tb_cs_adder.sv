// tb_cs_adder: self-checking test of the 32-bit carry-select adder.
// Random and corner operands (carry chains across every 4-bit group, signed
// overflow both ways) with both carry-in values; sum, carry out and
// overflow are compared with plain wide arithmetic.
module tb_cs_adder;

  logic [31:0] a, b, sum;
  logic        cin, cout, ovf;
  int checks = 0, failures = 0;

  cs_adder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [32:0] ref_s;
    logic        ref_v;
    #1;
    ref_s = {1'b0, a} + {1'b0, b} + {32'd0, cin};
    ref_v = (a[31] == b[31]) && (ref_s[31] != a[31]);
    checks++;
    if ({cout, sum} !== ref_s || ovf !== ref_v) begin
      failures++;
      if (failures < 10)
        $display("a=%h b=%h cin=%b: sum=%h cout=%b ovf=%b, expected %h %b %b",
                 a, b, cin, sum, cout, ovf, ref_s[31:0], ref_s[32], ref_v);
    end
  endtask

  initial begin
    // carry rippling through all groups, from each group boundary
    for (int k = 0; k < 32; k++) begin
      a = 32'hFFFF_FFFF >> k; b = 32'd1; cin = 1'b0; check();
      a = 32'hFFFF_FFFF << k; b = 32'hFFFF_FFFF; cin = 1'b1; check();
      a = 32'h7FFF_FFFF; b = 32'(k); cin = k[0]; check();
    end
    a = 32'h8000_0000; b = 32'h8000_0000; cin = 1'b0; check();
    a = 32'hFFFF_FFFF; b = 32'h0000_0000; cin = 1'b1; check();
    for (int n = 0; n < 20000; n++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
      if (n % 4 == 1) b = ~a;                 // long propagate chains
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
