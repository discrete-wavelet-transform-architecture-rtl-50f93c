// tb_mult_element: exhaustive test of the multiplier element
// (AND gate plus full adder): all 16 input combinations.
module tb_mult_element;

  logic x, y, pin, cin, pout, cout;
  int checks = 0, failures = 0;

  mult_element dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int total;
      {x, y, pin, cin} = 4'(v);
      #1;
      total = int'(x && y) + int'(pin) + int'(cin);
      checks++;
      if ({cout, pout} != 2'(total)) begin
        failures++;
        $display("x=%b y=%b pin=%b cin=%b -> cout=%b pout=%b", x, y, pin, cin, cout, pout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
