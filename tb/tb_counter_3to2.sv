// tb_counter_3to2: exhaustive check that s + 2*co equals the number of ones
// on the three inputs.
module tb_counter_3to2;
  logic a, b, c, s, co;
  int checks = 0, failures = 0;

  counter_3to2 dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (int'(s) + 2 * int'(co) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b -> s=%b co=%b", a, b, c, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
