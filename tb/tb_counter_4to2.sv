// tb_counter_4to2: exhaustive check of the 4-2 counter. For all 32 input
// combinations s + 2*(c + cout) must equal the number of ones on x and cin,
// and cout must not change with cin (no lateral ripple).
module tb_counter_4to2;
  logic [3:0] x;
  logic       cin, s, c, cout;
  int checks = 0, failures = 0;

  counter_4to2 dut (.x(x), .cin(cin), .s(s), .c(c), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic cout0;
      for (int ci = 0; ci < 2; ci++) begin
        x   = 4'(v);
        cin = 1'(ci);
        #1;
        checks++;
        if (int'(s) + 2 * (int'(c) + int'(cout)) != $countones(x) + ci) begin
          failures++;
          $display("FAIL x=%b cin=%b -> s=%b c=%b cout=%b", x, cin, s, c, cout);
        end
        if (ci == 0) cout0 = cout;
        else begin
          checks++;
          if (cout !== cout0) begin
            failures++;
            $display("FAIL x=%b: cout depends on cin", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
