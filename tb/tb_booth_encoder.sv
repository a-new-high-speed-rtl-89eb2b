// tb_booth_encoder: exhaustive check of the radix-4 Booth encoder.
// For each of the eight groups {y[2i+1], y[2i], y[2i-1]} the digit
// d = y[2i-1] + y[2i] - 2*y[2i+1] is computed here and the select outputs
// are compared with it: neg = (d < 0), two = (|d| == 2), one = (|d| == 1),
// zero = (d == 0).
module tb_booth_encoder;
  import booth_pkg::*;

  logic [2:0] trip;
  booth_sel_t sel;
  logic       zero;
  int checks = 0, failures = 0;

  booth_encoder dut (.trip(trip), .sel(sel), .zero(zero));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL trip=%b %s got %0b expected %0b", trip, what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int d, mag;
      trip = 3'(t);
      #1;
      d   = int'(trip[0]) + int'(trip[1]) - 2 * int'(trip[2]);
      mag = (d < 0) ? -d : d;
      check("neg",  sel.neg, d < 0);
      check("two",  sel.two, mag == 2);
      check("one",  sel.one, mag == 1);
      check("zero", zero,    d == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
