// tb_counter_8to2: exhaustive check of one 8-2 counter slice. For all 2^13
// combinations of the eight column bits and five lateral carry-ins the
// weighted output s + 2*(c + co[0]+..+co[4]) must equal the number of ones
// on x and ci. A second part chains 16 slices into a column array and checks
// that 8 random 16-bit rows are reduced to two rows with the same sum.
module tb_counter_8to2;
  logic [7:0] x;
  logic [4:0] ci, co;
  logic       s, c;
  int checks = 0, failures = 0;

  counter_8to2 dut (.x(x), .ci(ci), .co(co), .s(s), .c(c));

  // 16-column array of slices
  localparam int AW = 16;
  logic [AW-1:0] arow [8];
  logic [AW-1:0] as, ac;
  logic [4:0]    lat [AW+1];
  assign lat[0] = '0;
  for (genvar k = 0; k < AW; k++) begin : g_col
    counter_8to2 u_s (
      .x ({arow[7][k], arow[6][k], arow[5][k], arow[4][k],
           arow[3][k], arow[2][k], arow[1][k], arow[0][k]}),
      .ci(lat[k]), .co(lat[k+1]), .s(as[k]), .c(ac[k]));
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8192; v++) begin
      {ci, x} = 13'(v);
      #1;
      checks++;
      if (int'(s) + 2 * (int'(c) + $countones(co)) != $countones(x) + $countones(ci)) begin
        failures++;
        $display("FAIL x=%b ci=%b -> s=%b c=%b co=%b", x, ci, s, c, co);
      end
    end
    for (int t = 0; t < 500; t++) begin
      logic [AW+3:0] ref_sum, got;
      ref_sum = '0;
      for (int r = 0; r < 8; r++) begin
        arow[r] = AW'($urandom);
        ref_sum += (AW+4)'(arow[r]);
      end
      #1;
      got = (AW+4)'(as) + ((AW+4)'(ac) << 1) + ((AW+4)'($countones(lat[AW])) << AW);
      checks++;
      if (got != ref_sum) begin
        failures++;
        $display("FAIL array: got %0d expected %0d", got, ref_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
