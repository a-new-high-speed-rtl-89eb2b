// tb_pp_reduction_tree: checks the 4-2 counter tree for several row counts.
// Configurations: R = 28 at W = 108 (the multiplier's default: 28->14->8->2),
// R = 11 (a 3-2 counter row for three left-over rows), R = 9 (one 4-2 level
// then the 8-2 slices), R = 5 and R = 3 (8-2 slices only). Each receives
// random rows, including sign-extended negative ones, plus all-ones rows;
// sum_o + carry_o must equal the sum of the rows modulo 2^W.
module tb_pp_reduction_tree;

  localparam int W = 108;
  localparam int NCFG = 5;
  localparam int RS [NCFG] = '{28, 11, 9, 5, 3};
  localparam int TRIALS = 400;

  int  checks = 0, failures = 0;
  logic [NCFG-1:0] done = '0;

  for (genvar ci = 0; ci < NCFG; ci++) begin : g_cfg
    localparam int R = RS[ci];
    logic [W-1:0] rows [R];
    logic [W-1:0] s, c;

    pp_reduction_tree #(.W(W), .R(R)) dut (.rows(rows), .sum_o(s), .carry_o(c));

    initial begin
      #(5 + ci * 10 * (TRIALS + 2));   // configurations take turns
      for (int t = 0; t < TRIALS + 1; t++) begin
        logic [W-1:0] ref_sum;
        ref_sum = '0;
        for (int r = 0; r < R; r++) begin
          if (t == TRIALS) rows[r] = '1;
          else if ($urandom_range(0, 3) == 0)
            rows[r] = {W{1'b1}} << $urandom_range(0, W - 1);   // negative, shifted
          else
            rows[r] = {$urandom, $urandom, $urandom, $urandom};
          ref_sum += rows[r];
        end
        #10;
        checks++;
        if (W'(s + c) != ref_sum) begin
          failures++;
          $display("FAIL R=%0d trial %0d: got %h expected %h", R, t, W'(s + c), ref_sum);
        end
      end
      done[ci] = 1'b1;
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
