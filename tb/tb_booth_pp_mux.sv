// tb_booth_pp_mux: checks the partial-product multiplexer at its default N = 54.
// For random and corner multiplicands and every digit -2..+2 the select
// bundle is built here from the digit, and the output is checked against
// d * X: the (N+2)-bit signed output plus the neg bit must equal d * X.
module tb_booth_pp_mux;
  import booth_pkg::*;

  localparam int N = 54;

  logic [N-1:0] x;
  booth_sel_t   sel;
  logic [N+1:0] pp;
  int checks = 0, failures = 0;

  booth_pp_mux dut (.x(x), .sel(sel), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_x(input logic [N-1:0] xv);
    for (int d = -2; d <= 2; d++) begin
      longint xs, expv, got;
      x       = xv;
      sel.neg = d < 0;
      sel.two = (d == 2) || (d == -2);
      sel.one = (d == 1) || (d == -1);
      #1;
      xs   = longint'({{(64-N){xv[N-1]}}, xv});
      expv = longint'(d) * xs;
      got  = longint'({{(64-N-2){pp[N+1]}}, pp}) + longint'(sel.neg);
      checks++;
      if (got != expv) begin
        failures++;
        $display("FAIL x=%0d d=%0d got %0d expected %0d", xs, d, got, expv);
      end
    end
  endtask

  initial begin
    try_x('0);
    try_x('1);
    try_x({1'b1, {(N-1){1'b0}}});   // most negative
    try_x({1'b0, {(N-1){1'b1}}});   // most positive
    try_x(N'(1));
    for (int i = 0; i < 2000; i++) try_x({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
