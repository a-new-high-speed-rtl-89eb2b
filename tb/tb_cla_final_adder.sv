// tb_cla_final_adder: checks the two-step carry-lookahead adder at its
// default width W = 108 (modules of 4 bits) and at W = 10 (last module of
// 2 bits). Corner cases drive a carry through every module (all ones plus
// one, alternating patterns); random operands and both carry-in values
// follow. {cout, s} must equal a + b + cin.
module tb_cla_final_adder;

  localparam int W = 108;
  logic [W-1:0] a, b, s;
  logic         cin, cout;

  localparam int WS = 10;
  logic [WS-1:0] sa, sb, ss;
  logic          scin, scout;

  int checks = 0, failures = 0;

  cla_final_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  cla_final_adder #(.W(WS), .B(4)) dut_s (.a(sa), .b(sb), .cin(scin), .s(ss), .cout(scout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_big(input logic [W-1:0] av, input logic [W-1:0] bv, input logic cv);
    logic [W:0] expv;
    a = av; b = bv; cin = cv;
    #1;
    expv = (W+1)'(av) + (W+1)'(bv) + (W+1)'(cv);
    checks++;
    if ({cout, s} != expv) begin
      failures++;
      $display("FAIL W=%0d a=%h b=%h cin=%b got %h expected %h", W, av, bv, cv, {cout, s}, expv);
    end
  endtask

  initial begin
    try_big('1, '0, 1'b1);
    try_big('1, W'(1), 1'b0);
    try_big('1, '1, 1'b1);
    try_big({(W/2){2'b01}}, {(W/2){2'b10}}, 1'b1);
    try_big('0, '0, 1'b0);
    for (int i = 0; i < 3000; i++)
      try_big({$urandom, $urandom, $urandom, $urandom},
              {$urandom, $urandom, $urandom, $urandom}, 1'($urandom));
    // carry chains of random length
    for (int i = 0; i < 500; i++) begin
      logic [W-1:0] av;
      av = {W{1'b1}} >> $urandom_range(0, W - 1);
      try_big(av, W'(1), 1'($urandom));
    end
    for (int v = 0; v < (1 << (2 * WS + 1)); v += 7) begin
      logic [WS:0] expv;
      {scin, sa, sb} = (2*WS+1)'(v);
      #1;
      expv = (WS+1)'(sa) + (WS+1)'(sb) + (WS+1)'(scin);
      checks++;
      if ({scout, ss} != expv) begin
        failures++;
        $display("FAIL W=%0d a=%h b=%h cin=%b got %h expected %h", WS, sa, sb, scin, {scout, ss}, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
