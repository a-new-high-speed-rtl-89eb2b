// tb_booth_multiplier_small: the multiplier at reduced sizes.
//   N = 8:  all 65536 signed operand pairs (4 Booth rows + the +1 row, so the
//           tree is just the 8-2 counter slices).
//   N = 16: 20000 random pairs (8 Booth rows + the +1 row: one 4-2 level,
//           9 -> 5 rows, then the 8-2 slices).
// Operands are applied every cycle; each product is checked one clock after
// its operands were captured, against a plain signed multiplication.
module tb_booth_multiplier_small;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic        v8, ov8;
  logic [7:0]  x8, y8;
  logic [15:0] p8;
  booth_multiplier #(.N(8)) dut8 (
    .clk(clk), .rst_n(rst_n), .in_valid(v8), .x(x8), .y(y8), .out_valid(ov8), .p(p8));

  logic        v16, ov16;
  logic [15:0] x16, y16;
  logic [31:0] p16;
  booth_multiplier #(.N(16)) dut16 (
    .clk(clk), .rst_n(rst_n), .in_valid(v16), .x(x16), .y(y16), .out_valid(ov16), .p(p16));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] e8;
    logic [31:0] e16;
    rst_n = 1'b0;
    v8 = 1'b0; v16 = 1'b0;
    x8 = '0; y8 = '0; x16 = '0; y16 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 65536; i++) begin
      @(negedge clk);
      v8 = 1'b1;
      {x8, y8} = 16'(i);
      e8 = 16'(16'(signed'(x8)) * 16'(signed'(y8)));
      v16 = (i < 20000);
      x16 = 16'($urandom);
      y16 = 16'($urandom);
      e16 = 32'(32'(signed'(x16)) * 32'(signed'(y16)));
      @(posedge clk);
      #1;
      checks++;
      if (!ov8 || p8 !== e8) begin
        failures++;
        if (failures < 10) $display("FAIL 8x8 x=%0d y=%0d p=%h expected %h", signed'(x8), signed'(y8), p8, e8);
      end
      if (i < 20000) begin
        checks++;
        if (!ov16 || p16 !== e16) begin
          failures++;
          if (failures < 10) $display("FAIL 16x16 x=%h y=%h p=%h expected %h", x16, y16, p16, e16);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
