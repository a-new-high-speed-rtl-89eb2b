// tb_booth_multiplier: end-to-end test of the multiplier at its default size
// (N = 54, 108-bit product), with no parameter overridden.
//
// Operands are applied with in_valid, mostly back to back and sometimes with
// idle cycles between them. Each is expected exactly one clock later: out_valid
// must rise in the next cycle and p must equal the signed product computed
// here with a plain 108-bit multiplication. During idle cycles the operand
// registers must hold, so p must keep the last product. Operands are corner
// values (0, 1, -1, most negative, most positive) and random ones, some
// with long runs of equal bits.
//
// Coverage: the test counts how often every Booth digit value (-2, -1, 0 from
// group 000, 0 from group 111, +1, +2) occurred in the multiplier operand, how
// often each operand was negative and how often idle (hold) cycles occurred;
// a mechanism that never occurred counts as a failure.
module tb_booth_multiplier;

  localparam int N = 54;
  localparam int W = 2 * N;
  localparam int NOPS = 3000;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           in_valid;
  logic [N-1:0]   x, y;
  logic           out_valid;
  logic [W-1:0]   p;

  int checks = 0, failures = 0;
  int cnt_digit [6];          // -2, -1, 0(000), 0(111), +1, +2
  int cnt_xneg = 0, cnt_yneg = 0, cnt_hold = 0;
  longint cycle = 0;

  booth_multiplier dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y),
    .out_valid(out_valid), .p(p)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NOPS * 3 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] ref_prod(input logic [N-1:0] a, input logic [N-1:0] b);
    logic signed [W-1:0] ae, be;
    ae = W'(signed'(a));
    be = W'(signed'(b));
    return W'(ae * be);
  endfunction

  function automatic logic [N-1:0] pick();
    case ($urandom_range(0, 9))
      0: return '0;
      1: return N'(1);
      2: return '1;
      3: return {1'b1, {(N-1){1'b0}}};
      4: return {1'b0, {(N-1){1'b1}}};
      5: return {N{1'b1}} << $urandom_range(0, N - 1);   // long run of ones
      6: return {N{1'b1}} >> $urandom_range(0, N - 1);
      default: return N'({$urandom, $urandom});
    endcase
  endfunction

  task automatic count_digits(input logic [N-1:0] b);
    logic [N:0] be;
    be = {b, 1'b0};
    for (int i = 0; i < N / 2; i++) begin
      case (be[2*i+2 -: 3])
        3'b000:         cnt_digit[2]++;
        3'b111:         cnt_digit[3]++;
        3'b001, 3'b010: cnt_digit[4]++;
        3'b011:         cnt_digit[5]++;
        3'b100:         cnt_digit[0]++;
        default:        cnt_digit[1]++;   // 101, 110
      endcase
    end
  endtask

  initial begin
    logic [W-1:0] expv;
    logic         have;
    foreach (cnt_digit[i]) cnt_digit[i] = 0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    x = '0;
    y = '0;
    have = 1'b0;
    expv = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("FAIL out_valid not cleared by reset");
    end
    rst_n = 1'b1;

    for (int op = 0; op < NOPS; op++) begin
      logic idle;
      idle = ($urandom_range(0, 7) == 0);
      @(negedge clk);
      if (idle) begin
        in_valid = 1'b0;
        x = N'({$urandom, $urandom});     // must be ignored
        y = N'({$urandom, $urandom});
        @(posedge clk);
        #1;
        checks++;
        if (out_valid !== 1'b0) begin
          failures++;
          $display("FAIL out_valid high after an idle cycle");
        end
        if (have) begin
          cnt_hold++;
          checks++;
          if (p !== expv) begin
            failures++;
            $display("FAIL p not held during idle cycle");
          end
        end
      end else begin
        longint c0;
        in_valid = 1'b1;
        x = pick();
        y = pick();
        expv = ref_prod(x, y);
        have = 1'b1;
        count_digits(y);
        if (x[N-1]) cnt_xneg++;
        if (y[N-1]) cnt_yneg++;
        c0 = cycle;
        @(posedge clk);
        #1;
        // product is due exactly one clock edge after capture
        checks++;
        if (out_valid !== 1'b1 || cycle != c0 + 1) begin
          failures++;
          $display("FAIL latency: out_valid=%b after %0d cycles", out_valid, cycle - c0);
        end
        checks++;
        if (p !== expv) begin
          failures++;
          $display("FAIL x=%h y=%h: p=%h expected %h", x, y, p, expv);
        end
        in_valid = 1'b0;
      end
    end

    $display("digits: -2=%0d -1=%0d 0(000)=%0d 0(111)=%0d +1=%0d +2=%0d",
             cnt_digit[0], cnt_digit[1], cnt_digit[2], cnt_digit[3], cnt_digit[4], cnt_digit[5]);
    $display("negative x=%0d negative y=%0d hold cycles=%0d", cnt_xneg, cnt_yneg, cnt_hold);
    foreach (cnt_digit[i]) begin
      checks++;
      if (cnt_digit[i] == 0) begin
        failures++;
        $display("FAIL digit class %0d never occurred", i);
      end
    end
    checks += 3;
    if (cnt_xneg == 0) failures++;
    if (cnt_yneg == 0) failures++;
    if (cnt_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
