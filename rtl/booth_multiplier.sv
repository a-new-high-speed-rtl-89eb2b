// booth_multiplier: signed N x N radix-4 Booth multiplier with a regular
// 4-2 counter reduction tree and a two-step carry-lookahead final adder.
//
// Datapath, in order:
//   1. Operand registers. X and Y are captured on the rising clock edge
//      when in_valid is high; out_valid follows in_valid one cycle later.
//   2. Booth recoding. Y (with a 0 appended below bit 0) is cut into N/2
//      overlapping three-bit groups, one booth_encoder per group, giving
//      digits d_i in {-2..+2} with Y = sum d_i * 4^i.
//   3. Partial products. One booth_pp_mux per digit selects 0, X or 2X and
//      inverts it for a negative digit (N+2 bits). Row i is sign-extended to
//      2N bits and shifted left by 2i. The +1 of every negative digit (bit
//      2i) is collected into one extra row, so the tree gets N/2 + 1 rows.
//   4. Reduction. pp_reduction_tree brings the rows down to two with levels
//      of 4-2 counters and a final row of 8-2 counter slices.
//   5. Final addition. cla_final_adder adds the two rows (carry-in 0).
// The product is combinational from the operand registers: p is valid in the
// cycle after in_valid, while out_valid is high, and the clock period must
// cover steps 2-5.
//
// Both operands are two's complement; an unsigned (N-1)-bit operand is
// handled by giving it a 0 sign bit. N must be even. With the default
// N = 54 (the size the source design evaluates) there are 27 Booth rows and
// the tree goes 28 -> 14 -> 8 -> 2. The Booth digit set, the partial
// products two bits wider than X, the 4-2/8-2 counter tree and the two-step
// lookahead adder follow the source design; the register placement, the
// valid flag, the row of +1 bits and the row-wise tree layout are this
// design's own choices.
module booth_multiplier
  import booth_pkg::*;
#(
  parameter int N = 54
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic           out_valid,
  output logic [2*N-1:0] p
);

  localparam int K = N / 2;       // Booth digits
  localparam int W = 2 * N;       // product width
  localparam int R = K + 1;       // tree rows: K partial products + neg row

  // ---------------------------------------------------------------- registers
  logic [N-1:0] x_q, y_q;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      x_q <= x;
      y_q <= y;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  // ----------------------------------------------------- recoding, selection
  logic [N:0]      y_ext;          // {y, 0}: bit j+1 holds y[j]
  booth_sel_t      sel  [K];
  logic [K-1:0]    zero;
  logic [N+1:0]    pp   [K];
  logic [W-1:0]    rows [R];
  logic [W-1:0]    neg_row;

  assign y_ext = {y_q, 1'b0};

  for (genvar i = 0; i < K; i++) begin : g_digit
    booth_encoder u_enc (
      .trip(y_ext[2*i+2:2*i]),
      .sel (sel[i]),
      .zero(zero[i])
    );

    booth_pp_mux #(.N(N)) u_mux (
      .x  (x_q),
      .sel(sel[i]),
      .pp (pp[i])
    );

    // sign-extend to W bits, then weight 4^i
    logic [W-1:0] ext;
    assign ext     = {{(W-N-2){pp[i][N+1]}}, pp[i]};
    assign rows[i] = ext << (2 * i);
  end

  always_comb begin
    neg_row = '0;
    for (int i = 0; i < K; i++) neg_row[2*i] = sel[i].neg;
  end
  assign rows[K] = neg_row;

  // ------------------------------------------------ reduction, final addition
  logic [W-1:0] op_s, op_c;
  logic         cout_unused;

  pp_reduction_tree #(.W(W), .R(R)) u_tree (
    .rows   (rows),
    .sum_o  (op_s),
    .carry_o(op_c)
  );

  cla_final_adder #(.W(W), .B(4)) u_add (
    .a   (op_s),
    .b   (op_c),
    .cin (1'b0),
    .s   (p),
    .cout(cout_unused)
  );

  // zero[] is a by-product of the encoders; the selection uses two/one only.
  // A digit is never both |1| and |2|, and a zero digit selects nothing.
  for (genvar i = 0; i < K; i++) begin : g_chk
    always_comb begin
      assert (!(sel[i].one && sel[i].two));
      assert (zero[i] == !(sel[i].one || sel[i].two));
    end
  end

endmodule
