// gf2m_mul: digit-serial GF(2^m) multiplier in polynomial basis, most
// significant digit first.
//
// The field multiplier is the core of every option of the co-processor; the
// description gives its function and field (GF(2^83)) but not its insides.
// This is the simplest sequential form: each clock it folds DIGIT bits of b
// into the accumulator, acc = acc * x + b_i * a (mod P), so one product takes
// ceil(M / DIGIT) cycles. b is zero-extended at the top to a whole number of
// digits, which leaves the result unchanged. DIGIT = 1 (bit-serial) is this
// design's choice.
//
// Interface: pulse start for one cycle with a and b valid (they are captured).
// busy is high while running; done pulses for one cycle with p valid, and p
// holds its value until the next start. With start high in cycle 0 the
// operands are captured at the end of that cycle, ceil(M / DIGIT) steps
// follow, and done is high in cycle ceil(M / DIGIT) + 1. start is ignored
// while busy.
module gf2m_mul #(
  parameter int unsigned         M        = 83,
  parameter int unsigned         DIGIT    = 1,
  parameter logic [M-1:0]        POLY_LOW = M'((1 << 7) | (1 << 4) | (1 << 2) | 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] p
);

  localparam int unsigned NDIG = (M + DIGIT - 1) / DIGIT;   // cycles per product
  localparam int unsigned BW   = NDIG * DIGIT;              // padded b width
  localparam int unsigned CW   = $clog2(NDIG + 1);

  logic [M-1:0]  a_q;
  logic [BW-1:0] b_q;      // next digit sits in the top DIGIT bits
  logic [M-1:0]  acc_q, acc_d;
  logic [CW-1:0] cnt_q;

  // Multiply by x modulo P.
  function automatic logic [M-1:0] xtime(input logic [M-1:0] v);
    return {v[M-2:0], 1'b0} ^ (v[M-1] ? POLY_LOW : '0);
  endfunction

  always_comb begin
    acc_d = acc_q;
    for (int j = DIGIT - 1; j >= 0; j--) begin
      acc_d = xtime(acc_d) ^ (b_q[BW-DIGIT+j] ? a_q : '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      acc_q <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        a_q   <= a;
        b_q   <= BW'(b);
        acc_q <= '0;
        cnt_q <= CW'(NDIG);
        busy  <= 1'b1;
      end else if (busy) begin
        acc_q <= acc_d;
        b_q   <= b_q << DIGIT;
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign p = acc_q;

  // done is a single-cycle pulse that ends a run.
  a_done_after_busy: assert property (@(posedge clk) disable iff (!rst_n) done |-> $past(busy) && !busy);

endmodule
