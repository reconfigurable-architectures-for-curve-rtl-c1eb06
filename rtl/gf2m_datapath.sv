// gf2m_datapath: the co-processor's GF(2^83) datapath (multiplier, adder and
// multiply-and-add feedback).
//
// Following the original architecture, the datapath holds a field multiplier
// and a field adder (bitwise XOR in a binary field), and the product can be
// added to a third operand before it leaves the datapath, so the frequent
// expression d = a*b + c costs one operation and no extra transfers. Three
// operand registers A, B and C are loaded whole (ld_en, ld_sel, ld_word)
// from the output-word register; bits at or above M are dropped. The result
// register R is presented whole on res, zero-extended to the 84-bit word
// (so bit 83 of res is always zero), for the input-word register.
//
// Operations (op, sampled with start): MUL R=A*B, MULADD R=A*B+C, ADD R=A+B,
// SQR R=A*A. The operand registers and the SQR operation are this design's
// choices.
//
// Timing: with start high in cycle 0, done pulses in cycle 2 for ADD and in
// cycle ceil(M/DIGIT)+2 for the multiplying operations (the multiplier plus
// one cycle for the addition into the result register). R is valid from the
// done cycle on. busy is high from cycle 1 until the cycle before done; start
// is ignored while busy.
module gf2m_datapath
  import hecc_pkg::*;
#(
  parameter int unsigned  M        = FIELD_M,
  parameter int unsigned  DIGIT    = 1,
  parameter logic [M-1:0] POLY_LOW = FIELD_POLY_LOW[M-1:0]
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld_en,
  input  opreg_e            ld_sel,
  input  logic [WORD_W-1:0] ld_word,
  input  logic              start,
  input  dpop_e             op,
  output logic              busy,
  output logic              done,
  output logic [WORD_W-1:0] res
);

  logic [M-1:0] a_q, b_q, c_q, r_q;
  logic [M-1:0] prod;
  logic         mul_start, mul_busy, mul_done;
  logic         add_q;       // single-cycle ADD in flight
  logic         addc_q;      // add C to the product (MULADD)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      c_q <= '0;
    end else if (ld_en) begin
      unique case (ld_sel)
        REG_A:   a_q <= ld_word[M-1:0];
        REG_B:   b_q <= ld_word[M-1:0];
        default: c_q <= ld_word[M-1:0];
      endcase
    end
  end

  assign mul_start = start && (op != DP_ADD);

  gf2m_mul #(.M(M), .DIGIT(DIGIT), .POLY_LOW(POLY_LOW)) u_mul (
    .clk  (clk),
    .rst_n(rst_n),
    .start(mul_start),
    .a    (a_q),
    .b    ((op == DP_SQR) ? a_q : b_q),
    .busy (mul_busy),
    .done (mul_done),
    .p    (prod)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q    <= '0;
      add_q  <= 1'b0;
      addc_q <= 1'b0;
      done   <= 1'b0;
    end else begin
      done  <= 1'b0;
      add_q <= 1'b0;
      if (start && !busy) begin
        addc_q <= (op == DP_MULADD);
        if (op == DP_ADD) add_q <= 1'b1;
      end
      if (add_q) begin
        r_q  <= a_q ^ b_q;
        done <= 1'b1;
      end else if (mul_done) begin
        // feedback path of the multiply-and-add
        r_q  <= prod ^ (addc_q ? c_q : '0);
        done <= 1'b1;
      end
    end
  end

  assign busy = add_q || mul_busy || mul_done;
  assign res  = WORD_W'(r_q);

endmodule
