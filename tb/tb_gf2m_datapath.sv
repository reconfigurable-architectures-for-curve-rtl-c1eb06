// tb_gf2m_datapath: self-checking test of the GF(2^83) datapath. For random
// operands it loads A, B and C as whole 84-bit words (with garbage in bit
// 83), runs MUL, MULADD, ADD and SQR, compares the result with the
// reference, and checks the cycle from start to done
// (2 for ADD, 83 + 2 for the multiplying operations at DIGIT = 1).
module tb_gf2m_datapath;
  import hecc_pkg::*;
  import tb_gf_ref_pkg::M, tb_gf_ref_pkg::gf_mul, tb_gf_ref_pkg::rand_elem;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic        ld_en, start, busy, done;
  opreg_e      ld_sel;
  logic [WORD_W-1:0] ld_word, res;
  dpop_e       op;
  int checks = 0, failures = 0;
  int op_count [4];

  gf2m_datapath dut (.clk, .rst_n, .ld_en, .ld_sel, .ld_word, .start, .op,
                     .busy, .done, .res);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input opreg_e sel, input logic [M-1:0] v);
    ld_en = 1; ld_sel = sel; ld_word = {1'($urandom), v};   // bit 83 must be ignored
    @(negedge clk);
    ld_en = 0;
  endtask

  task automatic run(input dpop_e o, input logic [M-1:0] a, input logic [M-1:0] b,
                     input logic [M-1:0] c);
    logic [M-1:0] exp;
    logic [WORD_W-1:0] got;
    int cyc, lat;
    case (o)
      DP_MUL:    exp = gf_mul(a, b);
      DP_MULADD: exp = gf_mul(a, b) ^ c;
      DP_ADD:    exp = a ^ b;
      default:   exp = gf_mul(a, a);
    endcase
    lat = (o == DP_ADD) ? 2 : 85;
    load(REG_A, a); load(REG_B, b); load(REG_C, c);
    start = 1; op = o;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    got = res;
    checks += 2;
    op_count[o]++;
    if (got !== WORD_W'(exp)) begin
      failures++;
      $display("FAIL op %s: got %h exp %h", o.name(), got, exp);
    end
    if (cyc != lat) begin
      failures++;
      $display("FAIL op %s latency %0d exp %0d", o.name(), cyc, lat);
    end
    @(negedge clk);
  endtask

  initial begin
    rst_n = 0; ld_en = 0; start = 0; op = DP_MUL; ld_sel = REG_A; ld_word = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 60; n++) begin
      run(dpop_e'(n % 4), rand_elem(), rand_elem(), rand_elem());
    end
    run(DP_MULADD, '0, rand_elem(), {M{1'b1}});
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (op_count[i] == 0) begin failures++; $display("FAIL op %0d never run", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
