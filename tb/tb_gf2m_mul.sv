// tb_gf2m_mul: self-checking test of the digit-serial GF(2^83) multiplier.
// Two instances run side by side, bit-serial (DIGIT = 1) and DIGIT = 8.
// Products are compared with the reference in tb_gf_ref_pkg and the latency
// from start to done is checked against ceil(83 / DIGIT) cycles.
module tb_gf2m_mul;
  import tb_gf_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic          start;
  logic [M-1:0]  a, b, p1, p8;
  logic          busy1, done1, busy8, done8;
  int            checks = 0, failures = 0;

  gf2m_mul #(.M(M), .DIGIT(1)) dut1 (.clk, .rst_n, .start, .a, .b, .busy(busy1), .done(done1), .p(p1));
  gf2m_mul #(.M(M), .DIGIT(8)) dut8 (.clk, .rst_n, .start, .a, .b, .busy(busy8), .done(done8), .p(p8));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [M-1:0] x, input logic [M-1:0] y);
    logic [M-1:0] exp;
    int c1, c8;
    bit d1, d8;
    exp = gf_mul(x, y);
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a = '0; b = '0;       // operands must be captured at start
    c1 = 1; c8 = 1; d1 = 0; d8 = 0;
    while (!(d1 && d8)) begin
      if (!d1) begin if (done1) d1 = 1; else c1++; end
      if (!d8) begin if (done8) d8 = 1; else c8++; end
      if (d1 && d8) break;
      @(negedge clk);
      if (c1 > 200) break;
    end
    checks += 4;
    if (p1 !== exp) begin failures++; $display("FAIL D1 %h*%h = %h exp %h", x, y, p1, exp); end
    if (p8 !== exp) begin failures++; $display("FAIL D8 %h*%h = %h exp %h", x, y, p8, exp); end
    if (c1 != 84) begin failures++; $display("FAIL D1 latency %0d", c1); end
    if (c8 != 12) begin failures++; $display("FAIL D8 latency %0d", c8); end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run('0, rand_elem());
    run(83'd1, 83'h123456789abcdef);
    run({M{1'b1}}, {M{1'b1}});
    run(83'd1 << 82, 83'd1 << 82);
    for (int i = 0; i < 200; i++) run(rand_elem(), rand_elem());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
