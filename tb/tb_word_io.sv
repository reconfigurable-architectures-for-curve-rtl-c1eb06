// tb_word_io: self-checking test of the 84-bit input-word and output-word
// registers. Shifts 11 bytes into the input word (most significant first)
// and compares the 84-bit result; loads three 32-bit words into the output
// word, checks the whole word on out_word, and reads 11 bytes back (least
// significant first) through dout and out_shift, checking that bits above 84
// come out as zero. Also loads a whole word through in_ld and checks that it
// takes priority over in_shift.
module tb_word_io;
  import hecc_pkg::*;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic              in_shift, in_ld, out_ld, out_shift;
  logic [WORD_W-1:0] in_data, out_word;
  logic [7:0]        din, dout;
  logic [WORD_W-1:0] in_word;
  logic [1:0]        out_idx;
  logic [31:0]       out_data;
  int checks = 0, failures = 0;

  word_io dut (.clk, .rst_n, .in_shift, .din, .in_ld, .in_data, .in_word, .out_ld, .out_idx, .out_data, .out_shift, .out_word, .dout);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; in_shift = 0; in_ld = 0; in_data = '0; out_ld = 0; out_shift = 0; din = 0; out_idx = 0; out_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      logic [87:0] v;
      logic [95:0] w;
      v = {$urandom, $urandom, $urandom};
      for (int k = 10; k >= 0; k--) begin
        din = v[8*k +: 8]; in_shift = 1;
        @(negedge clk);
      end
      in_shift = 0;
      checks++;
      if (in_word !== v[83:0]) begin
        failures++;
        $display("FAIL in_word %h exp %h", in_word, v[83:0]);
      end
      // output word: load words in random order, with garbage above bit 83
      w = {$urandom, $urandom, $urandom};
      for (int k = 0; k < 3; k++) begin
        out_idx = 2'((k + n) % 3); out_data = w[32*out_idx +: 32]; out_ld = 1;
        @(negedge clk);
      end
      out_ld = 0;
      checks++;
      if (out_word !== w[83:0]) begin failures++; $display("FAIL out_word %h exp %h", out_word, w[83:0]); end
      // whole-word load of the input word wins over a shift
      in_data = {$urandom, $urandom, $urandom}; in_ld = 1; in_shift = 1;
      @(negedge clk);
      in_ld = 0; in_shift = 0;
      checks++;
      if (in_word !== in_data) begin failures++; $display("FAIL in_ld %h exp %h", in_word, in_data); end
      for (int k = 0; k < 11; k++) begin
        logic [7:0] exp;
        exp = (k == 10) ? {4'h0, w[83:80]} : w[8*k +: 8];
        checks++;
        if (dout !== exp) begin
          failures++;
          $display("FAIL dout byte %0d: %h exp %h", k, dout, exp);
        end
        out_shift = 1;
        @(negedge clk);
        out_shift = 0;
      end
      checks++;
      if (dout !== 8'h00) begin failures++; $display("FAIL dout not empty"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
