// tb_local_storage: self-checking test of the 128 x 32-bit local storage.
// Fills every location with a random word, reads all of them back in random
// order against a shadow array, checks the one-cycle read latency, that
// rdata holds between reads, and that a read and a write of the same
// location in one cycle return the old word.
module tb_local_storage;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rd, wr;
  logic [6:0]  addr;
  logic [31:0] wdata, rdata;
  logic [31:0] shadow [128];
  int checks = 0, failures = 0;

  local_storage dut (.clk, .rd, .wr, .addr, .wdata, .rdata);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, rdata, exp);
    end
  endtask

  initial begin
    rd = 0; wr = 0; addr = '0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < 128; i++) begin
      shadow[i] = $urandom;
      wr = 1; addr = 7'(i); wdata = shadow[i];
      @(negedge clk);
    end
    wr = 0;
    for (int n = 0; n < 300; n++) begin
      int k;
      k = $urandom_range(127);
      rd = 1; addr = 7'(k);
      @(negedge clk);
      rd = 0; addr = 7'($urandom_range(127));
      check(shadow[k], "read");
      @(negedge clk);
      check(shadow[k], "hold");
    end
    // read during write of the same location
    rd = 1; wr = 1; addr = 7'd42; wdata = ~shadow[42];
    @(negedge clk);
    rd = 0; wr = 0;
    check(shadow[42], "read-during-write old data");
    shadow[42] = ~shadow[42];
    rd = 1;
    @(negedge clk);
    rd = 0;
    check(shadow[42], "new data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
