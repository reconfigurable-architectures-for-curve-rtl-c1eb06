// tb_port_sync: self-checking test of the port register stage and the
// toggle handshake. Checks that a port write is seen one cycle later, that
// valid rises only when the toggle bit changes, stays high until accept,
// drops after accept, that the same opcode can be issued twice by flipping
// the toggle, and that addr and din follow the ports.
module tb_port_sync;
  import hecc_pkg::*;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic [7:0] ins_port, addr_port, din_port, addr, din;
  logic       accept, valid;
  instr_t     instr;
  int checks = 0, failures = 0;

  port_sync dut (.clk, .rst_n, .ins_port, .addr_port, .din_port, .accept, .valid, .instr, .addr, .din);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic tog;
    rst_n = 0; ins_port = 0; addr_port = 0; din_port = 0; accept = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq(valid, 0, "idle after reset");
    // changing opcode bits without the toggle does nothing
    ins_port = 8'h35;
    @(negedge clk);
    expect_eq(valid, 0, "no toggle change");
    tog = 1'b0;
    for (int n = 0; n < 100; n++) begin
      logic [7:0] ins, ad, dd;
      int wait_cycles;
      tog = ~tog;
      ins = {tog, 7'($urandom)};
      ad  = 8'($urandom);
      dd  = 8'($urandom);
      addr_port = ad; din_port = dd; ins_port = ins;
      expect_eq(valid, 0, "not seen in same cycle");
      @(negedge clk);
      expect_eq(valid, 1, "seen one cycle later");
      expect_eq(instr, ins, "instr");
      expect_eq(addr, ad, "addr");
      expect_eq(din, dd, "din");
      wait_cycles = $urandom_range(3);
      repeat (wait_cycles) begin
        @(negedge clk);
        expect_eq(valid, 1, "pending until accept");
      end
      accept = 1;
      @(negedge clk);
      accept = 0;
      expect_eq(valid, 0, "dropped after accept");
      @(negedge clk);
      expect_eq(valid, 0, "stays low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
