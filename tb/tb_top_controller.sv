// tb_top_controller: self-checking test of the top controller on its own.
// The testbench plays the port stage (ins_valid / instr / addr) and the
// datapath (it answers dp_start with dp_done a random number of cycles
// later). All storage reads go to the output word and all writes come from
// the input word, so EXEC shows as reads, output-word loads, whole-operand
// copies, the start, the result load into the input word and the writes. Every cycle in which the controller drives a strobe is written
// down as a text event; the event lists of WRITE, READ, SETREG, EXEC (all
// four operations) and the one-cycle instructions are compared with lists
// built from the expected storage layout (variable v at 4v .. 4v+2) and the
// expected cycle counts.
module tb_top_controller;
  import hecc_pkg::*;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic              ins_valid, accept, busy;
  instr_t            instr;
  logic [7:0]        addr;
  logic              ram_rd, ram_wr, in_shift, in_ld, out_shift, out_ld;
  logic              dp_ld, dp_start, dp_done;
  logic [RAM_AW-1:0] ram_addr;
  logic [1:0]        ram_widx, out_idx;
  opreg_e            dp_ld_sel;
  dpop_e             dp_op;
  int checks = 0, failures = 0;
  int done_delay;

  string got[$], exp[$];

  top_controller dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event recorder, sampled just before each rising edge
  always @(negedge clk) begin
    #4;
    if (rst_n) begin
      if (ram_wr)    got.push_back($sformatf("wr %0d w%0d", ram_addr, ram_widx));
      if (ram_rd)    got.push_back($sformatf("rd %0d", ram_addr));
      if (out_ld)    got.push_back($sformatf("out %0d", out_idx));
      if (dp_ld)     got.push_back($sformatf("ld %0d", dp_ld_sel));
      if (dp_start)  got.push_back($sformatf("start %0d", dp_op));
      if (in_ld)     got.push_back("inld");
      if (in_shift)  got.push_back("inshift");
      if (out_shift) got.push_back("outshift");
    end
  end

  // datapath stand-in
  initial begin
    dp_done = 0;
    forever begin
      @(posedge clk);
      if (dp_start) begin
        repeat (done_delay) @(posedge clk);
        #1 dp_done = 1;
        @(posedge clk);
        #1 dp_done = 0;
      end
    end
  end

  logic tog = 1'b0;

  // issue one instruction and return the number of busy cycles after it
  task automatic issue(input opcode_e opc, input logic [3:0] sub, input logic [7:0] ad, output int nbusy);
    @(negedge clk);
    tog = ~tog;
    instr = '{toggle: tog, opcode: opc, sub: sub};
    addr = ad; ins_valid = 1;
    #4;
    checks++;
    if (!accept) begin failures++; $display("FAIL not accepted when idle"); end
    @(negedge clk);
    ins_valid = 0;
    nbusy = 0;
    while (busy && nbusy < 1000) begin nbusy++; @(negedge clk); end
  endtask

  task automatic compare(input string what);
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("FAIL %s: %0d events, expected %0d", what, got.size(), exp.size());
      foreach (got[i]) $display("  got %s", got[i]);
      foreach (exp[i]) $display("  exp %s", exp[i]);
    end else begin
      foreach (exp[i]) if (got[i] != exp[i]) begin
        failures++;
        $display("FAIL %s event %0d: '%s' expected '%s'", what, i, got[i], exp[i]);
      end
    end
    got.delete(); exp.delete();
  endtask

  task automatic expect_busy(input int nb, input int want, input string what);
    checks++;
    if (nb != want) begin failures++; $display("FAIL %s busy %0d exp %0d", what, nb, want); end
  endtask

  initial begin
    int nb;
    int regs [4];
    rst_n = 0; ins_valid = 0; instr = '0; addr = 0; done_delay = 3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    for (int n = 0; n < 20; n++) begin
      int v;
      v = $urandom_range(31);
      // WRITE
      issue(OP_WRITE, 4'h0, 8'(v), nb);
      for (int k = 0; k < 3; k++) exp.push_back($sformatf("wr %0d w%0d", 4*v + k, k));
      expect_busy(nb, 3, "WRITE");
      compare("WRITE");
      // READ
      issue(OP_READ, 4'h0, 8'(v) | 8'he0, nb);
      exp.push_back($sformatf("rd %0d", 4*v));
      exp.push_back($sformatf("rd %0d", 4*v + 1)); exp.push_back("out 0");
      exp.push_back($sformatf("rd %0d", 4*v + 2)); exp.push_back("out 1");
      exp.push_back("out 2");
      expect_busy(nb, 4, "READ");
      compare("READ");
      // one-cycle instructions
      issue(OP_INSHIFT, 4'h0, 8'h00, nb);
      issue(OP_OUTSHIFT, 4'h0, 8'h00, nb);
      issue(OP_NOP, 4'h0, 8'h00, nb);
      issue(OP_RSVD, 4'h0, 8'h00, nb);
      exp.push_back("inshift"); exp.push_back("outshift");
      expect_busy(nb, 0, "one-cycle");
      compare("one-cycle");
      // SETREG A..D, then EXEC
      for (int r = 0; r < 4; r++) begin
        regs[r] = $urandom_range(31);
        issue(OP_SETREG, 4'(r), 8'(regs[r]), nb);
      end
      compare("SETREG");
      begin
        dpop_e o;
        int nops;
        o = dpop_e'(n % 4);
        nops = (o == DP_SQR) ? 1 : (o == DP_MULADD) ? 3 : 2;
        done_delay = $urandom_range(1, 6);
        issue(OP_EXEC, 4'(o), 8'h00, nb);
        // operand words stream into the output word; each whole operand
        // is copied one cycle after its last word lands
        for (int i = 0; i < 3 * nops + 2; i++) begin
          if (i < 3 * nops) exp.push_back($sformatf("rd %0d", 4*regs[i/3] + i%3));
          if (i >= 1 && i <= 3 * nops) exp.push_back($sformatf("out %0d", (i-1)%3));
          if (i >= 2 && (i-2)%3 == 2) exp.push_back($sformatf("ld %0d", (i-2)/3));
        end
        exp.push_back($sformatf("start %0d", o));
        exp.push_back("inld");
        for (int k = 0; k < 3; k++) exp.push_back($sformatf("wr %0d w%0d", 4*regs[3] + k, k));
        // LOAD 3n, drain 2, GO, RUN (done_delay+1), STORE 3
        expect_busy(nb, 3*nops + 2 + 1 + done_delay + 1 + 3, "EXEC");
        compare("EXEC");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
