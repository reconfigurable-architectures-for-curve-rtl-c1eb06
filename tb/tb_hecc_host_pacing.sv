// tb_hecc_host_pacing: the affine-conversion inversion run by two hosts of
// different speed against two co-processors at default parameters.
//
// Both hosts follow the one-way protocol strictly: they never read busy and
// rely on the documented instruction times. One is paced like an 8051
// (a machine cycle of 12 clocks, two per port write: 24 clocks), the other
// like an AVR (2 clocks per port write). Checks: both inverses are correct
// (a * a^-1 = 1 with the reference arithmetic), no instruction was ever
// written while the co-processor was busy, and the datapath usage (active
// cycles over all cycles) is lower for the slow host, since the same
// datapath work is spread over more I/O time.
module tb_hecc_host_pacing;
  import tb_gf_ref_pkg::M, tb_gf_ref_pkg::gf_mul, tb_gf_ref_pkg::rand_elem;

  logic clk = 1'b0;
  logic rst_n, run;
  always #5 clk = ~clk;

  logic [M-1:0] a;
  int checks = 0, failures = 0;

  logic [7:0]   ins_s, addr_s, din_s, dout_s, ins_f, addr_f, din_f, dout_f;
  logic         busy_s, busy_f, fin_s, fin_f;
  logic [M-1:0] inv_s, inv_f;
  int           cyc_s, cyc_f, dp_s, dp_f, late_s, late_f;

  hecc_coproc dut_slow (.clk, .rst_n, .ins_port(ins_s), .addr_port(addr_s), .din_port(din_s),
                        .dout_port(dout_s), .busy(busy_s));
  hecc_coproc dut_fast (.clk, .rst_n, .ins_port(ins_f), .addr_port(addr_f), .din_port(din_f),
                        .dout_port(dout_f), .busy(busy_f));

  tb_host_model #(.CLKS_PER_WRITE(24)) host_slow (
    .clk, .run, .a, .ins_port(ins_s), .addr_port(addr_s), .din_port(din_s), .dout_port(dout_s),
    .busy(busy_s), .dp_active(dut_slow.u_dp.busy || dut_slow.u_dp.done), .finished(fin_s),
    .inv(inv_s), .cycles(cyc_s), .dp_cycles(dp_s), .late_writes(late_s));
  tb_host_model #(.CLKS_PER_WRITE(2)) host_fast (
    .clk, .run, .a, .ins_port(ins_f), .addr_port(addr_f), .din_port(din_f), .dout_port(dout_f),
    .busy(busy_f), .dp_active(dut_fast.u_dp.busy || dut_fast.u_dp.done), .finished(fin_f),
    .inv(inv_f), .cycles(cyc_f), .dp_cycles(dp_f), .late_writes(late_f));

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    real u_s, u_f;
    rst_n = 0; run = 0;
    a = rand_elem() | 83'd1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run = 1;
    wait (fin_s && fin_f);
    u_s = 100.0 * real'(dp_s) / real'(cyc_s);
    u_f = 100.0 * real'(dp_f) / real'(cyc_f);
    $display("8051-paced host: %0d cycles, datapath active %0d (%0.2f%%)", cyc_s, dp_s, u_s);
    $display("AVR-paced host:  %0d cycles, datapath active %0d (%0.2f%%)", cyc_f, dp_f, u_f);
    expect_true(gf_mul(inv_s, a) == 83'd1, "8051-paced inverse");
    expect_true(gf_mul(inv_f, a) == 83'd1, "AVR-paced inverse");
    expect_true(inv_s == inv_f, "both hosts agree");
    expect_true(late_s == 0, "8051-paced host wrote while busy");
    expect_true(late_f == 0, "AVR-paced host wrote while busy");
    expect_true(dp_s == dp_f, "same datapath work");
    expect_true(u_s < u_f, "slow host gives lower usage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
