// tb_hecc_coproc: end-to-end test of the co-processor at its default
// parameters, driven the way the micro-controller software drives it:
// plain writes to the instruction, address and data-in ports and reads of
// the data-out port.
//
// 1. Field elements are loaded into storage variables over the 8-bit ports
//    (INSHIFT x 11, WRITE) and read back (READ, 11 x dout/OUTSHIFT).
// 2. Random MUL, MULADD, ADD and SQR lines run on them; every result is
//    read back over the ports and compared with the reference arithmetic,
//    and the busy time of each EXEC is compared with 3n + 83 + 8 cycles
//    (n operands) for the multiplying operations and 14 for ADD.
// 3. The affine conversion's field inversion runs as a micro-code routine:
//    Fermat inversion a^(2^83-2) by 81 square-and-multiply steps and one
//    last squaring; the result times a must be 1.
// Mechanisms counted, each of which must occur: an instruction written
// while the co-processor is busy (held until it is free), the same
// instruction issued twice in a row (told apart by the toggle bit), each of
// the four datapath operations, and port transfers in both directions.
// The co-processor usage (datapath-active cycles over all cycles) and the
// busy share are printed.
module tb_hecc_coproc;
  import hecc_pkg::*;
  import tb_gf_ref_pkg::M, tb_gf_ref_pkg::gf_mul, tb_gf_ref_pkg::rand_elem;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic [7:0] ins_port, addr_port, din_port, dout_port;
  logic       busy;
  int checks = 0, failures = 0;

  hecc_coproc dut (.clk, .rst_n, .ins_port, .addr_port, .din_port, .dout_port, .busy);

  // mechanism counters
  int n_queued = 0, n_repeat = 0, n_in_bytes = 0, n_out_bytes = 0;
  int n_op [4] = '{default: 0};
  longint cyc_total = 0, cyc_busy = 0, cyc_dp = 0;

  always @(posedge clk) if (rst_n) begin
    cyc_total++;
    if (busy) cyc_busy++;
    if (dut.u_dp.busy || dut.u_dp.done) cyc_dp++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       tog = 1'b0;
  logic [6:0] last_ins = '1;

  // Write one instruction to the ports. With wait_free the host waits until
  // the co-processor is idle again; otherwise it returns at once.
  task automatic send(input opcode_e opc, input logic [3:0] sub, input logic [7:0] ad,
                      input logic [7:0] d, input bit wait_free = 1);
    logic [6:0] body;
    body = {opc, sub};
    @(negedge clk);
    if (busy) n_queued++;
    if (body == last_ins) n_repeat++;
    last_ins = body;
    tog = ~tog;
    addr_port = ad;
    din_port  = d;
    ins_port  = {tog, body};
    // port register + accept
    repeat (2) @(negedge clk);
    if (wait_free) while (busy) @(negedge clk);
  endtask

  task automatic put_var(input int v, input logic [M-1:0] x);
    logic [87:0] p;
    p = 88'(x);
    for (int k = 10; k >= 0; k--) begin
      send(OP_INSHIFT, 4'h0, 8'h00, p[8*k +: 8]);
      n_in_bytes++;
    end
    send(OP_WRITE, 4'h0, 8'(v), 8'h00);
  endtask

  task automatic get_var(input int v, output logic [M-1:0] x);
    logic [87:0] p;
    send(OP_READ, 4'h0, 8'(v), 8'h00);
    for (int k = 0; k < 11; k++) begin
      p[8*k +: 8] = dout_port;
      n_out_bytes++;
      send(OP_OUTSHIFT, 4'h0, 8'h00, 8'h00);
    end
    checks++;
    if (p[87:M] != '0) begin failures++; $display("FAIL bits above %0d not zero", M); end
    x = p[M-1:0];
  endtask

  task automatic setregs(input int a, input int b, input int c, input int d);
    send(OP_SETREG, 4'(REG_A), 8'(a), 8'h00);
    send(OP_SETREG, 4'(REG_B), 8'(b), 8'h00);
    send(OP_SETREG, 4'(REG_C), 8'(c), 8'h00);
    send(OP_SETREG, 4'(REG_D), 8'(d), 8'h00);
  endtask

  // run one EXEC and check its busy time
  task automatic exec(input dpop_e o);
    int nb, want, nops;
    @(negedge clk);
    if ({OP_EXEC, 4'(o)} == last_ins) n_repeat++;
    last_ins = {OP_EXEC, 4'(o)};
    tog = ~tog;
    ins_port = {tog, OP_EXEC, 4'(o)};
    repeat (2) @(negedge clk);   // seen, accepted; busy from here
    nb = 0;
    while (busy) begin nb++; @(negedge clk); end
    nops = (o == DP_SQR) ? 1 : (o == DP_MULADD) ? 3 : 2;
    want = (o == DP_ADD) ? 14 : 3 * nops + M + 8;
    checks++;
    n_op[o]++;
    if (nb != want) begin failures++; $display("FAIL EXEC %s busy %0d exp %0d", o.name(), nb, want); end
  endtask

  logic [M-1:0] var_ref [32];

  initial begin
    logic [M-1:0] got, a, inv;
    rst_n = 0; ins_port = 0; addr_port = 0; din_port = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // 1. load and read back
    for (int v = 0; v < 8; v++) begin
      var_ref[v] = rand_elem();
      put_var(v, var_ref[v]);
    end
    for (int v = 0; v < 8; v++) begin
      get_var(v, got);
      checks++;
      if (got !== var_ref[v]) begin failures++; $display("FAIL var %0d: %h exp %h", v, got, var_ref[v]); end
    end

    // 2. random formula lines on variables 0..7
    for (int n = 0; n < 24; n++) begin
      int ra, rb, rc, rd;
      dpop_e o;
      logic [M-1:0] e;
      ra = $urandom_range(7); rb = $urandom_range(7); rc = $urandom_range(7); rd = $urandom_range(7);
      o = dpop_e'(n % 4);
      setregs(ra, rb, rc, rd);
      exec(o);
      case (o)
        DP_MUL:    e = gf_mul(var_ref[ra], var_ref[rb]);
        DP_MULADD: e = gf_mul(var_ref[ra], var_ref[rb]) ^ var_ref[rc];
        DP_ADD:    e = var_ref[ra] ^ var_ref[rb];
        default:   e = gf_mul(var_ref[ra], var_ref[ra]);
      endcase
      var_ref[rd] = e;
      get_var(rd, got);
      checks++;
      if (got !== e) begin failures++; $display("FAIL line %0d %s: %h exp %h", n, o.name(), got, e); end
    end

    // an instruction written while busy is held until the co-processor is free
    setregs(1, 2, 3, 4);
    send(OP_EXEC, 4'(DP_MUL), 8'h00, 8'h00, 0);
    send(OP_SETREG, 4'(REG_D), 8'd5, 8'h00, 0);   // queued behind the EXEC
    repeat (2) @(negedge clk);
    while (busy) @(negedge clk);
    send(OP_EXEC, 4'(DP_MUL), 8'h00, 8'h00);       // writes var 5
    n_op[DP_MUL] += 2;
    var_ref[4] = gf_mul(var_ref[1], var_ref[2]);
    var_ref[5] = var_ref[4];
    get_var(4, got);
    checks++;
    if (got !== var_ref[4]) begin failures++; $display("FAIL queued EXEC result"); end
    get_var(5, got);
    checks++;
    if (got !== var_ref[5]) begin failures++; $display("FAIL instruction written while busy was lost"); end

    // 3. Fermat inversion routine: var 10 = a^(2^83-2), a in var 9
    a = rand_elem() | 83'd1;
    put_var(9, a);
    put_var(10, a);
    setregs(10, 9, 0, 10);
    for (int i = 0; i < 81; i++) begin
      exec(DP_SQR);     // r = r^2
      exec(DP_MUL);     // r = r * a
    end
    exec(DP_SQR);
    get_var(10, inv);
    checks++;
    if (gf_mul(inv, a) !== 83'd1) begin
      failures++;
      $display("FAIL inversion: a=%h inv=%h a*inv=%h", a, inv, gf_mul(inv, a));
    end

    // mechanisms
    begin
      int counts [8];
      string names [8];
      counts = '{n_queued, n_repeat, n_op[0], n_op[1], n_op[2], n_op[3], n_in_bytes, n_out_bytes};
      names  = '{"written while busy", "repeated instruction", "MUL", "MULADD", "ADD", "SQR",
                 "bytes in", "bytes out"};
      for (int i = 0; i < 8; i++) begin
        $display("mechanism %-22s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", names[i]); end
      end
    end
    $display("co-processor busy %0d of %0d cycles (%0.1f%%), datapath active %0d (%0.1f%%)",
             cyc_busy, cyc_total, 100.0 * real'(cyc_busy) / real'(cyc_total),
             cyc_dp, 100.0 * real'(cyc_dp) / real'(cyc_total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
