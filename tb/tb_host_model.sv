// tb_host_model: behavioural model of the 8-bit micro-controller side of the
// co-processor, for testbenches only.
//
// It drives the instruction, address and data-in ports the way a program on
// the CPU does, with a fixed number of clocks per port write
// (CLKS_PER_WRITE), and it never looks at busy: after each instruction it
// simply lets the documented busy time of that instruction pass (the
// one-way handshake). It runs one workload, the projective-to-affine
// conversion's field inversion by Fermat's theorem, a^(2^83-2), as 81
// square-and-multiply steps and a final squaring, then reads the result
// back over the ports. It flags any port write made while the co-processor
// was busy (a timing error in the program) and reports the inverse, the
// cycle count and the datapath-active cycles.
module tb_host_model
  import hecc_pkg::*;
#(
  parameter int CLKS_PER_WRITE = 24,
  parameter int DIGIT          = 1
) (
  input  logic         clk,
  input  logic         run,
  input  logic [82:0]  a,
  output logic [7:0]   ins_port,
  output logic [7:0]   addr_port,
  output logic [7:0]   din_port,
  input  logic [7:0]   dout_port,
  input  logic         busy,
  input  logic         dp_active,
  output logic         finished,
  output logic [82:0]  inv,
  output int           cycles,
  output int           dp_cycles,
  output int           late_writes
);

  localparam int NDIG = (83 + DIGIT - 1) / DIGIT;

  logic tog = 1'b0;
  bit   counting = 0;

  always @(posedge clk) if (counting) begin
    cycles++;
    if (dp_active) dp_cycles++;
  end

  // busy cycles of each instruction after its accept
  function automatic int busy_time(input opcode_e o, input dpop_e d);
    case (o)
      OP_WRITE: return 3;
      OP_READ:  return 4;
      OP_EXEC:  return (d == DP_ADD) ? 14
                     : 3 * ((d == DP_SQR) ? 1 : (d == DP_MULADD) ? 3 : 2) + NDIG + 8;
      default:  return 0;
    endcase
  endfunction

  // one port write of the instruction byte, preceded by address and data
  task automatic send(input opcode_e o, input logic [3:0] sub, input logic [7:0] ad,
                      input logic [7:0] d);
    addr_port = ad;
    repeat (CLKS_PER_WRITE) @(posedge clk);
    din_port = d;
    repeat (CLKS_PER_WRITE) @(posedge clk);
    if (busy) late_writes++;
    tog = ~tog;
    ins_port = {tog, o, sub};
    // seen one cycle later, accepted, then busy for its documented time
    repeat (2 + busy_time(o, dpop_e'(sub[1:0]))) @(posedge clk);
  endtask

  initial begin
    logic [87:0] p;
    ins_port = 0; addr_port = 0; din_port = 0;
    finished = 0; inv = '0; cycles = 0; dp_cycles = 0; late_writes = 0;
    wait (run);
    @(posedge clk);
    counting = 1;
    // load a into variables 9 and 10
    for (int v = 9; v <= 10; v++) begin
      p = 88'(a);
      for (int k = 10; k >= 0; k--) send(OP_INSHIFT, 4'h0, 8'h00, p[8*k +: 8]);
      send(OP_WRITE, 4'h0, 8'(v), 8'h00);
    end
    send(OP_SETREG, 4'(REG_A), 8'd10, 8'h00);
    send(OP_SETREG, 4'(REG_B), 8'd9, 8'h00);
    send(OP_SETREG, 4'(REG_D), 8'd10, 8'h00);
    for (int i = 0; i < 81; i++) begin
      send(OP_EXEC, 4'(DP_SQR), 8'h00, 8'h00);
      send(OP_EXEC, 4'(DP_MUL), 8'h00, 8'h00);
    end
    send(OP_EXEC, 4'(DP_SQR), 8'h00, 8'h00);
    send(OP_READ, 4'h0, 8'd10, 8'h00);
    for (int k = 0; k < 11; k++) begin
      repeat (CLKS_PER_WRITE) @(posedge clk);   // port read
      p[8*k +: 8] = dout_port;
      send(OP_OUTSHIFT, 4'h0, 8'h00, 8'h00);
    end
    inv = p[82:0];
    counting = 0;
    finished = 1;
  end

endmodule
