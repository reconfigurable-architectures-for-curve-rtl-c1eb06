// port_sync: register stage and one-way handshake for the co-processor's
// 8-bit micro-controller ports.
//
// The micro-controller drives the instruction, address and data-in ports with
// ordinary memory-mapped port writes and never waits for an acknowledge: the
// co-processor picks up each instruction, performs it and waits for the next
// one (a one-way handshake, as the design description states). This block
// registers the three input ports once per clock. Bit 7 of the instruction
// byte is a toggle: an instruction is pending (valid) while that bit differs
// from the toggle of the last accepted instruction, so the same instruction
// can be issued twice in a row by flipping the bit. The toggle scheme is this
// design's choice; the description does not say how a new opcode is told
// from an old one.
//
// Timing: a port write is seen one cycle later. valid stays high until the
// controller pulses accept; addr and din are taken at that moment, so the
// software must leave them unchanged until the instruction has been picked
// up (it only needs to wait out the previous instruction).
module port_sync
  import hecc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] ins_port,
  input  logic [7:0] addr_port,
  input  logic [7:0] din_port,
  input  logic       accept,
  output logic       valid,
  output instr_t     instr,
  output logic [7:0] addr,
  output logic [7:0] din
);

  logic last_tog_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      instr      <= '0;
      addr       <= '0;
      din        <= '0;
      last_tog_q <= 1'b0;
    end else begin
      instr <= instr_t'(ins_port);
      addr  <= addr_port;
      din   <= din_port;
      if (accept) last_tog_q <= instr.toggle;
    end
  end

  assign valid = (instr.toggle != last_tog_q);

  // accept is only meaningful for a pending instruction.
  a_accept_only_valid: assert property (@(posedge clk) disable iff (!rst_n) accept |-> valid);

endmodule
