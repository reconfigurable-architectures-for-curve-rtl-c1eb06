// hecc_coproc: GF(2^83) co-processor for hyperelliptic (and elliptic) curve
// cryptography on an 8-bit micro-controller, in the configuration where the
// field operations and the lines of the divisor formulae run in hardware and
// only the scalar multiplication stays in software.
//
// Structure (as in the design description): four 8-bit ports to the
// micro-controller (instruction, address, data in, data out), a top
// controller, a local storage of 128 x 32 bits (32 field variables of four
// locations each), 84-bit input-word and output-word registers through which
// every transfer to and from the storage passes, and a datapath with a field
// multiplier, a field adder and the multiply-and-add feedback. Storage
// writes come only from the input-word register and storage reads go only
// to the output-word register, for CPU transfers and datapath operands and
// results alike; during an EXEC the two registers carry the operands and the
// result, so their CPU-side contents do not survive it.
//
// The software drives the ports with plain port writes (one-way handshake).
// It loads a field element by sending 11 bytes, most significant first, with
// INSHIFT, then WRITE var; it reads one back with READ var and 11 bytes, least
// significant first, taking dout_port and then OUTSHIFT. Computation is
// SETREG A/B/C/D followed by EXEC (MUL, MULADD, ADD or SQR); see hecc_pkg for
// the encoding and top_controller for the cycle counts. busy is an extra
// status output that the one-way protocol does not need; the software is
// expected to leave enough time between instructions.
//
// Parameters: M is the field degree (83 in the design description), DIGIT the
// multiplier digit size (this design's choice, 1 = bit-serial). The reduction
// polynomial x^83 + x^7 + x^4 + x^2 + 1 is this design's choice as well; the
// storage layout assumes M <= 96.
module hecc_coproc
  import hecc_pkg::*;
#(
  parameter int unsigned  M        = FIELD_M,
  parameter int unsigned  DIGIT    = 1,
  parameter logic [M-1:0] POLY_LOW = FIELD_POLY_LOW[M-1:0]
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] ins_port,
  input  logic [7:0] addr_port,
  input  logic [7:0] din_port,
  output logic [7:0] dout_port,
  output logic       busy
);

  // port stage <-> controller
  logic        ins_valid, accept, ctrl_busy;
  instr_t      instr;
  logic [7:0]  addr_q, din_q;

  // storage
  logic              ram_rd, ram_wr;
  logic [RAM_AW-1:0] ram_addr;
  logic [1:0]        ram_widx;
  logic [RAM_W-1:0]  ram_wdata, ram_rdata;

  // word registers
  logic              in_shift, in_ld, out_shift, out_ld;
  logic [1:0]        out_idx;
  logic [WORD_W-1:0] in_word, out_word;
  logic [WORDS_USED*RAM_W-1:0] in_pad;

  // datapath
  logic              dp_ld, dp_start, dp_busy, dp_done;
  opreg_e            dp_ld_sel;
  dpop_e             dp_op;
  logic [WORD_W-1:0] dp_res;

  port_sync u_ports (
    .clk      (clk),
    .rst_n    (rst_n),
    .ins_port (ins_port),
    .addr_port(addr_port),
    .din_port (din_port),
    .accept   (accept),
    .valid    (ins_valid),
    .instr    (instr),
    .addr     (addr_q),
    .din      (din_q)
  );

  top_controller u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .ins_valid(ins_valid),
    .instr    (instr),
    .addr     (addr_q),
    .accept   (accept),
    .busy     (ctrl_busy),
    .ram_rd   (ram_rd),
    .ram_wr   (ram_wr),
    .ram_addr (ram_addr),
    .ram_widx (ram_widx),
    .in_shift (in_shift),
    .in_ld    (in_ld),
    .out_shift(out_shift),
    .out_ld   (out_ld),
    .out_idx  (out_idx),
    .dp_ld    (dp_ld),
    .dp_ld_sel(dp_ld_sel),
    .dp_start (dp_start),
    .dp_op    (dp_op),
    .dp_done  (dp_done)
  );

  word_io u_words (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_shift (in_shift),
    .din      (din_q),
    .in_ld    (in_ld),
    .in_data  (dp_res),
    .in_word  (in_word),
    .out_ld   (out_ld),
    .out_idx  (out_idx),
    .out_data (ram_rdata),
    .out_shift(out_shift),
    .out_word (out_word),
    .dout     (dout_port)
  );

  assign busy = ctrl_busy || dp_busy;

  // The storage is written only from the input-word register.
  assign in_pad    = (WORDS_USED*RAM_W)'(in_word);
  assign ram_wdata = in_pad[ram_widx*RAM_W +: RAM_W];

  local_storage #(.DW(RAM_W), .DEPTH(RAM_DEPTH)) u_ram (
    .clk  (clk),
    .rd   (ram_rd),
    .wr   (ram_wr),
    .addr (ram_addr),
    .wdata(ram_wdata),
    .rdata(ram_rdata)
  );

  // The datapath is loaded only from the output-word register.
  gf2m_datapath #(.M(M), .DIGIT(DIGIT), .POLY_LOW(POLY_LOW)) u_dp (
    .clk    (clk),
    .rst_n  (rst_n),
    .ld_en  (dp_ld),
    .ld_sel (dp_ld_sel),
    .ld_word(out_word),
    .start  (dp_start),
    .op     (dp_op),
    .busy   (dp_busy),
    .done   (dp_done),
    .res    (dp_res)
  );

endmodule
