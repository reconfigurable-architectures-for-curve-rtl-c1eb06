// top_controller: the co-processor's top controller.
//
// It takes instructions from the port stage, sequences the local storage
// (7-bit address, RD and WR strobes), the input-word and output-word
// registers and the datapath, and holds the four operand address registers
// A, B, C and D (variable numbers 0..31). A field variable occupies four
// consecutive storage locations, 4*var .. 4*var+3; its 84 bits fill the first
// three, the fourth stays unused. As in the original architecture every
// storage write comes from the input-word register and every storage read
// lands in the output-word register, for the CPU and the datapath alike. The
// instruction set is this design's own micro-code, chosen so that each line
// of the divisor addition and doubling formulae (d = a*b + c, d = a*b,
// d = a + b, d = a^2) is one EXEC:
//   NOP, INSHIFT, OUTSHIFT, SETREG  done in the accept cycle
//   WRITE var  storage[var] <= input word       3 write cycles
//   READ var   output word <= storage[var]      3 read cycles + 1
//   EXEC op    D <= A*B, A*B + C, A + B or A*A: for each of the 1..3 operands
//              3 reads into the output word, copied whole into the operand
//              register one cycle after its last word lands (reads of the
//              next operand overlap the copy); 2 cycles to drain, 1 start
//              cycle, the datapath run, whose done cycle also loads the
//              result into the input word, then 3 write cycles.
//              Busy 3n + ceil(M/DIGIT) + 8 cycles for the multiplying
//              operations and 14 for ADD. EXEC overwrites both word
//              registers.
// New instructions are accepted only in the IDLE state; busy is high
// otherwise. The storage read has one cycle of latency; read data are steered
// by a two-stage pipeline (rdv_q ... for the word, ld2_q ... for the copy).
module top_controller
  import hecc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // port stage
  input  logic              ins_valid,
  input  instr_t            instr,
  input  logic [7:0]        addr,
  output logic              accept,
  output logic              busy,
  // local storage
  output logic              ram_rd,
  output logic              ram_wr,
  output logic [RAM_AW-1:0] ram_addr,
  output logic [1:0]        ram_widx,       // input-word slice to write
  // word registers
  output logic              in_shift,
  output logic              in_ld,
  output logic              out_shift,
  output logic              out_ld,
  output logic [1:0]        out_idx,
  // datapath
  output logic              dp_ld,
  output opreg_e            dp_ld_sel,
  output logic              dp_start,
  output dpop_e             dp_op,
  input  logic              dp_done
);

  typedef enum logic [2:0] {
    S_IDLE, S_WRITE, S_READ, S_RWAIT, S_LOAD, S_LWAIT, S_GO, S_RUN
  } state_e;

  // S_STORE shares S_WRITE: both write the input word to a variable.
  state_e            state_q;
  logic [VAR_AW-1:0] var_q;                 // variable written / read
  logic [VAR_AW-1:0] reg_q [4];             // operand address registers
  dpop_e             op_q;
  logic [1:0]        wrd_q;                 // word counter 0..2
  logic [1:0]        opn_q;                 // operand counter during loads
  logic [1:0]        nops;                  // operands the operation reads
  logic              rdv_q;                 // storage word arrives this cycle
  logic              rd_opnd_q;             // ... as part of an operand
  opreg_e            rd_sel_q;
  logic [1:0]        rd_idx_q;
  logic              ld2_q;                 // output word holds a whole operand
  opreg_e            ld2_sel_q;

  always_comb begin
    unique case (op_q)
      DP_SQR:    nops = 2'd1;
      DP_MULADD: nops = 2'd3;
      default:   nops = 2'd2;
    endcase
  end

  assign accept = (state_q == S_IDLE) && ins_valid;
  assign busy   = (state_q != S_IDLE);

  // One-cycle instructions act straight from the accept.
  assign in_shift  = accept && (instr.opcode == OP_INSHIFT);
  assign out_shift = accept && (instr.opcode == OP_OUTSHIFT);

  // Storage interface.
  assign ram_rd   = (state_q == S_READ) || (state_q == S_LOAD);
  assign ram_wr   = (state_q == S_WRITE);
  assign ram_addr = (state_q == S_LOAD) ? {reg_q[opn_q], wrd_q} : {var_q, wrd_q};
  assign ram_widx = wrd_q;

  // Read data steering.
  assign out_ld    = rdv_q;
  assign out_idx   = rd_idx_q;
  assign dp_ld     = ld2_q;
  assign dp_ld_sel = ld2_sel_q;
  assign dp_start  = (state_q == S_GO);
  assign dp_op     = op_q;
  assign in_ld     = (state_q == S_RUN) && dp_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      var_q     <= '0;
      for (int i = 0; i < 4; i++) reg_q[i] <= '0;
      op_q      <= DP_MUL;
      wrd_q     <= '0;
      opn_q     <= '0;
      rdv_q     <= 1'b0;
      rd_opnd_q <= 1'b0;
      rd_sel_q  <= REG_A;
      rd_idx_q  <= '0;
      ld2_q     <= 1'b0;
      ld2_sel_q <= REG_A;
    end else begin
      rdv_q     <= ram_rd;
      rd_opnd_q <= (state_q == S_LOAD);
      rd_sel_q  <= opreg_e'(opn_q);
      rd_idx_q  <= wrd_q;
      ld2_q     <= rdv_q && rd_opnd_q && (rd_idx_q == 2'd2);
      ld2_sel_q <= rd_sel_q;

      unique case (state_q)
        S_IDLE: begin
          wrd_q <= '0;
          opn_q <= '0;
          if (accept) begin
            var_q <= addr[VAR_AW-1:0];
            unique case (instr.opcode)
              OP_WRITE:  state_q <= S_WRITE;
              OP_READ:   state_q <= S_READ;
              OP_SETREG: reg_q[instr.sub[1:0]] <= addr[VAR_AW-1:0];
              OP_EXEC: begin
                op_q    <= dpop_e'(instr.sub[1:0]);
                state_q <= S_LOAD;
              end
              default: ;   // NOP, INSHIFT, OUTSHIFT, reserved
            endcase
          end
        end
        S_WRITE, S_READ: begin
          wrd_q <= wrd_q + 1'b1;
          if (wrd_q == 2'd2) begin
            wrd_q   <= '0;
            state_q <= (state_q == S_READ) ? S_RWAIT : S_IDLE;
          end
        end
        S_RWAIT: state_q <= S_IDLE;                 // last word lands
        S_LOAD: begin
          wrd_q <= wrd_q + 1'b1;
          if (wrd_q == 2'd2) begin
            wrd_q <= '0;
            opn_q <= opn_q + 1'b1;
            if (opn_q == nops - 1'b1) state_q <= S_LWAIT;
          end
        end
        S_LWAIT: begin                              // last word lands, copy
          wrd_q <= wrd_q + 1'b1;
          if (wrd_q == 2'd1) begin
            wrd_q   <= '0;
            state_q <= S_GO;
          end
        end
        S_GO:    state_q <= S_RUN;
        S_RUN: if (dp_done) begin                   // result -> input word
          var_q   <= reg_q[REG_D];
          wrd_q   <= '0;
          state_q <= S_WRITE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Storage is single-ported: never read and write in one cycle.
  a_rd_wr_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(ram_rd && ram_wr));
  // An instruction is taken only when one is pending.
  a_accept_valid: assert property (@(posedge clk) disable iff (!rst_n) accept |-> ins_valid);
  // The datapath is started only after its last operand has been copied.
  a_start_after_copy: assert property (@(posedge clk) disable iff (!rst_n) dp_start |-> $past(dp_ld));

endmodule
