// np_control_unit: decoder and state of one neighborhood processor (NPCU).
//
// From the shared instruction register, the NP's status register (SR) and the
// global execute strobe it produces the control signals of the NP datapath.
// It owns the SR (Free, NP ON, SRU, U, Z, N, O, C from bit 7 down to bit 0),
// the nibble-mode bit and the NP's Data Out Valid line.
//
// Execution rule: an instruction takes effect only if its condition holds
// (Z, C or N set, or unconditional) and the NP ON bit is set. RST and FOPN
// are obeyed even when NP ON is clear, still subject to their condition.
// The five flags are written when the instruction is an ALU operation and SRU
// is set, or the instruction's own SR-update bit (Types II and IV) is set.
// A MOV to the SR address writes the whole register.
//
// Towards the global control unit the NPCU raises `gcu_cond` when the NP is
// on and the condition of the current instruction holds for its flags; for a
// jump this is the three-bit jump condition of the instruction.
//
// Timing: every state change happens at the rising edge where `exec` is high
// (one clock per instruction, the NP phase of the timing control unit).
// `dout_valid` is high for the one clock after an output instruction.
// Decoding the special-function field in independent groups (bits 8:6, 5:4,
// 3:2, 1:0) is this design's reading of the instruction table. What RST
// clears (accumulators, SR to NP ON and SRU set, nibble mode, output valid) is
// this design's choice; pixel registers are kept.
module np_control_unit
  import np_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        exec,         // execute strobe from the timing control unit
  input  logic [15:0] ir,
  input  logic [7:0]  accb,         // indirect address pointer
  input  flags_t      alu_flags,
  input  logic [7:0]  mov_data,     // accumulator being moved (for SR writes)
  // datapath control
  output logic        active,       // instruction takes effect in this NP
  output aluop_e      alu_op,
  output logic        acc_b_sel,    // ALU works on ACCB
  output logic [8:0]  opnd,         // operand: immediate or register address
  output logic        wr_acc,       // write ALU result to the selected accumulator
  output logic        mov,          // write selected accumulator to register `opnd`
  output logic        clr_a,
  output logic        clr_b,
  output logic        np_reset,     // RST instruction
  output logic [1:0]  out_sel,      // 0 none, 1 ACCA, 2 ACCB, 3 SR
  // state
  output logic [7:0]  sr,
  output logic        nibble_mode,
  output logic        dout_valid,
  output logic        gcu_cond
);

  logic [1:0] cond;
  logic [4:0] opc;
  assign cond = ir[15:14];
  assign opc  = ir[13:9];

  logic is_t1, is_t2, is_t3, is_t4, is_t5;
  always_comb begin
    is_t2 = (opc == OPC_SHIFT_A) || (opc == OPC_SHIFT_B);
    is_t3 = (opc == OPC_JUMP);
    is_t4 = (opc == OPC_IRAM);
    is_t5 = (opc == OPC_SPL);
    // Type I: low four opcode bits name an ALU operation, load or move
    is_t1 = !is_t2 && !is_t3 && !is_t4 && !is_t5 &&
            ((opc[3:0] <= 4'b0110) || (opc[3:0] == OP_LOAD) || (opc[3:0] == OP_MOV));
  end

  logic cond_ok;
  always_comb begin
    unique case (cond)
      COND_Z:  cond_ok = sr[SR_Z];
      COND_C:  cond_ok = sr[SR_C];
      COND_N:  cond_ok = sr[SR_N];
      default: cond_ok = 1'b1;
    endcase
  end

  logic np_on;
  assign np_on = sr[SR_NPON];

  logic spl_fopn, spl_rst, spl_srout;
  assign spl_fopn  = is_t5 && (ir[8:6] == SPL_FOPN);
  assign spl_rst   = is_t5 && (ir[8:6] == SPL_RST);
  assign spl_srout = is_t5 && (ir[8:6] == SPL_SROUT);

  assign active   = cond_ok && (np_on || spl_fopn || spl_rst);
  assign gcu_cond = np_on && (is_t3 ? jump_cond_true({cond, ir[8]}, sr) : cond_ok);

  // ---------------------------------------------------------------------
  // Decode
  // ---------------------------------------------------------------------
  logic sr_upd;       // flags written by this instruction (when active)
  always_comb begin
    alu_op    = OP_LOAD;
    acc_b_sel = 1'b0;
    opnd      = ir[8:0];
    wr_acc    = 1'b0;
    mov       = 1'b0;
    clr_a     = 1'b0;
    clr_b     = 1'b0;
    np_reset  = 1'b0;
    out_sel   = 2'd0;
    sr_upd    = 1'b0;
    if (is_t1) begin
      acc_b_sel = opc[4];
      alu_op    = aluop_e'(opc[3:0]);
      if (opc[3:0] == OP_MOV) begin
        mov = 1'b1;
      end else begin
        wr_acc = 1'b1;
        sr_upd = sr[SR_SRU];
      end
    end else if (is_t2) begin
      acc_b_sel = opc[4];
      alu_op    = aluop_e'(ir[8:5]);
      wr_acc    = 1'b1;
      sr_upd    = sr[SR_SRU] || ir[4];
    end else if (is_t4) begin
      opnd = {1'b0, accb};
      if (ir[3]) begin
        alu_op = OP_MOV;
        mov    = 1'b1;
      end else begin
        alu_op = aluop_e'(ir[8:5]);
        wr_acc = 1'b1;
        sr_upd = sr[SR_SRU] || ir[4];
      end
    end else if (is_t5) begin
      np_reset = spl_rst;
      clr_a    = (ir[1:0] == SPL_CLRA);
      clr_b    = (ir[1:0] == SPL_CLRB);
      if (spl_srout)                 out_sel = 2'd3;
      else if (ir[5:4] == SPL_OUTA)  out_sel = 2'd1;
      else if (ir[5:4] == SPL_OUTB)  out_sel = 2'd2;
    end
    if (!active) begin
      wr_acc   = 1'b0;
      mov      = 1'b0;
      clr_a    = 1'b0;
      clr_b    = 1'b0;
      np_reset = 1'b0;
      out_sel  = 2'd0;
      sr_upd   = 1'b0;
    end
  end

  // MOV into the status register (special register 0, nibble mode off)
  logic mov_to_sr;
  assign mov_to_sr = mov && !nibble_mode && (opnd[8:0] == {1'b0, 2'b11, 3'b000, SPR_SR});

  // ---------------------------------------------------------------------
  // State
  // ---------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      sr          <= SR_RESET;
      nibble_mode <= 1'b0;
      dout_valid  <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (exec) begin
        if (np_reset) begin
          sr          <= SR_RESET;
          nibble_mode <= 1'b0;
        end else begin
          if (mov_to_sr) begin
            sr <= mov_data;
          end else if (sr_upd) begin
            sr[SR_C] <= alu_flags.c;
            sr[SR_O] <= alu_flags.o;
            sr[SR_N] <= alu_flags.n;
            sr[SR_Z] <= alu_flags.z;
            sr[SR_U] <= alu_flags.u;
          end
          if (spl_fopn && active) sr[SR_NPON] <= 1'b1;
          if (is_t5 && active && ir[3:2] == SPL_NBEN) nibble_mode <= 1'b1;
          if (is_t5 && active && ir[3:2] == SPL_NBDS) nibble_mode <= 1'b0;
          dout_valid <= (out_sel != 2'd0);
        end
      end
    end
  end

endmodule
