// kcpsm3: behavioural model of the KCPSM3 (PicoBlaze) 8-bit soft processor,
// for simulation only. The real core is the FPGA vendor's design and is not
// part of this RTL; this model stands in for it in the system testbench with
// the core's own port list.
//
// What it models: sixteen 8-bit registers s0..sF, zero and carry flags, a
// 10-bit program counter and a small call stack. Every instruction takes two
// clock cycles and its word is on "instruction" for both: in the second
// cycle, the one in which the instruction executes, "address" already shows
// the next program counter, so the synchronous program ROM delivers the next
// word at the same edge that ends the instruction. After reset one extra
// clock fetches the first word. write_strobe (OUTPUT) and read_strobe
// (INPUT) are high during the second cycle; in_port is sampled at its
// closing clock edge, so a port decoder has the first cycle to settle. port_id carries the
// port constant (or register sY) and out_port register sX, continuously, as
// in the real core. Implemented: LOAD, AND, OR, XOR, TEST, COMPARE, ADD,
// SUB, INPUT, OUTPUT, JUMP, CALL, RETURN, each in constant and register form
// where the set has both. Interrupts, scratch-pad memory, shifts and
// rotates are not modelled; an unknown opcode is reported and skipped.
// reset is synchronous and active high.
module kcpsm3
  import kcpsm3_pkg::*;
(
  output pc_t    address,
  input  instr_t instruction,
  output byte_t  port_id,
  output logic   write_strobe,
  output byte_t  out_port,
  output logic   read_strobe,
  input  byte_t  in_port,
  input  logic   interrupt,
  output logic   interrupt_ack,
  input  logic   reset,
  input  logic   clk
);

  byte_t    regs [16];
  logic     zero_flag, carry_flag;
  pc_t      pc;
  logic     execute;            // second cycle of an instruction
  logic     fetched;            // first word fetched after reset
  pc_t      next_pc;
  pc_t      stack [8];
  logic [2:0] sp;

  opcode_e  op;
  reg_sel_t sx, sy;
  byte_t    kk, operand;
  cond_e    cond;
  logic     cond_true;

  assign op      = opcode_e'(instruction[17:12]);
  assign sx      = instruction[11:8];
  assign sy      = instruction[7:4];
  assign kk      = instruction[7:0];
  assign cond    = cond_e'(instruction[11:10]);
  assign operand = instruction[12] ? regs[sy] : kk;  // odd opcode = register form

  always_comb begin
    unique case (cond)
      COND_Z:  cond_true = zero_flag;
      COND_NZ: cond_true = !zero_flag;
      COND_C:  cond_true = carry_flag;
      COND_NC: cond_true = !carry_flag;
    endcase
  end

  always_comb begin
    next_pc = pc + 1'b1;
    unique case (op)
      OP_JUMP:   next_pc = instruction[9:0];
      OP_JUMP_C: if (cond_true) next_pc = instruction[9:0];
      OP_CALL:   next_pc = instruction[9:0];
      OP_CALL_C: if (cond_true) next_pc = instruction[9:0];
      OP_RETURN: next_pc = stack[sp - 1'b1];
      OP_RETURN_C: if (cond_true) next_pc = stack[sp - 1'b1];
      default: ;
    endcase
  end

  assign address       = execute ? next_pc : pc;
  assign port_id       = operand;
  assign out_port      = regs[sx];
  assign write_strobe  = execute && (op == OP_OUTPUT_P || op == OP_OUTPUT_R);
  assign read_strobe   = execute && (op == OP_INPUT_P  || op == OP_INPUT_R);
  assign interrupt_ack = 1'b0;

  always_ff @(posedge clk) begin
    if (reset) begin
      pc         <= '0;
      execute    <= 1'b0;
      fetched    <= 1'b0;
      zero_flag  <= 1'b0;
      carry_flag <= 1'b0;
      sp         <= '0;
      foreach (regs[i]) regs[i] <= '0;
    end else if (!fetched) begin
      fetched <= 1'b1;
    end else if (!execute) begin
      execute <= 1'b1;
    end else begin
      execute <= 1'b0;
      pc      <= next_pc;
      unique case (op)
        OP_LOAD_K, OP_LOAD_R:   regs[sx] <= operand;
        OP_INPUT_P, OP_INPUT_R: regs[sx] <= in_port;
        OP_OUTPUT_P, OP_OUTPUT_R: ;
        OP_AND_K, OP_AND_R: begin
          regs[sx] <= regs[sx] & operand;
          zero_flag <= (regs[sx] & operand) == 8'h00; carry_flag <= 1'b0;
        end
        OP_OR_K, OP_OR_R: begin
          regs[sx] <= regs[sx] | operand;
          zero_flag <= (regs[sx] | operand) == 8'h00; carry_flag <= 1'b0;
        end
        OP_XOR_K, OP_XOR_R: begin
          regs[sx] <= regs[sx] ^ operand;
          zero_flag <= (regs[sx] ^ operand) == 8'h00; carry_flag <= 1'b0;
        end
        OP_TEST_K, OP_TEST_R: begin
          zero_flag  <= (regs[sx] & operand) == 8'h00;
          carry_flag <= ^(regs[sx] & operand);   // odd parity
        end
        OP_COMPARE_K, OP_COMPARE_R: begin
          zero_flag  <= regs[sx] == operand;
          carry_flag <= operand > regs[sx];
        end
        OP_ADD_K, OP_ADD_R: begin
          {carry_flag, regs[sx]} <= {1'b0, regs[sx]} + {1'b0, operand};
          zero_flag <= (regs[sx] + operand) == 8'h00;
        end
        OP_SUB_K, OP_SUB_R: begin
          {carry_flag, regs[sx]} <= {1'b0, regs[sx]} - {1'b0, operand};
          zero_flag <= regs[sx] == operand;
        end
        OP_JUMP, OP_JUMP_C: ;
        OP_CALL, OP_CALL_C:
          if (op == OP_CALL || cond_true) begin
            stack[sp] <= pc + 1'b1;
            sp        <= sp + 1'b1;
          end
        OP_RETURN, OP_RETURN_C:
          if (op == OP_RETURN || cond_true) sp <= sp - 1'b1;
        default: $error("kcpsm3 model: unsupported instruction %05h at %03h", instruction, pc);
      endcase
    end
  end

  // An instruction is either an input or an output, never both.
  assert property (@(posedge clk) !(write_strobe && read_strobe));

  // Interrupts are not modelled; the system ties the input low.
  assert property (@(posedge clk) disable iff (reset) !interrupt);

endmodule
