// kcpsm3_pkg: shared types and instruction encoding for the three-processor
// PicoBlaze (KCPSM3) system.
//
// The system couples one master and two slave KCPSM3 cores. Each core fetches
// 18-bit instructions from a 1024-word program ROM over a 10-bit address and
// talks to the outside through an 8-bit port_id, an 8-bit out_port, an 8-bit
// in_port and the write/read strobes. This package holds:
//   * the widths of those buses and a packed struct that bundles what a core
//     drives towards the system (pb_core_out_t),
//   * the KCPSM3 opcode values and jump conditions as enums,
//   * small functions that build instruction words, so the program ROMs read
//     like the assembly source they hold.
// The programs themselves follow the project's assembly listings. The binary
// encoding is the published KCPSM3 one (6-bit opcode in [17:12], sX in
// [11:8], constant/port in [7:0], sY in [7:4], jump address in [9:0],
// condition in [11:10] with bit 12 marking a conditional jump); the project
// text only gives the mnemonics.
package kcpsm3_pkg;

  localparam int unsigned INSTR_W = 18;   // instruction word width
  localparam int unsigned ADDR_W  = 10;   // program address width
  localparam int unsigned DATA_W  = 8;    // port and register width

  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [ADDR_W-1:0]  pc_t;
  typedef logic [DATA_W-1:0]  byte_t;
  typedef logic [3:0]         reg_sel_t;  // s0 .. sF

  // Signals a core drives towards the rest of the system.
  typedef struct packed {
    pc_t   address;
    byte_t port_id;
    byte_t out_port;
    logic  write_strobe;
    logic  read_strobe;
  } pb_core_out_t;

  // KCPSM3 opcodes (instruction bits [17:12]).
  typedef enum logic [5:0] {
    OP_LOAD_K    = 6'h00, OP_LOAD_R    = 6'h01,
    OP_INPUT_P   = 6'h04, OP_INPUT_R   = 6'h05,
    OP_AND_K     = 6'h0A, OP_AND_R     = 6'h0B,
    OP_OR_K      = 6'h0C, OP_OR_R      = 6'h0D,
    OP_XOR_K     = 6'h0E, OP_XOR_R     = 6'h0F,
    OP_TEST_K    = 6'h12, OP_TEST_R    = 6'h13,
    OP_COMPARE_K = 6'h14, OP_COMPARE_R = 6'h15,
    OP_ADD_K     = 6'h18, OP_ADD_R     = 6'h19,
    OP_SUB_K     = 6'h1C, OP_SUB_R     = 6'h1D,
    OP_RETURN    = 6'h2A, OP_RETURN_C  = 6'h2B,
    OP_OUTPUT_P  = 6'h2C, OP_OUTPUT_R  = 6'h2D,
    OP_CALL      = 6'h30, OP_CALL_C    = 6'h31,
    OP_JUMP      = 6'h34, OP_JUMP_C    = 6'h35
  } opcode_e;

  // Jump/call/return condition (bits [11:10] of a conditional instruction).
  typedef enum logic [1:0] {
    COND_Z  = 2'b00,
    COND_NZ = 2'b01,
    COND_C  = 2'b10,
    COND_NC = 2'b11
  } cond_e;

  // Instruction builders: operation sX, kk / port pp.
  function automatic instr_t enc_k(opcode_e op, reg_sel_t sx, byte_t kk);
    return {op, sx, kk};
  endfunction

  function automatic instr_t enc_load(reg_sel_t sx, byte_t kk);
    return enc_k(OP_LOAD_K, sx, kk);
  endfunction

  function automatic instr_t enc_input(reg_sel_t sx, byte_t pp);
    return enc_k(OP_INPUT_P, sx, pp);
  endfunction

  function automatic instr_t enc_output(reg_sel_t sx, byte_t pp);
    return enc_k(OP_OUTPUT_P, sx, pp);
  endfunction

  function automatic instr_t enc_test(reg_sel_t sx, byte_t kk);
    return enc_k(OP_TEST_K, sx, kk);
  endfunction

  function automatic instr_t enc_jump(pc_t target);
    return {OP_JUMP, 2'b00, target};
  endfunction

  function automatic instr_t enc_jump_if(cond_e cond, pc_t target);
    return {OP_JUMP_C, cond, target};
  endfunction

endpackage
