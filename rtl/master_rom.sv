// master_rom: program memory of the master PicoBlaze.
//
// The master sends the slaves first an address byte and then its stored data
// byte 0Ch. It writes address 01h on port 00h, the data on port 00h, then
// polls port 00h until slave 1's acknowledgement (80h) makes
// "TEST s0, 7F" return zero. It then does the same with address 02h on port
// 01h, polling port 01h until slave 2's acknowledgement (40h) makes
// "TEST s1, BF" return zero, and starts over with slave 1. Pairs of
// "LOAD value, 0C" are pure delay: they give the slaves time to see the
// address before the data arrives. Register sA is named "address" and sB
// "value" in the source.
//
// Program (word address: instruction):
//    0        LOAD  sB, 0C
//    1 slave1:LOAD  sA, 01      2 OUTPUT sA, 00
//    3-4      LOAD  sB, 0C (x2) 5 OUTPUT sB, 00     6-7 LOAD sB, 0C (x2)
//    8 ack1:  INPUT s0, 00      9 TEST   s0, 7F
//   10        JUMP  Z, slave2  11 JUMP   ack1
//   12 slave2:LOAD  sA, 02     13 OUTPUT sA, 01
//   14-15     LOAD  sB, 0C (x2)16 OUTPUT sB, 01    17-18 LOAD sB, 0C (x2)
//   19 ack2:  INPUT s1, 01     20 TEST   s1, BF
//   21        JUMP  Z, slave1  22 JUMP   ack2
// All other words hold 00000h (LOAD s0, 00), as an assembler fills them.
//
// Interface and timing: like the block RAM the KCPSM3 expects, the ROM is
// synchronous: "instruction" shows the word at "address" one clock edge
// after the address is presented. The program follows the project's listing
// and flowchart; the word encoding is the standard KCPSM3 one.
module master_rom
  import kcpsm3_pkg::*;
(
  input  logic   clk,
  input  pc_t    address,
  output instr_t instruction
);

  localparam reg_sel_t S0 = 4'h0, S1 = 4'h1;
  localparam reg_sel_t ADDRESS = 4'hA;  // NAMEREG sA, address
  localparam reg_sel_t VALUE   = 4'hB;  // NAMEREG sB, value
  localparam byte_t    DATA    = 8'h0C; // the master's stored data

  localparam pc_t L_SLAVE1 = 10'd1;
  localparam pc_t L_ACK1   = 10'd8;
  localparam pc_t L_SLAVE2 = 10'd12;
  localparam pc_t L_ACK2   = 10'd19;

  instr_t word;

  always_comb begin
    unique case (address)
      10'd0:  word = enc_load(VALUE, DATA);
      10'd1:  word = enc_load(ADDRESS, 8'h01);
      10'd2:  word = enc_output(ADDRESS, 8'h00);
      10'd3:  word = enc_load(VALUE, DATA);
      10'd4:  word = enc_load(VALUE, DATA);
      10'd5:  word = enc_output(VALUE, 8'h00);
      10'd6:  word = enc_load(VALUE, DATA);
      10'd7:  word = enc_load(VALUE, DATA);
      10'd8:  word = enc_input(S0, 8'h00);
      10'd9:  word = enc_test(S0, 8'h7F);
      10'd10: word = enc_jump_if(COND_Z, L_SLAVE2);
      10'd11: word = enc_jump(L_ACK1);
      10'd12: word = enc_load(ADDRESS, 8'h02);
      10'd13: word = enc_output(ADDRESS, 8'h01);
      10'd14: word = enc_load(VALUE, DATA);
      10'd15: word = enc_load(VALUE, DATA);
      10'd16: word = enc_output(VALUE, 8'h01);
      10'd17: word = enc_load(VALUE, DATA);
      10'd18: word = enc_load(VALUE, DATA);
      10'd19: word = enc_input(S1, 8'h01);
      10'd20: word = enc_test(S1, 8'hBF);
      10'd21: word = enc_jump_if(COND_Z, L_SLAVE1);
      10'd22: word = enc_jump(L_ACK2);
      default: word = '0;
    endcase
  end

  always_ff @(posedge clk) instruction <= word;

endmodule
