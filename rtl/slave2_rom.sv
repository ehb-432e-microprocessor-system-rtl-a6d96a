// slave2_rom: program memory of slave 2 PicoBlaze.
//
// After a three-instruction delay (LOAD sA, 05 three times, giving the master
// time to send its address) the slave polls its input: it reads the byte the
// master broadcast (INPUT on port BFh) and tests it against its own address
// mask 02h. While the test gives zero it keeps polling. Once its address is
// seen it reads the input again, which by then holds the master's data byte,
// and writes it out with OUTPUT on port 40h. The port number of that write
// is the acknowledgement: the system captures the slave's port_id (40h) and
// returns it to the master. The slave then resumes polling.
//
// Program (word address: instruction):
//    0-2          LOAD   sA, 05 (x3)
//    3 address:   INPUT  s0, BF
//    4            TEST   s0, 02
//    5            JUMP   Z, address
//    6            INPUT  s1, BF
//    7            OUTPUT s1, 40
//    8            JUMP   address
// All other words hold 00000h (LOAD s0, 00).
//
// Interface and timing: synchronous ROM, "instruction" shows the word at
// "address" one clock edge after the address is presented. The program
// follows the project's listing and flowchart; the word encoding is the
// standard KCPSM3 one.
module slave2_rom
  import kcpsm3_pkg::*;
(
  input  logic   clk,
  input  pc_t    address,
  output instr_t instruction
);

  localparam reg_sel_t SA       = 4'hA;
  localparam reg_sel_t S_ADDR   = 4'h0;   // register holding the polled byte
  localparam reg_sel_t S_DATA   = 4'h1;   // register holding the data byte
  localparam byte_t    IN_PORT  = 8'hBF;
  localparam byte_t    MY_MASK  = 8'h02;   // this slave's address
  localparam byte_t    ACK_PORT = 8'h40;   // port_id used as acknowledgement
  localparam pc_t      L_ADDRESS = 10'd3;

  instr_t word;

  always_comb begin
    unique case (address)
      10'd0:   word = enc_load(SA, 8'h05);
      10'd1:   word = enc_load(SA, 8'h05);
      10'd2:   word = enc_load(SA, 8'h05);
      10'd3:   word = enc_input(S_ADDR, IN_PORT);
      10'd4:   word = enc_test(S_ADDR, MY_MASK);
      10'd5:   word = enc_jump_if(COND_Z, L_ADDRESS);
      10'd6:   word = enc_input(S_DATA, IN_PORT);
      10'd7:   word = enc_output(S_DATA, ACK_PORT);
      10'd8:   word = enc_jump(L_ADDRESS);
      default: word = '0;
    endcase
  end

  always_ff @(posedge clk) instruction <= word;

endmodule
