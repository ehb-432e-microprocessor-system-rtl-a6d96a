// ack_mux: acknowledgement path from the two slaves back to the master.
//
// A slave acknowledges by writing to a port whose number is its
// acknowledgement code (80h for slave 1, 40h for slave 2). On a slave's
// write strobe its port_id is registered (mult_a for slave 1, mult_b for
// slave 2). A two-way multiplexer, selected by bit 0 of the master's
// port_id, then registers mult_a (bit 0 = 0, master reads port 00h) or
// mult_b (bit 0 = 1, master reads port 01h) into the master's in_port every
// clock. A captured code stays until the same slave writes again.
//
// Timing: in_port_master follows a slave write after two clock edges (one
// into mult_a/mult_b, one through the multiplexer register) and a change of
// port_id_master[0] after one. reset is synchronous and active high. The
// project leaves these registers uninitialised, and its simulation shows the
// master's input undefined until the first acknowledgement; this design
// resets them to NO_ACK (FFh by default), a value that fails both slaves'
// acknowledgement tests, so the master waits for a real acknowledgement.
module ack_mux
  import kcpsm3_pkg::*;
#(
  parameter byte_t NO_ACK = 8'hFF
) (
  input  logic  clk,
  input  logic  reset,
  input  logic  write_strobe_slave1,
  input  byte_t port_id_slave1,
  input  logic  write_strobe_slave2,
  input  byte_t port_id_slave2,
  input  logic  port_id_master_lsb,   // select: 0 -> slave 1, 1 -> slave 2
  output byte_t in_port_master
);

  byte_t mult_a, mult_b;

  always_ff @(posedge clk) begin
    if (reset) begin
      mult_a <= NO_ACK;
      mult_b <= NO_ACK;
    end else begin
      if (write_strobe_slave1) mult_a <= port_id_slave1;
      if (write_strobe_slave2) mult_b <= port_id_slave2;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) in_port_master <= NO_ACK;
    else       in_port_master <= port_id_master_lsb ? mult_b : mult_a;
  end

endmodule
