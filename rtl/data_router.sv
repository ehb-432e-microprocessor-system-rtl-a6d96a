// data_router: the data paths between the master, the two slaves and the
// system outputs out1/out2.
//
// The master's out_port is broadcast: on every master write strobe the byte
// is registered into the in_port of both slaves, whatever the port number.
// Each slave decides in software whether the byte is meant for it. When
// slave 1 writes, its out_port is registered into out1 and out2 is cleared;
// when slave 2 writes, its out_port goes to out2 and out1 is cleared, so the
// data shows on the outputs one slave at a time. If both slaves write in the
// same clock, slave 2's assignment wins (out1 = 0, out2 = slave 2's byte),
// as the later statement of the original description does.
//
// Timing: every output is a register updated on the rising edge of clk in
// which the corresponding strobe is high. reset (synchronous, active high)
// clears all four registers; the project starts out1/out2 at zero and leaves
// the slave input registers unset, so clearing those too is this design's
// choice.
module data_router
  import kcpsm3_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  // master core
  input  logic  write_strobe_master,
  input  byte_t out_port_master,
  // slave cores
  input  logic  write_strobe_slave1,
  input  byte_t out_port_slave1,
  input  logic  write_strobe_slave2,
  input  byte_t out_port_slave2,
  // registered results
  output byte_t in_port_slave1,
  output byte_t in_port_slave2,
  output byte_t out1,
  output byte_t out2
);

  always_ff @(posedge clk) begin
    if (reset) begin
      in_port_slave1 <= '0;
      in_port_slave2 <= '0;
    end else if (write_strobe_master) begin
      in_port_slave1 <= out_port_master;
      in_port_slave2 <= out_port_master;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      out1 <= '0;
      out2 <= '0;
    end else if (write_strobe_slave2) begin
      out1 <= '0;
      out2 <= out_port_slave2;
    end else if (write_strobe_slave1) begin
      out1 <= out_port_slave1;
      out2 <= '0;
    end
  end

endmodule
