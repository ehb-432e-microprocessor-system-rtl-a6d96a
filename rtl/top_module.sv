// top_module: one master and two slave PicoBlaze systems around a shared
// address/data broadcast.
//
// The master sends an address byte and then its data byte 0Ch to both
// slaves at once. The slave whose address matches (01h for slave 1, 02h for
// slave 2) copies the data to its output (out1 or out2) and acknowledges by
// writing to port 80h or 40h; the acknowledgement multiplexer returns that
// port number to the master, which then moves on to the other slave.
//
// This module holds everything of the system except the three KCPSM3 cores,
// which are the vendor's soft processor and are connected through ports:
//   * master_rom, slave1_rom, slave2_rom: the three program memories,
//   * data_router: master -> both slave inputs, slaves -> out1/out2,
//   * ack_mux:     slave port_ids -> master input, selected by
//                  port_id_master[0].
// For each core, *_core carries what the core drives (address, port_id,
// out_port, write_strobe, read_strobe) and instruction_* / in_port_* are
// what the core receives. The cores' interrupt inputs are tied low and
// their interrupt_ack outputs are unused in this system, so neither is a
// port here. reset goes to the cores directly and also clears the glue
// registers here (synchronous, active high).
//
// Timing: all glue paths are single registers clocked by clk, as in the
// project's description; instructions arrive one clock after their address.
module top_module
  import kcpsm3_pkg::*;
(
  input  logic         clk,
  input  logic         reset,
  output byte_t        out1,
  output byte_t        out2,
  // master core
  input  pb_core_out_t master_core,
  output instr_t       instruction_master,
  output byte_t        in_port_master,
  // slave 1 core
  input  pb_core_out_t slave1_core,
  output instr_t       instruction_slave1,
  output byte_t        in_port_slave1,
  // slave 2 core
  input  pb_core_out_t slave2_core,
  output instr_t       instruction_slave2,
  output byte_t        in_port_slave2
);

  master_rom u_master_rom (
    .clk         (clk),
    .address     (master_core.address),
    .instruction (instruction_master)
  );

  slave1_rom u_slave1_rom (
    .clk         (clk),
    .address     (slave1_core.address),
    .instruction (instruction_slave1)
  );

  slave2_rom u_slave2_rom (
    .clk         (clk),
    .address     (slave2_core.address),
    .instruction (instruction_slave2)
  );

  data_router u_data_router (
    .clk                 (clk),
    .reset               (reset),
    .write_strobe_master (master_core.write_strobe),
    .out_port_master     (master_core.out_port),
    .write_strobe_slave1 (slave1_core.write_strobe),
    .out_port_slave1     (slave1_core.out_port),
    .write_strobe_slave2 (slave2_core.write_strobe),
    .out_port_slave2     (slave2_core.out_port),
    .in_port_slave1      (in_port_slave1),
    .in_port_slave2      (in_port_slave2),
    .out1                (out1),
    .out2                (out2)
  );

  ack_mux u_ack_mux (
    .clk                 (clk),
    .reset               (reset),
    .write_strobe_slave1 (slave1_core.write_strobe),
    .port_id_slave1      (slave1_core.port_id),
    .write_strobe_slave2 (slave2_core.write_strobe),
    .port_id_slave2      (slave2_core.port_id),
    .port_id_master_lsb  (master_core.port_id[0]),
    .in_port_master      (in_port_master)
  );

endmodule
